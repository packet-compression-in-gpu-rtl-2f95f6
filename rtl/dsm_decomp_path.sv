// dsm_decomp_path: decompression at the streaming multiprocessor side.
//
// A received packet holds two DSM chunks back to back. The length of chunk 0
// follows from its own header (raw: 513 bits; compressed: 9 + 4n + 64(8-n)
// bits with n = ones in ES), so chunk 1 is found by shifting the packet right
// by that length. Both chunks are decompressed in parallel by
// dsm_decompressor and the 128-byte remapped block is put back in element
// order by data_unremap before it is handed to the L1 data cache.
//
// Timing: one cycle from in_valid to out_valid (the thesis's 1-cycle
// decompression); the chunk split and the reverse remapping are
// combinational. No back-pressure. The two-DSM arrangement and the latency
// follow the thesis; the split rule follows from this design's packet
// format.
module dsm_decomp_path
  import dsm_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [PKT_BITS-1:0]   in_pkt,
  output logic                  out_valid,
  output logic [BLOCK_BITS-1:0] out_data
);
  logic [CHUNK_BITS-1:0] chunk [N_DSM];
  logic [PKT_LEN_W-1:0]  len0;
  logic [PKT_BITS-1:0]   rest;

  always_comb begin
    len0     = PKT_LEN_W'(chunk_len(in_pkt[0], $countones(in_pkt[N_SEG:1])));
    rest     = in_pkt >> len0;
    chunk[0] = in_pkt[CHUNK_BITS-1:0];
    chunk[1] = rest[CHUNK_BITS-1:0];
  end

  logic [N_DSM-1:0]      d_valid;
  logic [BLOCK_BITS-1:0] remapped;

  for (genvar d = 0; d < N_DSM; d++) begin : g_dsm
    dsm_decompressor #(.DSM_BYTES(DSM_BYTES), .SEG_BYTES(SEG_BYTES)) u_dec (
      .clk, .rst_n,
      .in_valid (in_valid),
      .in_chunk (chunk[d]),
      .out_valid(d_valid[d]),
      .out_data (remapped[d*DSM_BITS +: DSM_BITS])
    );
  end

  data_unremap #(.BLOCK_BYTES(BLOCK_BYTES), .ELEM_BYTES(ELEM_BYTES)) u_unremap (
    .din(remapped), .dout(out_data)
  );

  assign out_valid = d_valid[0];
endmodule

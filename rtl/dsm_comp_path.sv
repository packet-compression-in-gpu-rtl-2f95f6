// dsm_comp_path: compression pipeline at the memory controller side.
//
// A 128-byte reply block goes through
//   data_remap       (wiring)      nibble j of all 32 elements -> group j
//   approx_unit      (2 cycles)    zero the lowest groups if the block
//                                  address lies in an approximable range
//   dsm_compressor x2 (2 cycles)   remapped bytes 0-63 and 64-127, each
//                                  compressed on its own, as in the
//                                  document's two 64-byte DSM units
//   var_concat       (wiring)      chunk 1 placed right after chunk 0
// so a packet leaves four cycles after the block entered (the thesis's
// 4-cycle DSM+APPROX compression latency).
//
// Packet: chunk 0 (its length follows from its own C and ES fields) followed
// directly by chunk 1; out_len is the total length in bits.
// in_read = 0 marks a write reply: it still goes through the pipeline (so
// ordering is kept) but both chunks are sent raw, since only read replies are
// compressed.
//
// Handshake: valid/ready on both ends. The whole pipeline advances together
// (adv); it stops when a packet sits at the output and out_ready is low, and
// in_ready = adv. The approximation map is written through the map_* port.
// The unit structure, two DSMs, latencies and write-reply bypass follow the
// document; the packet format and the stall scheme are this design's.
module dsm_comp_path
  import dsm_pkg::*;
#(
  parameter int unsigned ADDR_W_P = dsm_pkg::ADDR_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // approximation memory map write port
  input  logic                        map_we,
  input  logic [$clog2(MAP_ENTRIES)-1:0] map_idx,
  input  logic [ADDR_W_P-1:0]         map_start,
  input  logic [ADDR_W_P-1:0]         map_end,
  input  logic [APX_BITS_W-1:0]       map_bits,
  // reply block in
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic                        in_read,
  input  logic [ADDR_W_P-1:0]         in_addr,
  input  logic [BLOCK_BITS-1:0]       in_data,
  // compressed packet out
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [PKT_BITS-1:0]         out_pkt,
  output logic [PKT_LEN_W-1:0]        out_len,
  output logic                        out_approx
);
  localparam int unsigned CLW = $clog2(DSM_BITS + 2);

  logic adv;
  assign adv      = !out_valid || out_ready;
  assign in_ready = adv;

  logic [BLOCK_BITS-1:0] remapped;
  data_remap #(.BLOCK_BYTES(BLOCK_BYTES), .ELEM_BYTES(ELEM_BYTES)) u_remap (
    .din(in_data), .dout(remapped)
  );

  logic                  ap_valid, ap_approx;
  logic [BLOCK_BITS-1:0] ap_data;
  logic [1:0]            read_pipe;   // in_read delayed through approx_unit

  approx_unit #(
    .BLOCK_BYTES(BLOCK_BYTES), .ELEM_BYTES(ELEM_BYTES), .ENTRIES(MAP_ENTRIES),
    .ADDR_W(ADDR_W_P), .BITS_W(APX_BITS_W), .GROUPS(APX_GROUPS)
  ) u_apx (
    .clk, .rst_n, .en(adv),
    .map_we, .map_idx, .map_start, .map_end, .map_bits,
    .in_valid (in_valid && in_ready),
    .in_allow (in_read),
    .in_addr  (in_addr),
    .in_data  (remapped),
    .out_valid(ap_valid),
    .out_approx(ap_approx),
    .out_data (ap_data)
  );

  logic [1:0] apx_pipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      read_pipe <= '0;
      apx_pipe  <= '0;
    end else if (adv) begin
      read_pipe <= {read_pipe[0], in_read};
      apx_pipe  <= {apx_pipe[0], ap_approx};
    end
  end

  logic [N_DSM-1:0] c_valid;
  logic [CHUNK_BITS-1:0] chunk [N_DSM];
  logic [CLW-1:0]        clen  [N_DSM];

  for (genvar d = 0; d < N_DSM; d++) begin : g_dsm
    dsm_compressor #(.DSM_BYTES(DSM_BYTES), .SEG_BYTES(SEG_BYTES)) u_cmp (
      .clk, .rst_n, .en(adv),
      .in_valid (ap_valid),
      .in_raw   (!read_pipe[1]),
      .in_data  (ap_data[d*DSM_BITS +: DSM_BITS]),
      .out_valid(c_valid[d]),
      .out_chunk(chunk[d]),
      .out_len  (clen[d])
    );
  end

  // join chunk 0 and chunk 1 (the package fixes two DSM units per block)
  var_concat #(.AW(CHUNK_BITS), .BW(CHUNK_BITS), .LW(PKT_LEN_W)) u_join (
    .a(chunk[0]), .a_len(PKT_LEN_W'(clen[0])),
    .b(chunk[1]), .b_len(PKT_LEN_W'(clen[1])),
    .y(out_pkt),  .y_len(out_len)
  );

  assign out_valid  = c_valid[0];
  assign out_approx = apx_pipe[1];

  // a write reply is never approximated
  assert property (@(posedge clk) disable iff (!rst_n) out_valid && out_approx |-> out_pkt[0]);
endmodule

// dsm_decompressor: DSM Decompressor Unit for one 64-byte chunk.
//
// Unpacker: splits the chunk into C (bit 0), ES (bits 8:1) and ED (bit 9 up).
// For segment i the bit counter counts the compressed segments among
// segments 0..i-1 (cnt); the shifter moves ED right by 4*cnt + 64*(i-cnt),
// the start of segment i's encoding, and hands the low 64 bits to the
// segment recover. The segment recover repeats the low nibble sixteen times
// when ES[i] is 1, and passes the 64 bits through otherwise. All eight
// segments are restored in parallel. When C is 0 the chunk holds the raw
// block, which is output as it is.
//
// Timing: one cycle. The chunk is taken when in_valid is high and the
// restored (still remapped) block appears on out_data with out_valid on the
// next clock edge. No back-pressure: the receiver takes one block per cycle.
//
// From the thesis: the unpacker / bit counter / shifter / segment recover
// structure, the offset formula and the 1-cycle latency. The chunk field
// order is this design's choice and matches dsm_compressor.
module dsm_decompressor #(
  parameter int unsigned DSM_BYTES = dsm_pkg::DSM_BYTES,
  parameter int unsigned SEG_BYTES = dsm_pkg::SEG_BYTES
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [DSM_BYTES*8:0]   in_chunk,
  output logic                   out_valid,
  output logic [DSM_BYTES*8-1:0] out_data
);
  localparam int unsigned NS = DSM_BYTES / SEG_BYTES;
  localparam int unsigned SB = SEG_BYTES * 8;
  localparam int unsigned DB = DSM_BYTES * 8;
  localparam int unsigned OW = $clog2(DB + 1);

  // unpacker
  logic          c;
  logic [NS-1:0] es;
  logic [DB-1:0] ed;
  assign c  = in_chunk[0];
  assign es = in_chunk[NS:1];
  assign ed = DB'(in_chunk[DB:NS+1]);

  logic [DB-1:0] restored;

  always_comb begin
    int unsigned   cnt;
    logic [OW-1:0] off;
    logic [DB-1:0] window;
    restored = '0;
    cnt      = 0;
    for (int i = 0; i < NS; i++) begin
      // bit counter holds the number of compressed segments before i
      off    = OW'(cnt * 4 + (i - cnt) * SB);
      window = ed >> off;                                   // shifter
      restored[i*SB +: SB] = es[i] ? {(SB/4){window[3:0]}}  // segment recover
                                   : window[SB-1:0];
      cnt = cnt + 32'(es[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_data <= c ? restored : in_chunk[DB:1];
    end
  end
endmodule

// comp_buffer: compression buffer.
//
// A first-in first-out queue of compressed packets between the compression
// pipeline and the memory controller's network interface. It absorbs the
// packets the compressors produce while the reply network refuses flits.
// Valid/ready handshake on both sides: a word is written when in_valid and
// in_ready are both high and read when out_valid and out_ready are both high.
// Written words are visible at the output on the next cycle; a full buffer
// deasserts in_ready. Storage is a plain array with read/write pointers.
// The thesis names the buffer; its depth (4 packets by default) and the
// handshake are this design's choices.
module comp_buffer #(
  parameter int unsigned W     = dsm_pkg::PKT_BITS + dsm_pkg::PKT_LEN_W + 1,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic          do_wr, do_rd;

  assign in_ready  = (count < DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= incr(wr_ptr);
      if (do_rd) rd_ptr <= incr(rd_ptr);
      if (do_wr && !do_rd)      count <= count + 1'b1;
      else if (do_rd && !do_wr) count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= in_data;
  end

  // a full buffer never accepts and an empty one never delivers
  assert property (@(posedge clk) disable iff (!rst_n) int'(count) <= DEPTH);
endmodule

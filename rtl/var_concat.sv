// var_concat: variable-length concatenator.
//
// Packs two variable-length bit fields back to back: field a occupies the
// low a_len bits of y, field b follows at bit a_len, and y_len = a_len + b_len.
// Bits of a at or above a_len, and of b at or above b_len, are masked off,
// so callers need not clear them.
// Combinational. The DSM compressor builds a tree of these (pairs of segment
// encodings, then pairs of pairs) as the thesis describes; the same block
// joins the two DSM chunks of a 128-byte block into one packet.
module var_concat #(
  parameter int unsigned AW = 64,   // width of field a
  parameter int unsigned BW = 64,   // width of field b
  parameter int unsigned LW = $clog2(AW + BW + 1)
) (
  input  logic [AW-1:0]    a,
  input  logic [LW-1:0]    a_len,
  input  logic [BW-1:0]    b,
  input  logic [LW-1:0]    b_len,
  output logic [AW+BW-1:0] y,
  output logic [LW-1:0]    y_len
);
  logic [AW+BW-1:0] a_ext, a_mask, b_mask, b_ext;

  always_comb begin
    a_mask = ~({(AW + BW){1'b1}} << a_len);
    a_ext  = {{BW{1'b0}}, a} & a_mask;
    b_mask = ~({(AW + BW){1'b1}} << b_len);
    b_ext  = {{AW{1'b0}}, b} & b_mask;
    y      = a_ext | (b_ext << a_len);
    y_len  = a_len + b_len;
  end
endmodule

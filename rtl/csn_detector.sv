// csn_detector: Consecutive Same Nibble (CSN) detector for one segment.
//
// Compares every nibble of a segment with its neighbour (nibble 0 with 1,
// 1 with 2, ...) and reports a CSN pattern when all comparisons agree, i.e.
// when the segment is one nibble value repeated. The 4-bit code is that
// nibble. Purely combinational; the DSM compressor has one detector per 8-byte
// segment working in parallel. The neighbour-comparator structure follows the
// document's 2-byte detector, widened to the segment size.
module csn_detector #(
  parameter int unsigned SEG_BITS = dsm_pkg::SEG_BITS
) (
  input  logic [SEG_BITS-1:0] seg,
  output logic                csn,   // 1: segment is a CSN pattern
  output logic [3:0]          code   // its nibble value
);
  localparam int unsigned NN = SEG_BITS / 4;
  logic [NN-2:0] eq;

  for (genvar k = 0; k < NN - 1; k++) begin : g_cmp
    assign eq[k] = (seg[k*4 +: 4] == seg[(k+1)*4 +: 4]);
  end

  assign csn  = &eq;
  assign code = seg[3:0];
endmodule

// data_remap: Data Remapping Unit.
//
// Gathers the nibbles at the same position of every data element next to
// each other, so that elements sharing a nibble value produce runs of equal
// nibbles (CSN patterns) for the DSM compressor. Element i occupies bytes
// ELEM_BYTES*i upward of the block (little endian); its nibble j moves to
// remapped nibble j*NE + i, with NE = number of elements. Group j (NE nibbles)
// therefore holds the j-th least significant nibble of all elements, group 0
// the least significant ones, as in the thesis's examples.
//
// Pure wiring, no logic and no latency: dout follows din combinationally.
// The nibble-clustering permutation is the thesis's; the little-endian
// element order is this design's assumption.
module data_remap #(
  parameter int unsigned BLOCK_BYTES = dsm_pkg::BLOCK_BYTES,
  parameter int unsigned ELEM_BYTES  = dsm_pkg::ELEM_BYTES
) (
  input  logic [BLOCK_BYTES*8-1:0] din,
  output logic [BLOCK_BYTES*8-1:0] dout
);
  localparam int unsigned NE = BLOCK_BYTES / ELEM_BYTES;  // elements
  localparam int unsigned NN = ELEM_BYTES * 2;            // nibbles per element

  for (genvar i = 0; i < NE; i++) begin : g_elem
    for (genvar j = 0; j < NN; j++) begin : g_nib
      assign dout[(j*NE+i)*4 +: 4] = din[(i*NN+j)*4 +: 4];
    end
  end
endmodule

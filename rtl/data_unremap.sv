// data_unremap: reverse remapping on the SM side.
//
// Undoes data_remap: remapped nibble j*NE + i returns to nibble j of element
// i. Applied to the decompressed (remapped) block before it goes to the L1
// data cache, so the cache only ever holds original data. Pure wiring with no
// latency. The thesis states that the remapped block is recovered through
// reverse remapping; the inverse permutation follows from data_remap.
module data_unremap #(
  parameter int unsigned BLOCK_BYTES = dsm_pkg::BLOCK_BYTES,
  parameter int unsigned ELEM_BYTES  = dsm_pkg::ELEM_BYTES
) (
  input  logic [BLOCK_BYTES*8-1:0] din,
  output logic [BLOCK_BYTES*8-1:0] dout
);
  localparam int unsigned NE = BLOCK_BYTES / ELEM_BYTES;
  localparam int unsigned NN = ELEM_BYTES * 2;

  for (genvar i = 0; i < NE; i++) begin : g_elem
    for (genvar j = 0; j < NN; j++) begin : g_nib
      assign dout[(i*NN+j)*4 +: 4] = din[(j*NE+i)*4 +: 4];
    end
  end
endmodule

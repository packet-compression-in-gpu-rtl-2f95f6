// tb_data_unremap: checks that reverse remapping restores the original block
// from a remapped one and matches the index-arithmetic inverse.
module tb_data_unremap;
  import dsm_pkg::*;
  import dsm_ref_pkg::*;
  int checks = 0, failures = 0;
  block_t din, dout, orig;

  data_unremap dut (.din(din), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      orig = gen_block(t % 7);
      din  = ref_remap(orig);
      #1;
      checks++;
      if (dout !== orig || dout !== ref_unremap(din)) begin
        failures++;
        $display("mismatch on block %0d", t);
      end
    end
    // remapped nibble 5*32+3 belongs to element 3, nibble 5
    din = block_t'(4'hc) << ((5*32 + 3)*4);
    #1;
    checks++;
    if (dout != (block_t'(4'hc) << ((3*8 + 5)*4))) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_data_remap: checks the remapping permutation against an index-arithmetic
// model on random blocks and on a block of 0x7fffffff elements, which must
// give seven groups of 'f' nibbles and one group of '7' nibbles.
module tb_data_remap;
  import dsm_pkg::*;
  import dsm_ref_pkg::*;
  int checks = 0, failures = 0;
  block_t din, dout;

  data_remap dut (.din(din), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      din = gen_block(t % 7);
      #1;
      checks++;
      if (dout !== ref_remap(din)) begin
        failures++;
        $display("mismatch on block %0d", t);
      end
    end
    for (int e = 0; e < 32; e++) din[e*32 +: 32] = 32'h7fff_ffff;
    #1;
    for (int g = 0; g < 8; g++) begin
      checks++;
      if (dout[g*128 +: 128] !== {32{(g == 7) ? 4'h7 : 4'hf}}) begin
        failures++;
        $display("group %0d wrong: %h", g, dout[g*128 +: 128]);
      end
    end
    // element 3 nibble 5 lands at remapped nibble 5*32+3
    din = '0;
    din[(3*8 + 5)*4 +: 4] = 4'ha;
    #1;
    checks++;
    if (dout != (block_t'(4'ha) << ((5*32 + 3)*4))) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

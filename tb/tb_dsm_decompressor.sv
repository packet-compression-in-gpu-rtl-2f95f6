// tb_dsm_decompressor: feeds chunks built by the reference compressor (all
// CSN mixes, raw chunks, the all-CSN case) and checks that the restored block
// equals the original one cycle later.
module tb_dsm_decompressor;
  import dsm_pkg::*;
  import dsm_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  chunk_t in_chunk;
  logic out_valid;
  dsm_t out_data;

  dsm_decompressor dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  dsm_t prev_d;
  bit   prev_v;

  initial begin
    repeat (2) @(negedge clk);
    rst_n  = 1;
    prev_v = 0;
    for (int t = 0; t < 800; t++) begin
      block_t b;
      dsm_t d;
      int l;
      b = ref_remap(gen_block(t % 7));
      d = (t % 2 != 0) ? b[BLOCK_BITS-1:DSM_BITS] : b[DSM_BITS-1:0];
      if (t % 17 == 0) for (int s = 0; s < N_SEG; s++) d[s*64 +: 64] = {16{4'($urandom)}};
      if (t % 19 == 0) d[($urandom_range(0, 7))*64 +: 64] = {16{4'($urandom)}};
      in_valid = ($urandom_range(0, 4) != 0);
      ref_compress(d, ($urandom_range(0, 9) == 0), in_chunk, l);
      @(negedge clk);
      checks++;
      if (out_valid !== in_valid || (in_valid && out_data !== d)) begin
        failures++;
        $display("t=%0d mismatch C=%b ES=%b", t, in_chunk[0], in_chunk[8:1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

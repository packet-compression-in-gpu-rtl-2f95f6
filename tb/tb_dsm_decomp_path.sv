// tb_dsm_decomp_path: builds packets with the reference compressor (read
// replies with and without approximation, write replies sent raw) and checks
// that the block coming out one cycle later is the original block, or the
// original with its approximated low bits cleared.
module tb_dsm_decomp_path;
  import dsm_pkg::*;
  import dsm_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  pkt_t in_pkt;
  block_t out_data;

  dsm_decomp_path dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 800; t++) begin
      block_t b, expd;
      int l, bits;
      bit rd;
      b    = gen_block(t % 7);
      bits = (t % 3 == 0) ? 4 * $urandom_range(0, 5) : 0;
      rd   = ($urandom_range(0, 5) != 0);
      ref_packet(b, bits, rd, in_pkt, l);
      // bits of the packet register beyond the packet are left over from
      // earlier packets in a real receiver
      for (int k = l; k < PKT_BITS; k++) in_pkt[k] = 1'($urandom);
      expd = rd ? ref_approx_elems(b, bits) : b;
      in_valid = ($urandom_range(0, 4) != 0);
      @(negedge clk);
      checks++;
      if (out_valid !== in_valid || (in_valid && out_data !== expd)) begin
        failures++;
        $display("t=%0d mismatch (bits=%0d rd=%b)", t, bits, rd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

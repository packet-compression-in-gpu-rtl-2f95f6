// tb_dsm_compressor: compresses remapped halves of generated blocks (all
// patterns, plus blocks with exactly one CSN segment and with none) and
// compares chunk and length with the bit-pointer model. Also checks the
// paper-style example of a block whose segments are all CSN, the raw
// (write-reply) mode, the 2-cycle latency and the hold while en is low.
module tb_dsm_compressor;
  import dsm_pkg::*;
  import dsm_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, en = 1;
  logic in_valid = 0, in_raw = 0;
  dsm_t in_data;
  logic out_valid;
  chunk_t out_chunk;
  logic [9:0] out_len;

  dsm_compressor dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit v; chunk_t c; int l; } exp_t;
  exp_t p1, p2;

  function automatic dsm_t pick_data(input int t);
    block_t b;
    dsm_t d;
    b = ref_remap(gen_block(t % 7));
    d = (t % 2 != 0) ? b[BLOCK_BITS-1:DSM_BITS] : b[DSM_BITS-1:0];
    if (t % 11 == 0) begin              // exactly one CSN segment
      d = {8{$urandom, $urandom}} ^ {16{32'h0123_4567}};
      for (int s = 0; s < N_SEG; s++) d[s*64 +: 4] = 4'(s + 1);
      d[3*64 +: 64] = {16{4'h9}};
    end
    if (t % 13 == 0) begin              // no CSN segment
      for (int s = 0; s < N_SEG; s++) d[s*64 +: 64] = {$urandom | 32'h1, 32'h0};
    end
    return d;
  endfunction

  int lat;
  int n_csn_chunks = 0, n_raw_chunks = 0;

  initial begin
    p1 = '{0, '0, 0};
    p2 = '{0, '0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;

    // all-CSN block: every segment is one nibble repeated
    in_valid = 1;
    for (int s = 0; s < N_SEG; s++) in_data[s*64 +: 64] = {16{4'(s + 6)}};
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    while (!out_valid && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 2) begin failures++; $display("latency %0d, expected 2", lat); end
    checks++;
    if (out_chunk[0] !== 1'b1 || out_chunk[8:1] !== 8'hff || out_len !== 10'(9 + 32)
        || out_chunk[40:9] !== 32'hdcba9876) begin
      failures++;
      $display("all-CSN chunk wrong: len=%0d %h", out_len, out_chunk[63:0]);
    end

    for (int t = 0; t < 600; t++) begin
      exp_t nin;
      chunk_t c;
      int l;
      in_valid = ($urandom_range(0, 3) != 0);
      in_raw   = ($urandom_range(0, 9) == 0);
      en       = (t < 30) ? 1'b1 : ($urandom_range(0, 4) != 0);
      in_data  = pick_data(t);
      ref_compress(in_data, in_raw, c, l);
      nin = '{in_valid, c, l};
      @(posedge clk);
      if (en) begin
        p2 = p1;
        p1 = nin;
      end
      @(negedge clk);
      checks++;
      if (out_valid !== p2.v || (p2.v && (out_chunk !== p2.c || int'(out_len) != p2.l))) begin
        failures++;
        $display("t=%0d mismatch len=%0d exp=%0d", t, out_len, p2.l);
      end
      if (out_valid && en) begin
        if (out_chunk[0]) n_csn_chunks++; else n_raw_chunks++;
      end
    end
    checks++;
    if (n_csn_chunks == 0 || n_raw_chunks == 0) begin
      failures++;
      $display("coverage: compressed=%0d raw=%0d", n_csn_chunks, n_raw_chunks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

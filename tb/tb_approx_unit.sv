// tb_approx_unit: programs the approximation map (overlapping ranges,
// numbers 4/8/12/20, a number that is not a multiple of 4, one above 20, an
// unused entry), streams random remapped blocks with random addresses, and
// compares the output with a model that clears the lowest nibble groups.
// Checks the 2-cycle latency, the priority of lower entries, in_allow and
// the hold of both stages while en is low.
module tb_approx_unit;
  import dsm_pkg::*;
  import dsm_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, en = 1;
  logic map_we = 0;
  logic [2:0]  map_idx;
  logic [31:0] map_start, map_end;
  logic [4:0]  map_bits;
  logic        in_valid = 0, in_allow = 1;
  logic [31:0] in_addr;
  block_t      in_data, out_data;
  logic        out_valid, out_approx;

  approx_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference map: start, end, bits
  int unsigned rs [8] = '{32'h1000, 32'h1800, 32'h5000, 32'h6000, 32'h7000, 32'h8000, 32'h0, 32'h0};
  int unsigned re [8] = '{32'h1fff, 32'h2fff, 32'h5000, 32'h6fff, 32'h7fff, 32'h8fff, 32'h0, 32'h0};
  int          rb [8] = '{12, 8, 20, 6, 31, 0, 0, 0};
  int unsigned addrs [10] = '{32'h1000, 32'h1fff, 32'h1800, 32'h2000, 32'h2fff,
                              32'h5000, 32'h5001, 32'h6004, 32'h7abc, 32'h8010};

  function automatic int bits_for(input int unsigned a);
    for (int e = 0; e < 8; e++)
      if (rb[e] != 0 && a >= rs[e] && a <= re[e]) return rb[e];
    return 0;
  endfunction

  // expected pipeline contents, advanced on enabled edges
  typedef struct { bit v; bit apx; block_t d; } exp_t;
  exp_t p1, p2;
  int   lat_start, lat_seen;

  initial begin
    p1 = '{0, 0, '0};
    p2 = '{0, 0, '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < 8; e++) begin
      @(negedge clk);
      map_we = 1; map_idx = 3'(e); map_start = rs[e]; map_end = re[e]; map_bits = 5'(rb[e]);
    end
    @(negedge clk);
    map_we = 0;

    // latency: one block, en held high
    in_valid = 1; in_addr = 32'h1000; in_data = gen_block(5);
    lat_start = 0; lat_seen = -1;
    @(negedge clk);
    in_valid = 0;
    for (int c = 1; c < 6; c++) begin
      if (out_valid && lat_seen < 0) lat_seen = c;
      @(negedge clk);
    end
    checks++;
    if (lat_seen != 2) begin failures++; $display("latency %0d, expected 2", lat_seen); end

    for (int t = 0; t < 400; t++) begin
      exp_t nin;
      int bits;
      in_valid = ($urandom_range(0, 3) != 0);
      in_allow = ($urandom_range(0, 5) != 0);
      en       = (t < 20) ? 1'b1 : ($urandom_range(0, 4) != 0);
      in_addr  = addrs[$urandom_range(0, 9)];
      in_data  = gen_block($urandom_range(0, 6));
      bits     = in_allow ? bits_for(in_addr) : 0;
      nin      = '{in_valid, bits >= 4, ref_approx(in_data, bits)};
      @(posedge clk);
      if (en) begin
        p2 = p1;
        p1 = nin;
      end
      @(negedge clk);
      checks++;
      if (out_valid !== p2.v || (p2.v && (out_data !== p2.d || out_approx !== p2.apx))) begin
        failures++;
        $display("t=%0d mismatch valid=%b/%b apx=%b/%b", t, out_valid, p2.v, out_approx, p2.apx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dsm_comp_path: programs two approximable ranges (12 and 4 bits), then
// streams read and write replies of all data patterns while the output side
// randomly refuses packets. Every packet is compared with the full reference
// (remap, approximate, two DSM chunks back to back). Checks the 4-cycle
// latency, that a refused packet is held and in_ready drops, and that write
// replies are never approximated or compressed.
module tb_dsm_comp_path;
  import dsm_pkg::*;
  import dsm_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic map_we = 0;
  logic [2:0] map_idx = '0;
  logic [31:0] map_start = '0, map_end = '0;
  logic [4:0] map_bits = '0;
  logic in_valid = 0, in_ready, in_read = 1;
  logic [31:0] in_addr;
  block_t in_data;
  logic out_valid, out_ready = 1, out_approx;
  pkt_t out_pkt;
  logic [PKT_LEN_W-1:0] out_len;

  dsm_comp_path dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { pkt_t p; int l; bit apx; } exp_t;
  exp_t exp_q[$];
  int n_apx = 0, n_comp = 0, n_raw_wr = 0, n_stall = 0;

  function automatic int bits_for(input logic [31:0] a);
    if (a >= 32'h4000_0000 && a < 32'h4001_0000) return 12;
    if (a >= 32'h5000_0000 && a < 32'h5001_0000) return 4;
    return 0;
  endfunction

  task automatic offer(input logic [31:0] a, input block_t d, input bit rd);
    exp_t e;
    in_valid = 1; in_addr = a; in_data = d; in_read = rd;
    ref_packet(d, bits_for(a), rd, e.p, e.l);
    e.apx = rd && bits_for(a) > 0;
    exp_q.push_back(e);
  endtask

  initial begin
    int lat;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    map_we = 1; map_idx = 3'd2; map_start = 32'h4000_0000; map_end = 32'h4000_ffff; map_bits = 5'd12;
    @(negedge clk);
    map_idx = 3'd5; map_start = 32'h5000_0000; map_end = 32'h5000_ffff; map_bits = 5'd4;
    @(negedge clk);
    map_we = 0;

    // latency of one packet
    offer(32'h4000_0080, gen_block(4), 1);
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    while (!out_valid && lat < 20) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 4) begin failures++; $display("latency %0d, expected 4", lat); end
    checks++;
    if (out_pkt !== exp_q[0].p || int'(out_len) != exp_q[0].l || !out_approx) failures++;
    void'(exp_q.pop_front());
    @(negedge clk);

    for (int t = 0; t < 1500; t++) begin
      bit acc_in, acc_out;
      if (!in_valid || in_ready) begin
        if ($urandom_range(0, 3) != 0) begin
          logic [31:0] a;
          case ($urandom_range(0, 2))
            0: a = 32'h4000_0000 + 32'($urandom_range(0, 511)) * 128;
            1: a = 32'h5000_0000 + 32'($urandom_range(0, 511)) * 128;
            default: a = 32'h1000_0000 + 32'($urandom_range(0, 511)) * 128;
          endcase
          in_valid = 1; in_addr = a; in_data = gen_block($urandom_range(0, 6));
          in_read = ($urandom_range(0, 7) != 0);
        end else begin
          in_valid = 0;
        end
      end
      out_ready = ($urandom_range(0, 4) != 0);
      #1;
      acc_in  = in_valid && in_ready;
      acc_out = out_valid && out_ready;
      if (out_valid && !out_ready) n_stall++;
      if (acc_in) begin
        exp_t e;
        ref_packet(in_data, bits_for(in_addr), in_read, e.p, e.l);
        e.apx = in_read && bits_for(in_addr) > 0;
        exp_q.push_back(e);
      end
      if (acc_out) begin
        checks++;
        if (exp_q.size() == 0 || out_pkt !== exp_q[0].p || int'(out_len) != exp_q[0].l
            || out_approx !== exp_q[0].apx) begin
          failures++;
          $display("t=%0d packet mismatch len=%0d exp=%0d", t, out_len, (exp_q.size() > 0) ? exp_q[0].l : -1);
        end
        if (out_approx) n_apx++;
        if (out_pkt[0]) n_comp++;
        if (!exp_q[0].apx && out_len == 11'(2 * CHUNK_BITS)) n_raw_wr++;
        void'(exp_q.pop_front());
      end
      @(negedge clk);
    end
    checks++;
    if (n_apx == 0 || n_comp == 0 || n_raw_wr == 0 || n_stall == 0) begin
      failures++;
      $display("coverage apx=%0d comp=%0d raw=%0d stall=%0d", n_apx, n_comp, n_raw_wr, n_stall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

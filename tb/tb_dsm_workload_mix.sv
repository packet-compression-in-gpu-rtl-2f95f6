// tb_dsm_workload_mix: packet compression rate of the full-size reply path
// on synthetic data classes standing in for the evaluated benchmark types.
//
//   INT     integer replies mixing the four redundancy patterns in the
//           proportions reported for integer GPU workloads: all zeros 19.7%,
//           narrow values 41.5%, repeated values 18.5%, similar values 20.3%
//   FP      single-precision replies with non-zero, nearby values, sent
//           precise, with 12 approximation bits and with 20 approximation bits
//
// Every block is checked at the SM side (original, or with its low bits
// cleared when approximated). The rate is 1 - flits / (4 per reply). The
// test requires the INT class and the approximated FP classes to lower the
// flit count, precise FP never to raise it, and more approximation bits to
// compress FP better; it prints the rates. (Precise FP of this kind saves
// only the sign/exponent group, about 110 of 1024 bits, which does not free a
// whole 32-byte flit.)
module tb_dsm_workload_mix;
  import dsm_pkg::*;
  import dsm_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic map_we = 0;
  logic [2:0]  map_idx = '0;
  logic [31:0] map_start = '0, map_end = '0;
  logic [4:0]  map_bits = '0;
  logic mc_reply_valid = 0, mc_reply_ready, mc_reply_read = 1;
  logic [31:0] mc_reply_addr = '0;
  block_t mc_reply_data = '0;
  logic mc_flit_valid, mc_flit_head, mc_flit_tail;
  logic [FLIT_BITS-1:0] mc_flit_data;
  logic sm_flit_ready, sm_valid, mc_pkt_approx;
  block_t sm_data;
  logic [2:0] sm_nflits;

  // the crossbar is a wire here: flits go straight to the SM side
  dsm_packet_top dut (
    .clk, .rst_n, .map_we, .map_idx, .map_start, .map_end, .map_bits,
    .mc_reply_valid, .mc_reply_ready, .mc_reply_read, .mc_reply_addr, .mc_reply_data,
    .mc_flit_valid, .mc_flit_ready(1'b1), .mc_flit_data, .mc_flit_head, .mc_flit_tail,
    .sm_flit_valid(mc_flit_valid), .sm_flit_ready, .sm_flit_data(mc_flit_data),
    .sm_flit_head(mc_flit_head), .sm_flit_tail(mc_flit_tail),
    .sm_valid, .sm_data, .sm_nflits, .mc_pkt_approx);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N_PER_CLASS = 500;
  typedef struct { block_t d; int cls; } exp_t;
  exp_t exp_q[$];
  int flits [4], blocks [4];
  string names [4] = '{"INT mix", "FP precise", "FP 12 bits", "FP 20 bits"};

  always @(negedge clk) begin
    if (rst_n && sm_valid) begin
      exp_t e;
      checks++;
      e = exp_q.pop_front();
      if (sm_data !== e.d) begin
        failures++;
        $display("class %s: block wrong", names[e.cls]);
      end
      flits[e.cls]  += int'(sm_nflits);
      blocks[e.cls] += 1;
    end
  end

  bit taken;
  always @(posedge clk) taken <= mc_reply_valid && mc_reply_ready;

  function automatic block_t int_block();
    int r;
    r = $urandom_range(0, 999);
    if (r < 197) return gen_block(0);
    if (r < 197 + 415) return gen_block(2);
    if (r < 197 + 415 + 185) return gen_block(1);
    return gen_block(3);
  endfunction

  initial begin
    real rate [4];
    repeat (3) @(negedge clk);
    rst_n = 1;
    map_we = 1; map_idx = 3'd0; map_start = 32'h4000_0000; map_end = 32'h4fff_ffff; map_bits = 5'd12;
    @(negedge clk);
    map_idx = 3'd1; map_start = 32'h5000_0000; map_end = 32'h5fff_ffff; map_bits = 5'd20;
    @(negedge clk);
    map_we = 0;
    for (int cls = 0; cls < 4; cls++) begin
      for (int n = 0; n < N_PER_CLASS; n++) begin
        int bits;
        logic [31:0] base;
        base = (cls == 2) ? 32'h4000_0000 : (cls == 3) ? 32'h5000_0000 : 32'h2000_0000;
        bits = (cls == 2) ? 12 : (cls == 3) ? 20 : 0;
        mc_reply_valid = 1;
        mc_reply_read  = 1;
        mc_reply_addr  = base + 32'(n) * 128;
        mc_reply_data  = (cls == 0) ? int_block() : gen_block(4);
        exp_q.push_back('{ref_approx_elems(mc_reply_data, bits), cls});
        @(negedge clk);
        while (!taken) @(negedge clk);
      end
    end
    mc_reply_valid = 0;
    repeat (50) @(negedge clk);
    for (int c = 0; c < 4; c++) begin
      rate[c] = 1.0 - real'(flits[c]) / (4.0 * blocks[c]);
      $display("%-10s %0d replies, %0.2f flits per reply, compression rate %0.1f%%",
               names[c], blocks[c], real'(flits[c]) / blocks[c], 100.0 * rate[c]);
      checks++;
      if (blocks[c] != N_PER_CLASS || rate[c] < 0.0 || (c != 1 && rate[c] <= 0.0)) failures++;
    end
    checks++;
    if (!(rate[2] > rate[1] && rate[3] > rate[2])) begin
      failures++;
      $display("approximation did not raise the FP compression rate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

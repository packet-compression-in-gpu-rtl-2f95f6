// tb_flit_packetizer: offers packets of random lengths (1 bit to the full
// 1026 bits, including the lengths of real DSM packets) while the network
// side randomly refuses flits. Checks the number of flits per packet
// (ceil(len/256)), head/tail marking, flit contents with zero padding, that
// a refused flit is held, and that back-to-back packets leave no idle cycle.
module tb_flit_packetizer;
  import dsm_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [PKT_BITS-1:0] in_pkt;
  logic [PKT_LEN_W-1:0] in_len;
  logic flit_valid, flit_ready = 0, flit_head, flit_tail;
  logic [FLIT_BITS-1:0] flit_data;

  flit_packetizer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected flit stream
  typedef struct { logic [FLIT_BITS-1:0] d; bit h, t; } flit_t;
  flit_t exp_q[$];
  int n_pkts = 0, n_stall = 0, n_gapless = 0;

  task automatic push_expected(input logic [PKT_BITS-1:0] p, input int len);
    int nf;
    logic [5*FLIT_BITS-1:0] padded;
    padded = '0;
    for (int k = 0; k < len; k++) padded[k] = p[k];
    nf = (len + FLIT_BITS - 1) / FLIT_BITS;
    for (int f = 0; f < nf; f++) exp_q.push_back('{padded[f*FLIT_BITS +: FLIT_BITS], f == 0, f == nf - 1});
  endtask

  initial begin
    int lens[6];
    lens = '{1, 256, 257, 513, 1026, 9 + 32 + 513};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      bit acc_pkt, acc_flit;
      if (!in_valid || in_ready) begin
        in_valid = (n_pkts < 300) && ($urandom_range(0, 3) != 0);
        for (int w = 0; w < PKT_BITS / 32 + 1; w++) in_pkt[w*32 +: 32] = $urandom;
        in_len = PKT_LEN_W'((t % 3 == 0) ? lens[$urandom_range(0, 5)] : $urandom_range(1, PKT_BITS));
      end
      flit_ready = ($urandom_range(0, 3) != 0);
      #1;
      if (flit_valid) begin
        checks++;
        if (exp_q.size() == 0 || flit_data !== exp_q[0].d || flit_head !== exp_q[0].h
            || flit_tail !== exp_q[0].t) begin
          failures++;
          $display("t=%0d flit mismatch head=%b tail=%b", t, flit_head, flit_tail);
        end
        if (!flit_ready) n_stall++;
        if (flit_ready && flit_tail && in_valid && in_ready) n_gapless++;
      end
      acc_pkt  = in_valid && in_ready;
      acc_flit = flit_valid && flit_ready;
      @(posedge clk);
      if (acc_flit && exp_q.size() > 0) void'(exp_q.pop_front());
      if (acc_pkt) begin push_expected(in_pkt, int'(in_len)); n_pkts++; end
      @(negedge clk);
    end
    checks++;
    if (n_pkts < 100 || n_stall == 0 || n_gapless == 0) begin
      failures++;
      $display("coverage pkts=%0d stalls=%0d gapless=%0d", n_pkts, n_stall, n_gapless);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

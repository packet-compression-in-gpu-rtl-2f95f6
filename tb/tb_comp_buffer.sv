// tb_comp_buffer: random pushes and pops against a queue model; checks
// order, data, full/empty flags and the occupancy count, and that the
// buffer both fills up and drains completely at least once.
module tb_comp_buffer;
  localparam int W = 40, DEPTH = 4;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [W-1:0] in_data, out_data;
  logic [2:0] count;

  comp_buffer #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] q[$];
  int n_full = 0, n_empty = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      bit wr, rd;
      in_valid  = ($urandom_range(0, 99) < (((t / 200) % 2 != 0) ? 30 : 70));
      out_ready = ($urandom_range(0, 99) < (((t / 200) % 2 != 0) ? 70 : 30));
      in_data   = {8'($urandom), $urandom};
      #1;
      checks++;
      if (in_ready !== (q.size() < DEPTH) || out_valid !== (q.size() > 0)
          || int'(count) != q.size() || (out_valid && out_data !== q[0])) begin
        failures++;
        $display("t=%0d size=%0d count=%0d ready=%b valid=%b", t, q.size(), count, in_ready, out_valid);
      end
      if (q.size() == DEPTH) n_full++;
      if (q.size() == 0) n_empty++;
      wr = in_valid && in_ready;
      rd = out_valid && out_ready;
      @(posedge clk);
      if (rd) void'(q.pop_front());
      if (wr) q.push_back(in_data);
      @(negedge clk);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_flit_depacketizer: sends packets of 1 to 5 flits with random idle
// cycles between flits and checks the recombined packet, its flit count and
// that out_valid pulses exactly once per packet, one cycle after the tail.
module tb_flit_depacketizer;
  import dsm_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic flit_valid = 0, flit_ready, flit_head = 0, flit_tail = 0;
  logic [FLIT_BITS-1:0] flit_data;
  logic out_valid;
  logic [PKT_BITS-1:0] out_pkt;
  logic [2:0] out_nflits;

  flit_depacketizer dut (.*);

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
    for (int p = 0; p < 300; p++) begin
      int nf;
      logic [5*FLIT_BITS-1:0] full;
      nf = $urandom_range(1, 5);
      full = '0;
      for (int f = 0; f < nf; f++) begin
        for (int w = 0; w < FLIT_BITS / 32; w++) full[f*FLIT_BITS + w*32 +: 32] = $urandom;
        if (f == 4) full[5*FLIT_BITS-1:PKT_BITS] = '0;
      end
      for (int f = 0; f < nf; f++) begin
        while ($urandom_range(0, 2) == 0) begin
          flit_valid = 0;
          @(negedge clk);
          checks++;
          if (out_valid && f != 0) failures++;
        end
        flit_valid = 1;
        flit_head  = (f == 0);
        flit_tail  = (f == nf - 1);
        flit_data  = full[f*FLIT_BITS +: FLIT_BITS];
        checks++;
        if (flit_ready !== 1'b1) failures++;
        @(negedge clk);
      end
      flit_valid = 0;
      checks++;
      if (out_valid !== 1'b1 || out_pkt !== full[PKT_BITS-1:0] || int'(out_nflits) != nf) begin
        failures++;
        $display("packet %0d (%0d flits) wrong", p, nf);
      end
      @(negedge clk);
      checks++;
      if (out_valid !== 1'b0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_var_concat: packs random fields of random lengths (with garbage above
// each length) and compares with a bit-by-bit append.
module tb_var_concat;
  localparam int AW = 64, BW = 64, LW = 8;
  int checks = 0, failures = 0;
  logic [AW-1:0]    a;
  logic [BW-1:0]    b;
  logic [LW-1:0]    a_len, b_len, y_len;
  logic [AW+BW-1:0] y, exp_y;

  var_concat #(.AW(AW), .BW(BW), .LW(LW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      a     = {$urandom, $urandom};
      b     = {$urandom, $urandom};
      a_len = LW'((t % 3 == 0) ? 4 : (t % 3 == 1) ? 64 : $urandom_range(0, AW));
      b_len = LW'((t % 2 == 0) ? 4 : $urandom_range(0, BW));
      #1;
      exp_y = '0;
      for (int k = 0; k < a_len; k++) exp_y[k] = a[k];
      for (int k = 0; k < b_len; k++) exp_y[int'(a_len) + k] = b[k];
      checks++;
      if (y !== exp_y || y_len !== LW'(a_len + b_len)) begin
        failures++;
        $display("a_len=%0d b_len=%0d y=%h exp=%h", a_len, b_len, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

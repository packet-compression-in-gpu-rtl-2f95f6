// tb_csn_detector: drives CSN segments of every nibble value, segments with
// one nibble changed at every position, and random segments; compares the
// CSN flag and code with a direct comparison model.
module tb_csn_detector;
  import dsm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [63:0] seg;
  logic        csn;
  logic [3:0]  code;

  csn_detector dut (.seg(seg), .csn(csn), .code(code));

  task automatic check(input logic [63:0] s);
    seg = s;
    #1;
    checks++;
    if (csn !== is_csn(s) || (csn && code !== s[3:0])) begin
      failures++;
      $display("seg %h: csn=%b code=%h", s, csn, code);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      check({16{4'(v)}});
      for (int k = 0; k < 16; k++) begin
        logic [63:0] s;
        s = {16{4'(v)}};
        s[k*4 +: 4] = 4'(v) ^ 4'(1 + (k % 15));
        check(s);
      end
    end
    for (int t = 0; t < 200; t++) check({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_or_prefix: the Sklansky OR prefix against a ripple OR chain, at the
// block size (177) and at the 16-bit size of the worked example.
module tb_or_prefix;
  int checks = 0, failures = 0;
  logic [176:0] a, s;
  logic [15:0]  a16, s16;

  or_prefix #(.N(177)) dut   (.a(a),   .s(s));
  or_prefix #(.N(16))  dut16 (.a(a16), .s(s16));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [176:0] v);
    logic acc;
    logic [176:0] ref_s;
    logic [15:0]  ref16;
    a = v; a16 = v[15:0]; #1;
    acc = 1'b0;
    for (int i = 0; i < 177; i++) begin acc |= v[i]; ref_s[i] = acc; end
    acc = 1'b0;
    for (int i = 0; i < 16; i++) begin acc |= v[i]; ref16[i] = acc; end
    checks++;
    if (s != ref_s || s16 != ref16) begin
      failures++;
      $display("prefix mismatch for %h", v);
    end
  endtask

  initial begin
    try('0);
    for (int i = 0; i < 177; i++) try(177'(1) << i);
    for (int t = 0; t < 300; t++) begin
      logic [176:0] v;
      v = '0;
      for (int k = 0; k < 1 + $urandom_range(3); k++) v[$urandom_range(176)] = 1'b1;
      try(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tec_encoder: check bits of random and corner-case 708-bit messages
// against a reference Hamming code built by enumerating positions.
module tb_tec_encoder;
  import tlc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [MSG_BITS-1:0] msg;
  logic [CHECK_BITS-1:0] chk;

  tec_encoder dut (.msg(msg), .check(chk));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [MSG_BITS-1:0] m);
    msg = m;
    #1;
    checks++;
    if (chk != ham_check(m)) begin
      failures++;
      $display("check %h, expected %h", chk, ham_check(m));
    end
  endtask

  initial begin
    try('0);
    try('1);
    for (int k = 0; k < MSG_BITS; k += 7) try(MSG_BITS'(1) << k);
    try(MSG_BITS'(1) << (MSG_BITS - 1));
    for (int i = 0; i < 200; i++) begin
      logic [MSG_BITS-1:0] m;
      for (int w = 0; w < 23; w++) m[32*w +: 32] = $urandom;
      m[MSG_BITS-1 -: 4] = 4'($urandom);
      try(m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tec_decoder: clean codewords, every single-bit error in message and
// check bits (for a sample of messages), and double errors, against the
// reference Hamming code.
module tb_tec_decoder;
  import tlc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [MSG_BITS-1:0] mi, mo;
  logic [CHECK_BITS-1:0] ci, syn;
  logic corr, unc;

  tec_decoder dut (.msg_in(mi), .check_in(ci), .msg_out(mo), .syndrome(syn),
                   .corrected(corr), .uncorrectable(unc));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [MSG_BITS-1:0] rmsg();
    logic [MSG_BITS-1:0] m;
    for (int w = 0; w < 23; w++) m[32*w +: 32] = $urandom;
    m[MSG_BITS-1 -: 4] = 4'($urandom);
    return m;
  endfunction

  initial begin
    for (int t = 0; t < 4; t++) begin
      logic [MSG_BITS-1:0] m;
      logic [CHECK_BITS-1:0] c;
      m = rmsg();
      c = ham_check(m);
      mi = m; ci = c; #1;
      checks++;
      if (mo != m || corr || unc) failures++;
      for (int k = 0; k < MSG_BITS; k++) begin
        mi = m ^ (MSG_BITS'(1) << k); ci = c; #1;
        checks++;
        if (mo != m || !corr || unc || syn != CHECK_BITS'(ham_pos(k))) begin
          failures++;
          if (failures < 5) $display("msg bit %0d not corrected", k);
        end
      end
      for (int k = 0; k < CHECK_BITS; k++) begin
        mi = m; ci = c ^ (CHECK_BITS'(1) << k); #1;
        checks++;
        if (mo != m || !corr || unc) failures++;
      end
    end
    // two errors: never reported as clean
    for (int t = 0; t < 300; t++) begin
      logic [MSG_BITS-1:0] m;
      int a, b;
      m = rmsg();
      a = $urandom_range(MSG_BITS-1);
      do b = $urandom_range(MSG_BITS-1); while (b == a);
      mi = m ^ (MSG_BITS'(1) << a) ^ (MSG_BITS'(1) << b); ci = ham_check(m); #1;
      checks++;
      if (!corr && !unc) failures++;
      if (32'(syn) > 718 && !unc) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

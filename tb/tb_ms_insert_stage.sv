// tb_ms_insert_stage: one write-side mark-and-spare stage against a scalar
// reference: INV at the lowest masked slot, the slots above it shifted up.
module tb_ms_insert_stage;
  import tlc_pkg::*;
  int checks = 0, failures = 0;
  pair_sym_t [176:0] sin, sout;
  logic [176:0] min, mout;

  ms_insert_stage #(.N(177)) dut (.slots_in(sin), .mask_in(min), .slots_out(sout), .mask_out(mout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      int first;
      logic [176:0] mref;
      for (int i = 0; i < 177; i++) sin[i] = '{inv: 1'b0, data: 3'($urandom)};
      min = '0;
      if (t < 177) min[t] = 1'b1;
      else if (t > 180) for (int k = 0; k < 3; k++) min[$urandom_range(176)] = 1'b1;
      #1;
      first = -1;
      for (int i = 176; i >= 0; i--) if (min[i]) first = i;
      mref = min;
      if (first >= 0) mref[first] = 1'b0;
      checks++;
      if (mout != mref) failures++;
      for (int j = 0; j < 177; j++) begin
        pair_sym_t e;
        if (first < 0 || j < first) e = sin[j];
        else if (j == first)        e = '{inv: 1'b1, data: 3'b000};
        else                        e = sin[j-1];
        checks++;
        if (sout[j] != e) begin
          failures++;
          if (failures < 5) $display("t=%0d j=%0d first=%0d mismatch", t, j, first);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ms_remove_stage: one mark-and-spare removal stage at block size (177
// pairs in, 176 out) against a scalar reference: drop the first INV pair,
// or the last pair when none is marked.
module tb_ms_remove_stage;
  import tlc_pkg::*;
  int checks = 0, failures = 0;
  pair_sym_t [176:0] pin;
  pair_sym_t [175:0] pout;

  ms_remove_stage #(.N(177)) dut (.pairs_in(pin), .pairs_out(pout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      int drop;
      int nmark;
      nmark = (t < 20) ? 0 : $urandom_range(3);
      for (int i = 0; i < 177; i++) pin[i] = '{inv: 1'b0, data: 3'($urandom)};
      for (int k = 0; k < nmark; k++) pin[$urandom_range(176)].inv = 1'b1;
      if (t >= 20 && t < 197) begin          // a single mark at every position
        for (int i = 0; i < 177; i++) pin[i].inv = 1'b0;
        pin[t-20].inv = 1'b1;
      end
      #1;
      drop = 176;
      for (int i = 176; i >= 0; i--) if (pin[i].inv) drop = i;
      for (int j = 0; j < 176; j++) begin
        checks++;
        if (pout[j] != pin[(j < drop) ? j : j + 1]) begin
          failures++;
          if (failures < 5) $display("t=%0d j=%0d drop=%0d mismatch", t, j, drop);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

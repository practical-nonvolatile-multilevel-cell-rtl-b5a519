// tb_ms_corrector: six-stage mark-and-spare correction. Random blocks are
// laid out with the reference placement for 0..6 marked pairs (any
// positions, spares included) and must come back as the original symbols;
// seven or more marks must raise 'uncorrectable'.
module tb_ms_corrector;
  import tlc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  pair_sym_t [176:0] pin;
  pair_sym_t [170:0] pout;
  logic unc;
  logic [7:0] marks;

  ms_corrector dut (.pairs_in(pin), .pairs_out(pout), .uncorrectable(unc), .marks(marks));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      logic [511:0] d;
      logic [176:0] m;
      int rows [177];
      bit ok;
      int nm;
      logic [512:0] dd;
      nm = t % 9;                 // 0..8 marks
      d = rand512();
      m = rand_marks(nm);
      ref_layout(d, m, rows, ok);
      for (int p = 0; p < 177; p++)
        pin[p] = (rows[p] == 8) ? '{inv: 1'b1, data: 3'b000} : '{inv: 1'b0, data: 3'(rows[p])};
      #1;
      checks++;
      if (marks != 8'(nm)) failures++;
      checks++;
      if (unc != (nm > 6)) begin
        failures++;
        $display("t=%0d marks=%0d unc=%b", t, nm, unc);
      end
      if (nm <= 6) begin
        dd = {1'b0, d};
        for (int i = 0; i < 171; i++) begin
          checks++;
          if (pout[i].inv || pout[i].data != dd[3*i +: 3]) begin
            failures++;
            if (failures < 5) $display("t=%0d sym %0d wrong", t, i);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

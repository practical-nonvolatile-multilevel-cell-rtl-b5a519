// tb_ms_placer: write-side placement of 171 symbols over 177 slots against
// the reference layout for 0..8 marks; more than six must overflow.
module tb_ms_placer;
  import tlc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  pair_sym_t [170:0] din;
  logic [176:0] m;
  pair_sym_t [176:0] sout;
  logic ovf;

  ms_placer dut (.data_in(din), .marks(m), .slots_out(sout), .overflow(ovf));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      logic [511:0] d;
      logic [512:0] dd;
      int rows [177];
      bit ok;
      int nm;
      nm = t % 9;
      d = rand512();
      dd = {1'b0, d};
      for (int i = 0; i < 171; i++) din[i] = '{inv: 1'b0, data: dd[3*i +: 3]};
      m = rand_marks(nm);
      if (t == 1) m = 177'(1) << 176;           // mark on the last spare
      ref_layout(d, m, rows, ok);
      #1;
      checks++;
      if (ovf != (nm > 6)) failures++;
      if (nm <= 6) begin
        for (int p = 0; p < 177; p++) begin
          checks++;
          if ((rows[p] == 8) ? !sout[p].inv : (sout[p].inv || sout[p].data != 3'(rows[p]))) begin
            failures++;
            if (failures < 5) $display("t=%0d slot %0d wrong", t, p);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

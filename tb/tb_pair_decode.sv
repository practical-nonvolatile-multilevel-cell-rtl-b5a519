// tb_pair_decode: exhaustive check of the 3-ON-2 pair decoder against the
// example state table, including the INV state and the unused cell code 10.
module tb_pair_decode;
  import tlc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [1:0] c0, c1;
  pair_sym_t sym;

  pair_decode dut (.cell0(c0), .cell1(c1), .sym(sym));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 9; r++) begin
      c0 = code_of(T_FIRST[r]);
      c1 = code_of(T_SECOND[r]);
      #1;
      checks++;
      if (r == 8) begin
        if (!sym.inv) begin failures++; $display("row 8 not INV"); end
      end else if (sym.inv || sym.data != 3'(r)) begin
        failures++;
        $display("row %0d: got inv=%b data=%0d", r, sym.inv, sym.data);
      end
    end
    // code 10 reads as S4
    for (int s = 0; s < 3; s++) begin
      c0 = 2'b10; c1 = code_of(s); #1;
      checks++;
      if (s == 2 ? !sym.inv : (sym.inv || sym.data != 3'(6 + s))) failures++;
      c0 = code_of(s); c1 = 2'b10; #1;
      checks++;
      if (s == 2 ? !sym.inv : (sym.inv || sym.data != 3'(3 * s + 2))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pair_encode: exhaustive check of the 3-ON-2 pair encoder against the
// example state table, and of the INV mark (both cells S4).
module tb_pair_encode;
  import tlc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  pair_sym_t sym;
  logic [1:0] c0, c1;

  pair_encode dut (.sym(sym), .cell0(c0), .cell1(c1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 9; r++) begin
      sym.inv  = (r == 8);
      sym.data = (r == 8) ? 3'($urandom) : 3'(r);
      #1;
      checks++;
      if (c0 != code_of(T_FIRST[r]) || c1 != code_of(T_SECOND[r])) begin
        failures++;
        $display("row %0d: got %b %b", r, c0, c1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// pair_encode: 3-ON-2 symbol encoder for one pair of ternary cells.
//
// A 3-bit value v is written as the ternary digits f = v / 3 (first cell)
// and s = v % 3 (second cell), S1 = 0, S2 = 1, S4 = 2. An INV symbol is
// written as both cells in S4, the mark of a worn-out pair; S4 is the state
// a stuck-reset cell already holds and the one a stuck-set cell is forced
// into by a reverse-current pulse. Purely combinational.
module pair_encode
  import tlc_pkg::*;
(
  input  pair_sym_t  sym,
  output logic [1:0] cell0,
  output logic [1:0] cell1
);
  logic [1:0] f, s;

  always_comb begin
    if (sym.inv) begin
      f = 2'd2;
      s = 2'd2;
    end else begin
      f = 2'(sym.data / 3'd3);
      s = 2'(sym.data % 3'd3);
    end
    cell0 = trit_to_cell(f);
    cell1 = trit_to_cell(s);
  end
endmodule

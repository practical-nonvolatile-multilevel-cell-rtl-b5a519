// pair_decode: 3-ON-2 symbol decoder for one pair of ternary cells.
//
// The two cells are read as ternary digits f (first cell) and s (second
// cell), S1 = 0, S2 = 1, S4 = 2. The eight valid states carry the value
// 3*f + s (0..7), which is exactly the example state table of the 3-ON-2
// scheme; the ninth state, both cells in S4, is the INV mark that flags a
// pair holding a worn-out cell. Purely combinational. Inputs use the 2-bit
// cell codes of tlc_pkg; the unused code 10 is read as S4.
module pair_decode
  import tlc_pkg::*;
(
  input  logic [1:0] cell0,   // first cell of the pair
  input  logic [1:0] cell1,   // second cell of the pair
  output pair_sym_t  sym
);
  logic [1:0] f, s;
  logic [3:0] v;

  always_comb begin
    f = cell_to_trit(cell0);
    s = cell_to_trit(cell1);
    v = 4'(3 * f) + 4'(s);
    sym.inv  = (v == 4'd8);
    sym.data = sym.inv ? 3'b000 : v[2:0];
  end
endmodule

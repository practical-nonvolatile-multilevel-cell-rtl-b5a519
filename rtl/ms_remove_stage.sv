// ms_remove_stage: one correction stage of mark-and-spare (read side).
//
// N decoded pairs come in, N-1 go out. The INV flags feed an OR-prefix
// (s[j] = inv[0] | ... | inv[j]); output j takes input j+1 when s[j] is set
// and input j otherwise. The first INV pair is thereby thrown out and every
// pair after it moves down by one; with no INV pair at all the last pair
// (an unused spare) is dropped. The selects are made from the flags alone,
// no pointer or position is stored. Purely combinational; the depth is one
// prefix tree plus one 2:1 MUX.
module ms_remove_stage
  import tlc_pkg::*;
#(
  parameter int unsigned N = PAIRS
) (
  input  pair_sym_t [N-1:0] pairs_in,
  output pair_sym_t [N-2:0] pairs_out
);
  logic [N-1:0] inv, sel;

  always_comb
    for (int i = 0; i < N; i++) inv[i] = pairs_in[i].inv;

  or_prefix #(.N(N)) u_chain (.a(inv), .s(sel));

  always_comb
    for (int j = 0; j < N - 1; j++)
      pairs_out[j] = sel[j] ? pairs_in[j+1] : pairs_in[j];
endmodule

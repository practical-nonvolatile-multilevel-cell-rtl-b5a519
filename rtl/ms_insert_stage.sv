// ms_insert_stage: one write-side stage of mark-and-spare, the mirror image
// of ms_remove_stage.
//
// The stage sees the full row of N pair slots and a mask of slots that are
// marked as worn out and not yet handled by an earlier stage. An OR-prefix of
// the mask finds the lowest such slot m; slot m receives the INV mark, every
// slot above m takes the symbol of the slot below it, and the symbol of the
// top slot (an unused spare filler) falls off. The handled bit is cleared in
// mask_out. A stage with an empty mask passes the row through. Purely
// combinational.
module ms_insert_stage
  import tlc_pkg::*;
#(
  parameter int unsigned N = PAIRS
) (
  input  pair_sym_t [N-1:0] slots_in,
  input  logic [N-1:0]      mask_in,
  output pair_sym_t [N-1:0] slots_out,
  output logic [N-1:0]      mask_out
);
  logic [N-1:0] pre, first;

  or_prefix #(.N(N)) u_chain (.a(mask_in), .s(pre));

  always_comb begin
    for (int j = 0; j < N; j++) begin
      first[j] = mask_in[j] & ((j == 0) ? 1'b1 : !pre[(j == 0) ? 0 : j-1]);
      if (first[j])    slots_out[j] = SYM_INV;
      else if (pre[j]) slots_out[j] = slots_in[(j == 0) ? 0 : j-1];
      else             slots_out[j] = slots_in[j];
    end
    mask_out = mask_in & ~first;
  end
endmodule

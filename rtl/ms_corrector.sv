// ms_corrector: mark-and-spare hard error correction (read side).
//
// NSTAGE cascaded ms_remove_stage instances turn the 171 data pairs plus 6
// spare pairs of a block (177 decoded pairs, data first, spares last) into
// the 171 pairs that hold the data: each stage removes one INV-marked pair,
// so up to six worn-out pairs are skipped and the spare pairs slide into
// place. If more pairs are marked than there are stages, an INV pair is left
// in the result and 'uncorrectable' is raised. 'marks' counts the INV pairs
// seen at the input. Purely combinational.
module ms_corrector
  import tlc_pkg::*;
#(
  parameter int unsigned NDATA  = DATA_PAIRS,
  parameter int unsigned NSTAGE = SPARE_PAIRS
) (
  input  pair_sym_t [NDATA+NSTAGE-1:0] pairs_in,
  output pair_sym_t [NDATA-1:0]        pairs_out,
  output logic                         uncorrectable,
  output logic [7:0]                   marks
);
  localparam int unsigned NTOT = NDATA + NSTAGE;

  // stage k carries NTOT-k pairs in the low end of its row
  for (genvar k = 0; k < NSTAGE; k++) begin : g_stage
    pair_sym_t [NTOT-k-1:0] row_in;
    pair_sym_t [NTOT-k-2:0] row_out;
    if (k == 0) begin : g_first
      assign row_in = pairs_in;
    end else begin : g_next
      assign row_in = g_stage[k-1].row_out;
    end
    ms_remove_stage #(.N(NTOT - k)) u_stage (
      .pairs_in (row_in),
      .pairs_out(row_out)
    );
  end

  assign pairs_out = g_stage[NSTAGE-1].row_out;

  always_comb begin
    uncorrectable = 1'b0;
    for (int j = 0; j < NDATA; j++) uncorrectable |= pairs_out[j].inv;
    marks = '0;
    for (int i = 0; i < NTOT; i++) marks += 8'(pairs_in[i].inv);
  end
endmodule

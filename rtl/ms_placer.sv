// ms_placer: mark-and-spare placement on the write side.
//
// The 171 data symbols are laid out over the 177 pair slots (data slots
// first, then the 6 spares) so that every slot in 'marks' holds the INV mark
// and the data fill the other slots in order; spare slots left over hold a
// filler symbol (both cells S1). NSTAGE ms_insert_stage instances each
// insert one mark, lowest position first, which is the exact reverse of the
// read-side ms_corrector. More marks than stages cannot be placed and raise
// 'overflow'. Purely combinational.
module ms_placer
  import tlc_pkg::*;
#(
  parameter int unsigned NDATA  = DATA_PAIRS,
  parameter int unsigned NSTAGE = SPARE_PAIRS
) (
  input  pair_sym_t [NDATA-1:0]        data_in,
  input  logic [NDATA+NSTAGE-1:0]      marks,
  output pair_sym_t [NDATA+NSTAGE-1:0] slots_out,
  output logic                         overflow
);
  localparam int unsigned NTOT = NDATA + NSTAGE;

  pair_sym_t [NTOT-1:0] row0;

  always_comb begin
    row0 = '0;
    row0[NDATA-1:0] = data_in;
    for (int i = NDATA; i < NTOT; i++) row0[i] = SYM_FILLER;
  end

  for (genvar k = 0; k < NSTAGE; k++) begin : g_stage
    pair_sym_t [NTOT-1:0] row_in, row_out;
    logic      [NTOT-1:0] mask_in, mask_out;
    if (k == 0) begin : g_first
      assign row_in  = row0;
      assign mask_in = marks;
    end else begin : g_next
      assign row_in  = g_stage[k-1].row_out;
      assign mask_in = g_stage[k-1].mask_out;
    end
    ms_insert_stage #(.N(NTOT)) u_stage (
      .slots_in (row_in),
      .mask_in  (mask_in),
      .slots_out(row_out),
      .mask_out (mask_out)
    );
  end

  assign slots_out = g_stage[NSTAGE-1].row_out;
  assign overflow  = |g_stage[NSTAGE-1].mask_out;
endmodule

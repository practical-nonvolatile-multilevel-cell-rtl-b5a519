// tlc_write_path: write data path of a three-level-cell block, the reverse
// of tlc_read_path.
//
// The 512 data bits, padded with one zero bit, are cut into 171 3-bit
// symbols (symbol i = bits 3i+2..3i). ms_placer lays them over the 177 pair
// slots, writing the INV mark into every slot flagged in 'marks' and a
// filler into spare slots left over; pair_encode turns each slot into two
// cell states, and tec_encoder computes the 10 check bits over the resulting
// 708-bit cell message. 'overflow' is raised when more than six slots are
// marked, in which case the block cannot hold its data. Purely combinational.
module tlc_write_path
  import tlc_pkg::*;
(
  input  logic [DATA_BITS-1:0]  data,
  input  logic [PAIRS-1:0]      marks,
  output logic [MSG_BITS-1:0]   cells,
  output logic [CHECK_BITS-1:0] check,
  output logic                  overflow
);
  logic [3*DATA_PAIRS-1:0]     bits;
  pair_sym_t [DATA_PAIRS-1:0]  syms;
  pair_sym_t [PAIRS-1:0]       slots;

  assign bits = {{(3*DATA_PAIRS-DATA_BITS){1'b0}}, data};

  for (genvar i = 0; i < DATA_PAIRS; i++) begin : g_sym
    assign syms[i] = '{inv: 1'b0, data: bits[3*i+2 -: 3]};
  end

  ms_placer u_place (
    .data_in  (syms),
    .marks    (marks),
    .slots_out(slots),
    .overflow (overflow)
  );

  for (genvar p = 0; p < PAIRS; p++) begin : g_pair
    pair_encode u_enc (
      .sym  (slots[p]),
      .cell0(cells[4*p+1 -: 2]),
      .cell1(cells[4*p+3 -: 2])
    );
  end

  tec_encoder u_tec (.msg(cells), .check(check));
endmodule

// tlc_read_path: read data path of a three-level-cell block.
//
// The raw cell states of one block (354 ternary cells as a 708-bit message,
// plus 10 single-level check cells) pass, in this order, through transient
// error correction (tec_decoder), 3-ON-2 pair decoding into INV flags and
// 3-bit symbols (pair_decode, 177 times), hard error correction
// (ms_corrector, six mark-and-spare stages) and symbol assembly: the 171
// surviving symbols are concatenated, symbol i giving data bits 3i+2..3i,
// and the 513th bit is dropped. Transient errors are corrected first so that
// a drift into the INV state cannot pass for a wearout mark. 'marks' is the
// INV flag of every pair slot after correction; a write uses it to keep the
// block's existing marks. Purely combinational: the owner registers it.
module tlc_read_path
  import tlc_pkg::*;
(
  input  logic [MSG_BITS-1:0]   cells,          // cell c in bits 2c+1:2c
  input  logic [CHECK_BITS-1:0] check,
  output logic [DATA_BITS-1:0]  data,
  output logic [PAIRS-1:0]      marks,          // INV pairs after TEC
  output logic [7:0]            mark_count,
  output logic                  tec_corrected,
  output logic                  tec_uncorrectable,
  output logic                  hec_uncorrectable
);
  logic [MSG_BITS-1:0]       fixed;
  logic [CHECK_BITS-1:0]     syndrome;
  pair_sym_t [PAIRS-1:0]     syms;
  pair_sym_t [DATA_PAIRS-1:0] good;
  logic [3*DATA_PAIRS-1:0]   bits;

  tec_decoder u_tec (
    .msg_in       (cells),
    .check_in     (check),
    .msg_out      (fixed),
    .syndrome     (syndrome),
    .corrected    (tec_corrected),
    .uncorrectable(tec_uncorrectable)
  );

  for (genvar p = 0; p < PAIRS; p++) begin : g_pair
    pair_decode u_dec (
      .cell0(fixed[4*p+1 -: 2]),
      .cell1(fixed[4*p+3 -: 2]),
      .sym  (syms[p])
    );
    assign marks[p] = syms[p].inv;
  end

  ms_corrector u_hec (
    .pairs_in     (syms),
    .pairs_out    (good),
    .uncorrectable(hec_uncorrectable),
    .marks        (mark_count)
  );

  for (genvar i = 0; i < DATA_PAIRS; i++) begin : g_sym
    assign bits[3*i+2 -: 3] = good[i].data;
  end

  assign data = bits[DATA_BITS-1:0];

  // the syndrome value itself is only needed by the decoder's flags
  logic unused_syn;
  assign unused_syn = ^{syndrome, bits[3*DATA_PAIRS-1:DATA_BITS]};
endmodule

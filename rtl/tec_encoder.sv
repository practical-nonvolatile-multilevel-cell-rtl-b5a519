// tec_encoder: check-bit generator of the transient error code (TEC).
//
// The message is the 708-bit image of the 354 ternary cells of a block, two
// bits per cell (S1 = 00, S2 = 01, S4 = 11), so that a drift of one state is
// a single bit error. The code is a Hamming single-error-correcting code
// (equivalent to BCH-1): message bit k sits at the k-th Hamming position that
// is not a power of two, and check bit i is the parity of every message bit
// whose position has bit i set. 2^10 >= 708 + 10 + 1, so 10 check bits
// suffice; they are written to single-level cells. Purely combinational: a
// 708-input XOR tree of about 10 levels per check bit.
module tec_encoder
  import tlc_pkg::*;
(
  input  logic [MSG_BITS-1:0]   msg,
  output logic [CHECK_BITS-1:0] check
);
  for (genvar i = 0; i < CHECK_BITS; i++) begin : g_chk
    localparam logic [MSG_BITS-1:0] MASK = check_mask(i);
    assign check[i] = ^(msg & MASK);
  end
endmodule

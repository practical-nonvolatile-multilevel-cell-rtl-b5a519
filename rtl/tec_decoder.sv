// tec_decoder: syndrome decoder and single-bit corrector of the transient
// error code (see tec_encoder for the code).
//
// The syndrome is the stored check bits XOR the check bits recomputed from
// the read message. Zero means no error. A syndrome equal to the position of
// a message bit flips that bit; a power of two names a check bit, which
// needs no repair of the message. A syndrome above the highest position in
// use (718) cannot come from one error and is flagged uncorrectable; other
// multi-bit errors alias onto a single-bit correction, as with any
// single-error-correcting code. This correction runs before the
// mark-and-spare stage so that a drift into the INV state is undone before
// it could be taken for a wearout mark. Purely combinational.
module tec_decoder
  import tlc_pkg::*;
(
  input  logic [MSG_BITS-1:0]   msg_in,
  input  logic [CHECK_BITS-1:0] check_in,
  output logic [MSG_BITS-1:0]   msg_out,
  output logic [CHECK_BITS-1:0] syndrome,
  output logic                  corrected,     // one bit was repaired
  output logic                  uncorrectable  // syndrome names no position
);
  logic [CHECK_BITS-1:0] check_calc;

  tec_encoder u_enc (.msg(msg_in), .check(check_calc));

  assign syndrome = check_calc ^ check_in;

  for (genvar k = 0; k < MSG_BITS; k++) begin : g_fix
    localparam logic [CHECK_BITS-1:0] POS = CHECK_BITS'(msg_pos(k));
    assign msg_out[k] = msg_in[k] ^ (syndrome == POS);
  end

  always_comb begin
    uncorrectable = (32'(syndrome) > MAX_POS);
    corrected     = (syndrome != '0) && !uncorrectable;
  end
endmodule

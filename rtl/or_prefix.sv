// or_prefix: prefix OR of N inputs, s[n] = a[0] | a[1] | ... | a[n].
//
// This is the OR-gate chain that generates the MUX selects of a
// mark-and-spare correction stage. Instead of a ripple chain of N-1 gates it
// is built as a Sklansky prefix tree: at level l every bit in the upper half
// of each 2^(l+1)-bit group ORs in the last bit of the lower half, so the
// depth is ceil(log2 N) gate levels and the fan-out doubles per level, as in
// a Sklansky adder. N need not be a power of two. Purely combinational.
module or_prefix #(
  parameter int unsigned N = 177   // 177 pairs in a 64B block
) (
  input  logic [N-1:0] a,
  output logic [N-1:0] s
);
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0] lvl [LEVELS+1];

  assign lvl[0] = a;

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    for (genvar i = 0; i < N; i++) begin : g_bit
      // i lies in the upper half of its group of 2^(l+1) bits
      if (((i >> l) & 1) == 1) begin : g_or
        localparam int unsigned SRC = ((i >> l) << l) - 1;
        assign lvl[l+1][i] = lvl[l][i] | lvl[l][SRC];
      end else begin : g_pass
        assign lvl[l+1][i] = lvl[l][i];
      end
    end
  end

  assign s = lvl[LEVELS];
endmodule

// write_window_limiter: four-write window for the PCM array.
//
// PCM write current limits write throughput; at 40 MB/s and 64-byte blocks
// at most MAX_WRITES = 4 block writes may start in any WINDOW = 6.4 us
// (6400 cycles of a 1 GHz logic-die clock), the write counterpart of the
// four-activation window of DDR DRAM. One down-counter per allowed write is
// loaded with WINDOW-1 when a write starts and counts to zero; 'allow' is
// high while at least one counter is idle. 'start' must only be asserted
// while 'allow' is high. Reset clears all counters.
module write_window_limiter #(
  parameter int unsigned MAX_WRITES = 4,
  parameter int unsigned WINDOW     = 6400   // cycles
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,    // a write starts this cycle
  output logic allow     // a write may start this cycle
);
  localparam int unsigned CW = $clog2(WINDOW + 1);

  logic [CW-1:0] timer [MAX_WRITES];
  logic [MAX_WRITES-1:0] idle;
  logic [MAX_WRITES-1:0] pick;

  always_comb begin
    for (int i = 0; i < MAX_WRITES; i++) idle[i] = (timer[i] == '0);
    pick = idle & ~(idle - 1'b1);   // lowest idle counter
  end

  assign allow = |idle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAX_WRITES; i++) timer[i] <= '0;
    end else begin
      for (int i = 0; i < MAX_WRITES; i++) begin
        if (start && pick[i]) timer[i] <= CW'(WINDOW - 1);
        else if (!idle[i])    timer[i] <= timer[i] - 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> allow)
    else $error("write started while the four-write window is full");
endmodule

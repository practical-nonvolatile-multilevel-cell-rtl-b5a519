// tb_write_window_limiter: writes are started whenever allowed (and at
// random); the start times must never put more than four starts into any
// window, and back-to-back demand must see exactly four starts per window.
// The window is shortened to 100 cycles.
module tb_write_window_limiter;
  int checks = 0, failures = 0;
  localparam int W = 100;
  logic clk = 0, rst_n = 0;
  logic start, allow;
  longint starts [$];
  longint cyc = 0;
  bit greedy;

  write_window_limiter #(.MAX_WRITES(4), .WINDOW(W)) dut (.clk(clk), .rst_n(rst_n), .start(start), .allow(allow));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb start = allow && rst_n && (greedy || ($urandom_range(9) == 0));

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (start) begin
      starts.push_back(cyc);
      // the fifth most recent start must be at least W cycles back
      if (starts.size() >= 5) begin
        checks++;
        if (cyc - starts[starts.size()-5] < longint'(W)) begin
          failures++;
          $display("five starts within %0d cycles at %0d", cyc - starts[starts.size()-5], cyc);
        end
      end
    end
  end

  initial begin
    greedy = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3 * W + 10) @(posedge clk);
    // greedy demand: starts at 0,1,2,3 then W,W+1,W+2,W+3, ...
    checks++;
    if (starts.size() != 16) begin
      failures++;
      $display("greedy: %0d starts in %0d cycles", starts.size(), 3 * W + 10);
    end
    for (int i = 0; i < 12 && i < starts.size(); i++) begin
      checks++;
      if (starts[i] != (longint'(i) / 4) * longint'(W) + longint'(i) % 4) begin
        failures++;
        $display("start %0d at %0d", i, starts[i]);
      end
    end
    greedy = 0;
    repeat (20 * W) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

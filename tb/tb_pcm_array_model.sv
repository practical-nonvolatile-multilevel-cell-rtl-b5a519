// tb_pcm_array_model: the behavioural cell array with short latencies.
// Checks a never-written block, write/read round trip, the read and write
// latencies, verify failures of stuck-reset and stuck-set cells, the
// reverse-current revival of a stuck-set cell, single-level check cells and
// drift injection against the sensing thresholds.
module tb_pcm_array_model;
  import tlc_pkg::*;
  int checks = 0, failures = 0;
  localparam int RL = 7, WL = 13;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, cmd_write = 0, cmd_revive = 0;
  logic [27:0] cmd_addr = '0;
  logic [707:0] cmd_cells = '0;
  logic [9:0] cmd_check = '0;
  logic rsp_valid;
  logic [707:0] rsp_cells;
  logic [9:0] rsp_check;
  logic [353:0] vfy;
  logic inj_valid = 0;
  logic [27:0] inj_addr = '0;
  logic [8:0] inj_cell = '0;
  logic [1:0] inj_kind = '0;
  logic [9:0] inj_amount = '0;

  pcm_array_model #(.READ_CYCLES(RL), .WRITE_CYCLES(WL)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_write, .cmd_revive, .cmd_addr,
    .cmd_cells, .cmd_check, .rsp_valid, .rsp_cells, .rsp_check,
    .rsp_vfy_fail(vfy), .inj_valid, .inj_addr, .inj_cell, .inj_kind, .inj_amount);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(input bit wr, input bit rev, input logic [27:0] a,
                    input logic [707:0] c, input logic [9:0] k, input int lat);
    int n = 0;
    @(negedge clk);
    cmd_valid = 1; cmd_write = wr; cmd_revive = rev; cmd_addr = a; cmd_cells = c; cmd_check = k;
    @(posedge clk);
    @(negedge clk);
    cmd_valid = 0;
    while (!rsp_valid) begin @(posedge clk); #1; n++; end
    checks++;
    if (n != lat) begin failures++; $display("latency %0d, expected %0d", n, lat); end
  endtask

  task automatic inject(input logic [27:0] a, input int cidx, input int kind, input int amt);
    @(negedge clk);
    inj_valid = 1; inj_addr = a; inj_cell = 9'(cidx); inj_kind = 2'(kind); inj_amount = 10'(amt);
    @(negedge clk);
    inj_valid = 0;
  endtask

  function automatic logic [707:0] pattern(input int seed);
    logic [707:0] p;
    for (int c = 0; c < 354; c++)
      case ((c + seed) % 3)
        0: p[2*c +: 2] = ST_S1;
        1: p[2*c +: 2] = ST_S2;
        default: p[2*c +: 2] = ST_S4;
      endcase
    return p;
  endfunction

  initial begin
    logic [707:0] p;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // never-written block
    op(0, 0, 28'h0ABCDEF, '0, '0, RL);
    checks++;
    if (rsp_cells != '0 || rsp_check != '0) failures++;
    // round trip
    p = pattern(0);
    op(1, 0, 28'h0000012, p, 10'h2A5, WL);
    checks++;
    if (vfy != '0) failures++;
    op(0, 0, 28'h0000012, '0, '0, RL);
    checks++;
    if (rsp_cells != p || rsp_check != 10'h2A5) begin failures++; $display("round trip failed"); end
    // drift: cell 1 holds S2 (400); +60 stays S2, +100 more crosses 5.5 into S4
    inject(28'h12, 1, 3, 60);
    op(0, 0, 28'h12, '0, '0, RL);
    checks++;
    if (rsp_cells[3:2] != ST_S2) failures++;
    inject(28'h12, 1, 3, 100);
    op(0, 0, 28'h12, '0, '0, RL);
    checks++;
    if (rsp_cells[3:2] != ST_S4) failures++;
    // S1 cell 0 drifts past 3.5
    inject(28'h12, 0, 3, 60);
    op(0, 0, 28'h12, '0, '0, RL);
    checks++;
    if (rsp_cells[1:0] != ST_S2) failures++;
    // check cell (SLC) 354 holds 1: no drift effect on a 1; cell 355 holds 0: +200 flips it
    inject(28'h12, 355, 3, 200);
    op(0, 0, 28'h12, '0, '0, RL);
    checks++;
    if (rsp_check != (10'h2A5 | 10'h002)) failures++;
    // stuck-reset at cell 3 (target S1 in pattern(0)? cell 3 -> (3%3)=0 -> S1)
    inject(28'h12, 3, 1, 0);
    op(1, 0, 28'h12, p, 10'h2A5, WL);
    checks++;
    if (vfy != (354'(1) << 3)) begin failures++; $display("stuck-reset not reported"); end
    // stuck-set at cell 5 (target S4): fails without revival, passes with it
    inject(28'h12, 5, 2, 0);
    op(1, 0, 28'h12, p, 10'h2A5, WL);
    checks++;
    if (vfy != ((354'(1) << 3) | (354'(1) << 5))) begin failures++; $display("stuck-set not reported"); end
    op(1, 1, 28'h12, p, 10'h2A5, WL);
    checks++;
    if (vfy != (354'(1) << 3)) begin failures++; $display("revival failed"); end
    op(0, 0, 28'h12, '0, '0, RL);
    checks++;
    if (rsp_cells[11:10] != ST_S4 || rsp_cells[7:6] != ST_S4) failures++;
    // after revival the cell stays in S4 even when S1 is wanted
    p[11:10] = ST_S1;
    op(1, 0, 28'h12, p, 10'h2A5, WL);
    checks++;
    if (!vfy[5]) failures++;
    // clearing a fault
    inject(28'h12, 3, 0, 0);
    inject(28'h12, 5, 0, 0);
    op(1, 0, 28'h12, p, 10'h2A5, WL);
    checks++;
    if (vfy != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tlc_controller: the block sequencer with the behavioural cell array
// and the four-write window around it (reads 20 cycles, writes 50, window
// 600 cycles). Same scenarios as the device test: round trips and their
// latencies, drift correction, write-and-verify remapping of stuck-set and
// stuck-reset pairs, six marks, a failing seventh, an uncorrectable read and
// window stalls. Expected data come from the reference models.
module tb_tlc_controller;
  import tlc_pkg::*;
  import tb_ref_pkg::*;

  localparam int RL = 20, WL = 50, WIN = 600;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_write = 0;
  logic [27:0] req_addr = '0;
  logic [511:0] req_wdata = '0;
  logic rsp_valid, rsp_tec_corrected, rsp_uncorrectable, rsp_write_fail;
  logic [511:0] rsp_rdata;
  logic [7:0] rsp_marks;
  logic wr_stall;
  logic inj_valid = 0;
  logic [27:0] inj_addr = '0;
  logic [8:0] inj_cell = '0;
  logic [1:0] inj_kind = '0;
  logic [9:0] inj_amount = '0;

  logic                  wr_req, wr_allow, wr_start;
  logic                  arr_valid, arr_ready, arr_write, arr_revive;
  logic [27:0]           arr_addr;
  logic [MSG_BITS-1:0]   arr_cells, arr_rsp_cells;
  logic [CHECK_BITS-1:0] arr_check, arr_rsp_check;
  logic                  arr_rsp_valid;
  logic [CELLS-1:0]      arr_rsp_vfy_fail;

  tlc_controller ctrl (
    .clk, .rst_n, .req_valid, .req_ready, .req_write, .req_addr, .req_wdata,
    .rsp_valid, .rsp_rdata, .rsp_tec_corrected, .rsp_uncorrectable,
    .rsp_write_fail, .rsp_marks, .wr_req, .wr_allow, .wr_start,
    .arr_valid, .arr_ready, .arr_write, .arr_revive, .arr_addr, .arr_cells, .arr_check,
    .arr_rsp_valid, .arr_rsp_cells, .arr_rsp_check, .arr_rsp_vfy_fail);

  write_window_limiter #(.MAX_WRITES(4), .WINDOW(WIN)) win (
    .clk, .rst_n, .start(wr_start), .allow(wr_allow));

  assign wr_stall = arr_write && !wr_allow;

  pcm_array_model #(.READ_CYCLES(RL), .WRITE_CYCLES(WL)) arr (
    .clk, .rst_n, .cmd_valid(arr_valid), .cmd_ready(arr_ready), .cmd_write(arr_write),
    .cmd_revive(arr_revive), .cmd_addr(arr_addr), .cmd_cells(arr_cells), .cmd_check(arr_check),
    .rsp_valid(arr_rsp_valid), .rsp_cells(arr_rsp_cells), .rsp_check(arr_rsp_check),
    .rsp_vfy_fail(arr_rsp_vfy_fail), .inj_valid, .inj_addr, .inj_cell, .inj_kind, .inj_amount);

  always #5 clk = ~clk;

  // mechanism counters
  int n_roundtrip = 0, n_tec = 0, n_inv_drift = 0, n_remap = 0, n_revive = 0;
  int n_full_spares = 0, n_write_fail = 0, n_uncorr = 0, n_stall_cycles = 0;
  int n_blank = 0;

  always @(posedge clk) if (wr_stall) n_stall_cycles++;
  always @(posedge clk)
    if (arr_valid && arr_ready && arr_write && arr_revive) n_revive++;

  initial begin
    #5000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lat;
  logic [511:0] r_data;
  logic r_corr, r_unc, r_fail;
  logic [7:0] r_marks;

  task automatic request(input bit wr, input logic [27:0] a, input logic [511:0] d);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_write = wr; req_addr = a; req_wdata = d;
    @(posedge clk);
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    while (!rsp_valid) begin @(negedge clk); lat++; end
    r_data = rsp_rdata; r_corr = rsp_tec_corrected; r_unc = rsp_uncorrectable;
    r_fail = rsp_write_fail; r_marks = rsp_marks;
  endtask

  task automatic inject(input logic [27:0] a, input int cidx, input int kind, input int amt);
    @(negedge clk);
    inj_valid = 1; inj_addr = a; inj_cell = 9'(cidx); inj_kind = 2'(kind); inj_amount = 10'(amt);
    @(negedge clk);
    inj_valid = 0;
  endtask

  function automatic logic [707:0] image(input logic [511:0] d, input logic [176:0] m);
    int rows [177];
    bit ok;
    logic [707:0] img;
    ref_layout(d, m, rows, ok);
    ref_cells(rows, img);
    return img;
  endfunction

  // first unmarked pair at or above 'from' whose cells are (c0, c1)
  function automatic int find_pair(input logic [707:0] img, input logic [176:0] m,
                                   input logic [1:0] c0, input logic [1:0] c1, input int from);
    for (int p = from; p < 171; p++)
      if (!m[p] && img[4*p +: 2] == c0 && img[4*p+2 +: 2] == c1) return p;
    return -1;
  endfunction

  task automatic expect_read(input logic [27:0] a, input logic [511:0] d, input int marks,
                             input bit corr, input string what);
    request(0, a, '0);
    checks++;
    if (r_data != d || r_unc || r_corr != corr || r_marks != 8'(marks)) begin
      failures++;
      $display("%s: data ok=%b unc=%b corr=%b marks=%0d", what, r_data == d, r_unc, r_corr, r_marks);
    end
  endtask

  initial begin
    logic [511:0] d1, d2, d3;
    logic [176:0] m;
    logic [707:0] img;
    int p, q;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. never-written block reads as zeros, latency (counted from the
    // accepting edge, inclusive) = array read + 4
    request(0, 28'hFFFFFFF, '0);
    checks++;
    if (r_data != '0 || r_unc || r_corr) failures++; else n_blank++;
    checks++;
    if (lat != RL + 4) begin failures++; $display("read latency %0d", lat); end

    // 2. round trips at a few addresses; write latency = read + write + 7
    for (int i = 0; i < 4; i++) begin
      d1 = rand512();
      request(1, 28'(i * 1000003), d1);
      checks++;
      if (r_fail || r_marks != 0) failures++;
      checks++;
      if (lat != RL + WL + 7) begin failures++; $display("write latency %0d", lat); end
      expect_read(28'(i * 1000003), d1, 0, 0, "round trip");
      n_roundtrip++;
    end

    // 3. drift errors are corrected: S2 -> S4 turning pair (S4,S2) into INV
    d1 = rand512();
    request(1, 28'h100, d1);
    img = image(d1, '0);
    p = find_pair(img, '0, 2'b11, 2'b01, 0);
    if (p >= 0) begin
      inject(28'h100, 2*p + 1, 3, 160);
      expect_read(28'h100, d1, 0, 1, "drift into INV");
      if (r_data == d1 && r_corr) n_inv_drift++;
      n_tec++;
      // a later write restores nominal resistance and the flag clears
      request(1, 28'h100, d1);
      expect_read(28'h100, d1, 0, 0, "rewrite after drift");
    end
    // S1 -> S2 drift in another cell
    q = find_pair(img, '0, 2'b00, 2'b00, 0);
    if (q >= 0) begin
      inject(28'h100, 2*q, 3, 70);
      expect_read(28'h100, d1, 0, 1, "drift S1->S2");
      n_tec++;
    end

    // 4. wearout: stuck-set cell in a pair whose first cell must be S4
    d2 = rand512();
    m = '0;
    img = image(d2, m);
    p = find_pair(img, m, 2'b11, 2'b00, 10);
    inject(28'h200, 2*p, 2, 0);
    request(1, 28'h200, d2);
    checks++;
    if (r_fail || r_marks != 1) begin failures++; $display("stuck-set remap: marks %0d", r_marks); end
    else n_remap++;
    m[p] = 1'b1;
    expect_read(28'h200, d2, 1, 0, "after one remap");

    // stuck-reset cell in another pair whose cells should be (S1, S1)
    img = image(d2, m);
    q = find_pair(img, m, 2'b00, 2'b00, p + 1);
    inject(28'h200, 2*q + 1, 1, 0);
    request(1, 28'h200, d2);
    checks++;
    if (r_fail || r_marks != 2) begin failures++; $display("stuck-reset remap: marks %0d", r_marks); end
    else n_remap++;
    m[q] = 1'b1;
    expect_read(28'h200, d2, 2, 0, "after two remaps");

    // new data over a block that keeps its marks
    d3 = rand512();
    request(1, 28'h200, d3);
    checks++;
    if (r_fail || r_marks != 2) failures++;
    expect_read(28'h200, d3, 2, 0, "new data, old marks");

    // 5. six worn-out pairs use every spare: stuck-reset first cells
    //    in pairs whose first cell should be S1
    d1 = rand512();
    m = '0;
    for (int k = 0; k < 6; k++) begin
      img = image(d1, m);
      p = find_pair(img, m, 2'b00, 2'b00, 20 * k);
      if (p < 0) p = find_pair(img, m, 2'b00, 2'b01, 20 * k);
      inject(28'h300, 2*p, 1, 0);
      m[p] = 1'b1;
    end
    request(1, 28'h300, d1);
    checks++;
    if (r_fail || r_marks != 6) begin failures++; $display("six marks: fail=%b marks=%0d", r_fail, r_marks); end
    else n_full_spares++;
    expect_read(28'h300, d1, 6, 0, "six marks");

    // 6. an uncorrectable read: a seventh pair turns INV after the write
    img = image(d1, ctrl.marks_q);
    p = find_pair(img, ctrl.marks_q, 2'b11, 2'b00, 0);
    inject(28'h300, 2*p + 1, 1, 0);
    request(0, 28'h300, '0);
    checks++;
    if (!r_unc) begin failures++; $display("seventh INV pair not flagged"); end
    else n_uncorr++;

    // 7. seven worn-out pairs: the write must fail
    d2 = rand512();
    m = '0;
    for (int k = 0; k < 7; k++) begin
      img = image(d2, m);
      p = find_pair(img, m, 2'b00, 2'b00, 20 * k);
      if (p < 0) p = find_pair(img, m, 2'b00, 2'b01, 20 * k);
      inject(28'h400, 2*p, 1, 0);
      m[p] = 1'b1;
    end
    request(1, 28'h400, d2);
    checks++;
    if (!r_fail) begin failures++; $display("seventh wearout not reported"); end
    else n_write_fail++;

    // 8. back-to-back writes run into the four-write window
    begin
      int stall0;
      stall0 = n_stall_cycles;
      for (int i = 0; i < 6; i++) request(1, 28'h500 + 28'(i), rand512());
      checks++;
      if (n_stall_cycles == stall0) failures++;
    end

    // every mechanism must have happened
    checks++;
    if (n_blank == 0 || n_roundtrip == 0 || n_tec == 0 || n_inv_drift == 0 || n_remap < 2 ||
        n_revive == 0 || n_full_spares == 0 || n_write_fail == 0 || n_uncorr == 0 ||
        n_stall_cycles == 0) begin
      failures++;
      $display("a mechanism was not exercised");
    end
    $display("blank=%0d roundtrip=%0d tec=%0d inv_drift=%0d remap=%0d revive_writes=%0d six_marks=%0d write_fail=%0d uncorrectable=%0d stall_cycles=%0d",
             n_blank, n_roundtrip, n_tec, n_inv_drift, n_remap, n_revive, n_full_spares,
             n_write_fail, n_uncorr, n_stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

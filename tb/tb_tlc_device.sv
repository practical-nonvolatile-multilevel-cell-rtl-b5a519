// tb_tlc_device: end-to-end test of the three-level-cell device with short
// array latencies (reads 20 cycles, writes 50, write window 600 cycles) and
// the full 28-bit block address.
//
// It exercises and counts every mechanism of the design: plain write/read
// round trips, a read of a never-written block, transient error correction
// of a drifted cell (including a drift that turns a pair into INV),
// mark-and-spare remapping of worn-out pairs found by write-and-verify
// (stuck-set cells revived with a reverse-current write, and stuck-reset
// cells), a full set of six marks, a write that fails with a seventh worn-out
// pair, an uncorrectable read, and writes stalled by the four-write window.
// The expected data come from the reference models, never from the device.
module tb_tlc_device;
  import tlc_pkg::*;
  import tb_ref_pkg::*;

  localparam int RL = 20, WL = 50, WIN = 600;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_write = 0;
  logic [27:0] req_addr = '0;
  logic [511:0] req_wdata = '0;
  logic rsp_write;
  logic [27:0] rsp_addr;
  logic rsp_valid, rsp_tec_corrected, rsp_uncorrectable, rsp_write_fail;
  logic [511:0] rsp_rdata;
  logic [7:0] rsp_marks;
  logic wr_stall;
  logic inj_valid = 0;
  logic [27:0] inj_addr = '0;
  logic [8:0] inj_cell = '0;
  logic [1:0] inj_kind = '0;
  logic [9:0] inj_amount = '0;

  tlc_device #(.READ_CYCLES(RL), .WRITE_CYCLES(WL), .WINDOW(WIN)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_write, .req_addr, .req_wdata,
    .rsp_valid, .rsp_addr, .rsp_write, .rsp_rdata, .rsp_tec_corrected, .rsp_uncorrectable,
    .rsp_write_fail, .rsp_marks, .wr_stall,
    .inj_valid, .inj_addr, .inj_cell, .inj_kind, .inj_amount);

  always #5 clk = ~clk;

  // mechanism counters
  int n_roundtrip = 0, n_tec = 0, n_inv_drift = 0, n_remap = 0, n_revive = 0;
  int n_full_spares = 0, n_write_fail = 0, n_uncorr = 0, n_stall_cycles = 0;
  int n_blank = 0;

  int n_max_busy = 0;
  logic [7:0] dut_revive, dut_busy;
  for (genvar b = 0; b < 8; b++) begin : g_mon
    assign dut_revive[b] = dut.g_bank[b].arr_valid && dut.g_bank[b].arr_ready &&
                           dut.g_bank[b].arr_write && dut.g_bank[b].arr_revive;
    assign dut_busy[b]   = !dut.g_bank[b].ctl_ready;
  end
  always @(posedge clk) if ($countones(dut_busy) > n_max_busy) n_max_busy = $countones(dut_busy);

  always @(posedge clk) if (wr_stall) n_stall_cycles++;
  always @(posedge clk)
    if (|dut_revive) n_revive++;

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
    // accepting edge, inclusive) = array read + 6
    request(0, 28'hFFFFFFF, '0);
    checks++;
    if (r_data != '0 || r_unc || r_corr) failures++; else n_blank++;
    checks++;
    if (lat != RL + 6) begin failures++; $display("read latency %0d", lat); end

    // 2. round trips at a few addresses; write latency = read + write + 9
    for (int i = 0; i < 4; i++) begin
      d1 = rand512();
      request(1, 28'(i * 1000003), d1);
      checks++;
      if (r_fail || r_marks != 0) failures++;
      checks++;
      if (lat != RL + WL + 9) begin failures++; $display("write latency %0d", lat); end
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
    img = image(d1, dut.g_bank[0].u_ctrl.marks_q);
    p = find_pair(img, dut.g_bank[0].u_ctrl.marks_q, 2'b11, 2'b00, 0);
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

    // 9. eight banks work at once: eight reads issued back to back
    begin
      logic [511:0] bd [8];
      longint t0;
      int got;
      for (int b = 0; b < 8; b++) begin
        bd[b] = rand512();
        request(1, 28'h600 + 28'(b), bd[b]);
      end
      repeat (2 * WIN) @(posedge clk);
      t0 = $time;
      got = 0;
      fork
        begin
          for (int b = 0; b < 8; b++) begin
            @(negedge clk);
            req_valid = 0; req_write = 0; req_addr = 28'h600 + 28'(b);
            #1;
            while (!req_ready) @(negedge clk);
            req_valid = 1;
            @(posedge clk);
          end
          @(negedge clk);
          req_valid = 0;
        end
        begin
          while (got < 8) begin
            @(posedge clk); #1;
            if (rsp_valid) begin
              checks++;
              if (rsp_write || rsp_addr[27:3] != 25'h600 >> 3 || rsp_rdata != bd[rsp_addr[2:0]]) failures++;
              got++;
            end
          end
        end
      join
      checks++;
      if (($time - t0) / 10 > 2 * RL) begin
        failures++;
        $display("eight bank reads took %0d cycles", ($time - t0) / 10);
      end
      $display("eight reads on eight banks: %0d cycles", ($time - t0) / 10);
    end

    // every mechanism must have happened
    checks++;
    if (n_blank == 0 || n_roundtrip == 0 || n_tec == 0 || n_inv_drift == 0 || n_remap < 2 ||
        n_revive == 0 || n_full_spares == 0 || n_write_fail == 0 || n_uncorr == 0 ||
        n_stall_cycles == 0 || n_max_busy < 8) begin
      failures++;
      $display("a mechanism was not exercised");
    end
    $display("blank=%0d roundtrip=%0d tec=%0d inv_drift=%0d remap=%0d revive_writes=%0d six_marks=%0d write_fail=%0d uncorrectable=%0d stall_cycles=%0d busy_banks=%0d",
             n_blank, n_roundtrip, n_tec, n_inv_drift, n_remap, n_revive, n_full_spares,
             n_write_fail, n_uncorr, n_stall_cycles, n_max_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

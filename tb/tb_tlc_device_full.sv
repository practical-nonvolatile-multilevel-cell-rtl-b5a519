// tb_tlc_device_full: the device at its default sizes (16 GB address space,
// 200-cycle reads, 1000-cycle writes, four writes per 6400 cycles). Writes
// a block at the top and at the bottom of the address space, reads both
// back, checks the data and the read and write latencies, then writes five
// blocks back to back and checks that the fifth waits for the window.
module tb_tlc_device_full;
  import tb_ref_pkg::*;
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

  tlc_device dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_write, .req_addr, .req_wdata,
    .rsp_valid, .rsp_addr, .rsp_write, .rsp_rdata, .rsp_tec_corrected, .rsp_uncorrectable,
    .rsp_write_fail, .rsp_marks, .wr_stall,
    .inj_valid(1'b0), .inj_addr(28'h0), .inj_cell(9'h0), .inj_kind(2'h0), .inj_amount(10'h0));

  always #0.5 clk = ~clk;   // 1 GHz

  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lat, stall_cycles = 0;
  always @(posedge clk) if (wr_stall) stall_cycles++;

  task automatic request(input bit wr, input logic [27:0] a, input logic [511:0] d);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_write = wr; req_addr = a; req_wdata = d;
    @(posedge clk);
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    while (!rsp_valid) begin @(negedge clk); lat++; end
  endtask

  initial begin
    logic [511:0] d0, d1;
    d0 = rand512();
    d1 = rand512();
    repeat (3) @(posedge clk);
    rst_n = 1;
    request(1, 28'hFFFFFFF, d0);
    checks++;
    if (rsp_write_fail || lat != 200 + 1000 + 9) begin failures++; $display("write latency %0d", lat); end
    request(1, 28'h0000000, d1);
    request(0, 28'hFFFFFFF, '0);
    checks++;
    if (rsp_rdata != d0 || rsp_uncorrectable || rsp_tec_corrected) failures++;
    checks++;
    if (lat != 200 + 6) begin failures++; $display("read latency %0d", lat); end
    request(0, 28'h0000000, '0);
    checks++;
    if (rsp_rdata != d1) failures++;
    // two writes so far in this window; three more fit only after it ends
    for (int i = 0; i < 3; i++) request(1, 28'h1000 + 28'(i), rand512());
    checks++;
    if (stall_cycles == 0) begin failures++; $display("no window stall"); end
    $display("window stall cycles: %0d", stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tlc_device: a nonvolatile three-level-cell PCM device, 64-byte blocks.
//
// NBANKS banks, each with its own block sequencer (tlc_controller, which
// holds the read and write paths) and its own cell array (pcm_array_model,
// a behavioural model), share one host port, one response port and one
// four-write window. Data are stored as 3-ON-2 symbols in ternary cells,
// worn-out pairs are skipped with mark-and-spare, and a Hamming code over
// the cells catches drift. There is no refresh: the cell mapping keeps drift
// errors away for years, and the code is a safety net.
//
// Banks are interleaved on the low address bits (bank = addr % NBANKS), a
// choice of this design. A request is accepted (req_ready) when its bank is
// idle and that bank's response slot is empty, so several banks can work at
// once. Finished results wait in a per-bank slot; each cycle the lowest
// numbered full slot is sent as a one-cycle rsp_valid pulse tagged with its
// address. The write window is granted to the lowest numbered bank asking.
// Fault-injection ports of the arrays are brought out for test.
//
// Default sizes follow the evaluated configuration: 16 GB (2^28 blocks) in
// 8 banks, 200 ns reads, 1 us writes, at most four writes per 6.4 us, at an
// assumed 1 GHz clock. Without faults, a response leaves READ_CYCLES + 5
// cycles after a read is accepted (5 ns of logic at 1 GHz), and READ_CYCLES
// + WRITE_CYCLES + 8 cycles after a write, whose first step is a read.
module tlc_device
  import tlc_pkg::*;
#(
  parameter int unsigned ADDR_W       = 28,
  parameter int unsigned NBANKS       = 8,
  parameter int unsigned READ_CYCLES  = 200,
  parameter int unsigned WRITE_CYCLES = 1000,
  parameter int unsigned MAX_WRITES   = 4,
  parameter int unsigned WINDOW       = 6400
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic                  req_write,
  input  logic [ADDR_W-1:0]     req_addr,
  input  logic [DATA_BITS-1:0]  req_wdata,
  output logic                  rsp_valid,
  output logic [ADDR_W-1:0]     rsp_addr,
  output logic                  rsp_write,
  output logic [DATA_BITS-1:0]  rsp_rdata,
  output logic                  rsp_tec_corrected,
  output logic                  rsp_uncorrectable,
  output logic                  rsp_write_fail,
  output logic [7:0]            rsp_marks,
  output logic                  wr_stall,       // a write waits for the window
  input  logic                  inj_valid,
  input  logic [ADDR_W-1:0]     inj_addr,
  input  logic [8:0]            inj_cell,
  input  logic [1:0]            inj_kind,
  input  logic [9:0]            inj_amount
);
  localparam int unsigned BW = (NBANKS > 1) ? $clog2(NBANKS) : 1;
  localparam int unsigned RW = ADDR_W - $clog2(NBANKS);   // row address bits

  typedef struct packed {
    logic [ADDR_W-1:0]    addr;
    logic                 write;
    logic [DATA_BITS-1:0] rdata;
    logic                 tec_corrected;
    logic                 uncorrectable;
    logic                 write_fail;
    logic [7:0]           marks;
  } result_t;

  logic [BW-1:0]     req_bank, inj_bank;
  logic [NBANKS-1:0] bank_ready, bank_rsp, bank_wr_req, bank_wr_grant, bank_wr_start;
  logic [NBANKS-1:0] slot_full, slot_take;
  result_t           bank_res [NBANKS];
  result_t           slot     [NBANKS];
  logic              win_allow;

  assign req_bank  = BW'(req_addr % NBANKS);
  assign inj_bank  = BW'(inj_addr % NBANKS);
  assign req_ready = bank_ready[req_bank] && !slot_full[req_bank];

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    logic                  arr_valid, arr_ready, arr_write, arr_revive;
    logic [ADDR_W-1:0]     arr_addr;
    logic [MSG_BITS-1:0]   arr_cells, arr_rsp_cells;
    logic [CHECK_BITS-1:0] arr_check, arr_rsp_check;
    logic                  arr_rsp_valid;
    logic [CELLS-1:0]      arr_rsp_vfy_fail;
    logic                  ctl_ready;
    logic [ADDR_W-1:0]     addr_q;
    logic                  write_q;
    logic [DATA_BITS-1:0]  c_rdata;
    logic                  c_corr, c_unc, c_fail;
    logic [7:0]            c_marks;

    tlc_controller #(.ADDR_W(ADDR_W)) u_ctrl (
      .clk, .rst_n,
      .req_valid        (req_valid && req_ready && req_bank == BW'(b)),
      .req_ready        (ctl_ready),
      .req_write, .req_addr, .req_wdata,
      .rsp_valid        (bank_rsp[b]),
      .rsp_rdata        (c_rdata),
      .rsp_tec_corrected(c_corr),
      .rsp_uncorrectable(c_unc),
      .rsp_write_fail   (c_fail),
      .rsp_marks        (c_marks),
      .wr_req           (bank_wr_req[b]),
      .wr_allow         (bank_wr_grant[b]),
      .wr_start         (bank_wr_start[b]),
      .arr_valid, .arr_ready, .arr_write, .arr_revive, .arr_addr,
      .arr_cells, .arr_check,
      .arr_rsp_valid, .arr_rsp_cells, .arr_rsp_check, .arr_rsp_vfy_fail
    );
    assign bank_ready[b] = ctl_ready;

    // remember the request's address and kind for the response tag
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        addr_q  <= '0;
        write_q <= 1'b0;
      end else if (req_valid && req_ready && req_bank == BW'(b)) begin
        addr_q  <= req_addr;
        write_q <= req_write;
      end

    assign bank_res[b] = '{addr: addr_q, write: write_q, rdata: c_rdata,
                           tec_corrected: c_corr, uncorrectable: c_unc,
                           write_fail: c_fail, marks: c_marks};

    pcm_array_model #(
      .ADDR_W(RW), .READ_CYCLES(READ_CYCLES), .WRITE_CYCLES(WRITE_CYCLES)
    ) u_array (
      .clk, .rst_n,
      .cmd_valid(arr_valid), .cmd_ready(arr_ready), .cmd_write(arr_write),
      .cmd_revive(arr_revive), .cmd_addr(RW'(arr_addr / NBANKS)),
      .cmd_cells(arr_cells), .cmd_check(arr_check),
      .rsp_valid(arr_rsp_valid), .rsp_cells(arr_rsp_cells),
      .rsp_check(arr_rsp_check), .rsp_vfy_fail(arr_rsp_vfy_fail),
      .inj_valid(inj_valid && inj_bank == BW'(b)), .inj_addr(RW'(inj_addr / NBANKS)),
      .inj_cell, .inj_kind, .inj_amount
    );

    // response slot
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        slot_full[b] <= 1'b0;
        slot[b]      <= '0;
      end else if (bank_rsp[b]) begin
        slot_full[b] <= 1'b1;
        slot[b]      <= bank_res[b];
      end else if (slot_take[b]) begin
        slot_full[b] <= 1'b0;
      end

    assert property (@(posedge clk) disable iff (!rst_n) bank_rsp[b] |-> !slot_full[b])
      else $error("bank %0d finished with its response slot still full", b);
  end

  // four-write window shared by all banks, lowest bank first
  always_comb begin
    bank_wr_grant = '0;
    for (int b = NBANKS - 1; b >= 0; b--)
      if (bank_wr_req[b]) bank_wr_grant = NBANKS'(1) << b;
    if (!win_allow) bank_wr_grant = '0;
  end

  write_window_limiter #(.MAX_WRITES(MAX_WRITES), .WINDOW(WINDOW)) u_win (
    .clk, .rst_n, .start(|bank_wr_start), .allow(win_allow)
  );

  assign wr_stall = |bank_wr_req && !win_allow;

  // response port: lowest full slot first
  always_comb begin
    slot_take = '0;
    for (int b = NBANKS - 1; b >= 0; b--)
      if (slot_full[b]) slot_take = NBANKS'(1) << b;
  end

  result_t out_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      out_q     <= '0;
    end else begin
      rsp_valid <= |slot_take;
      for (int b = 0; b < NBANKS; b++)
        if (slot_take[b]) out_q <= slot[b];
    end

  assign rsp_addr          = out_q.addr;
  assign rsp_write         = out_q.write;
  assign rsp_rdata         = out_q.rdata;
  assign rsp_tec_corrected = out_q.tec_corrected;
  assign rsp_uncorrectable = out_q.uncorrectable;
  assign rsp_write_fail    = out_q.write_fail;
  assign rsp_marks         = out_q.marks;
endmodule

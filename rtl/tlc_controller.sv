// tlc_controller: block read/write sequencer of the three-level-cell logic
// die.
//
// Read: the block is read from the array, passed through tlc_read_path and
// returned with its status (a transient error corrected, a transient error
// that could not be corrected, more worn-out pairs than spares).
//
// Write: the block is first read to recover its marks, the INV flags of its
// pairs after transient error correction; no mark is stored anywhere else.
// The data are then encoded around those marks and written with
// write-and-verify. A ternary cell that fails verification is worn out: its
// pair is added to the marks and the block is written again, now with that
// pair set to INV (both cells S4, with a reverse-current pulse allowed for a
// stuck-set cell). This repeats until a write verifies or more than six
// pairs are marked, which ends the write with write_fail. Every array write
// waits for the four-write window. Verify failures inside pairs that are
// already marked, and in the single-level check cells, are left to the
// transient error code.
//
// Host port: req_valid/req_ready handshake; rsp_valid is a one-cycle pulse
// with the result, which the host must take (no back-pressure). One request
// is served at a time. Read latency is the array read plus one cycle.
module tlc_controller
  import tlc_pkg::*;
#(
  parameter int unsigned ADDR_W = 28
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic                  req_write,
  input  logic [ADDR_W-1:0]     req_addr,
  input  logic [DATA_BITS-1:0]  req_wdata,
  output logic                  rsp_valid,
  output logic [DATA_BITS-1:0]  rsp_rdata,
  output logic                  rsp_tec_corrected,
  output logic                  rsp_uncorrectable,
  output logic                  rsp_write_fail,
  output logic [7:0]            rsp_marks,
  // write window
  output logic                  wr_req,     // ready to start an array write
  input  logic                  wr_allow,   // window grant for this bank
  output logic                  wr_start,
  // array
  output logic                  arr_valid,
  input  logic                  arr_ready,
  output logic                  arr_write,
  output logic                  arr_revive,
  output logic [ADDR_W-1:0]     arr_addr,
  output logic [MSG_BITS-1:0]   arr_cells,
  output logic [CHECK_BITS-1:0] arr_check,
  input  logic                  arr_rsp_valid,
  input  logic [MSG_BITS-1:0]   arr_rsp_cells,
  input  logic [CHECK_BITS-1:0] arr_rsp_check,
  input  logic [CELLS-1:0]      arr_rsp_vfy_fail
);
  typedef enum logic [2:0] {
    IDLE, RD_ISSUE, RD_WAIT, RD_DONE, WR_ISSUE, WR_WAIT, WR_CHECK
  } state_e;

  state_e                 state;
  logic                   is_write;
  logic [ADDR_W-1:0]      addr_q;
  logic [DATA_BITS-1:0]   wdata_q;
  logic [PAIRS-1:0]       marks_q;
  logic                   retry_q;
  logic [MSG_BITS-1:0]    rcells_q;
  logic [CHECK_BITS-1:0]  rcheck_q;
  logic [CELLS-1:0]       vfy_q;

  // read path on the registered array response
  logic [DATA_BITS-1:0]   rd_data;
  logic [PAIRS-1:0]       rd_marks;
  logic [7:0]             rd_mark_count;
  logic                   rd_tec_corr, rd_tec_unc, rd_hec_unc;

  tlc_read_path u_rd (
    .cells            (rcells_q),
    .check            (rcheck_q),
    .data             (rd_data),
    .marks            (rd_marks),
    .mark_count       (rd_mark_count),
    .tec_corrected    (rd_tec_corr),
    .tec_uncorrectable(rd_tec_unc),
    .hec_uncorrectable(rd_hec_unc)
  );

  // write path on the registered data and marks
  logic [MSG_BITS-1:0]    wr_cells;
  logic [CHECK_BITS-1:0]  wr_check;
  logic                   wr_overflow;

  tlc_write_path u_wr (
    .data    (wdata_q),
    .marks   (marks_q),
    .cells   (wr_cells),
    .check   (wr_check),
    .overflow(wr_overflow)
  );

  // pairs with a cell that failed verification and are not yet marked
  logic [PAIRS-1:0] new_bad;
  always_comb
    for (int p = 0; p < PAIRS; p++)
      new_bad[p] = (vfy_q[2*p] | vfy_q[2*p+1]) & ~marks_q[p];

  function automatic logic [7:0] popcount(input logic [PAIRS-1:0] v);
    logic [7:0] n;
    n = '0;
    for (int i = 0; i < PAIRS; i++) n += 8'(v[i]);
    return n;
  endfunction

  assign req_ready  = (state == IDLE);
  assign arr_valid  = (state == RD_ISSUE) || (state == WR_ISSUE && wr_allow && !wr_overflow);
  assign arr_write  = (state == WR_ISSUE);
  assign arr_revive = retry_q;
  assign arr_addr   = addr_q;
  assign arr_cells  = wr_cells;
  assign arr_check  = wr_check;
  assign wr_req     = (state == WR_ISSUE) && !wr_overflow && arr_ready;
  assign wr_start   = wr_req && wr_allow;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state             <= IDLE;
      is_write          <= 1'b0;
      addr_q            <= '0;
      wdata_q           <= '0;
      marks_q           <= '0;
      retry_q           <= 1'b0;
      rcells_q          <= '0;
      rcheck_q          <= '0;
      vfy_q             <= '0;
      rsp_valid         <= 1'b0;
      rsp_rdata         <= '0;
      rsp_tec_corrected <= 1'b0;
      rsp_uncorrectable <= 1'b0;
      rsp_write_fail    <= 1'b0;
      rsp_marks         <= '0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (state)
        IDLE: if (req_valid) begin
          is_write <= req_write;
          addr_q   <= req_addr;
          wdata_q  <= req_wdata;
          retry_q  <= 1'b0;
          state    <= RD_ISSUE;
        end
        RD_ISSUE: if (arr_ready) state <= RD_WAIT;
        RD_WAIT: if (arr_rsp_valid) begin
          rcells_q <= arr_rsp_cells;
          rcheck_q <= arr_rsp_check;
          state    <= RD_DONE;
        end
        RD_DONE: begin
          if (is_write) begin
            marks_q <= rd_marks;
            state   <= WR_ISSUE;
          end else begin
            rsp_valid         <= 1'b1;
            rsp_rdata         <= rd_data;
            rsp_tec_corrected <= rd_tec_corr;
            rsp_uncorrectable <= rd_tec_unc | rd_hec_unc;
            rsp_write_fail    <= 1'b0;
            rsp_marks         <= rd_mark_count;
            state             <= IDLE;
          end
        end
        WR_ISSUE: begin
          if (wr_overflow) begin
            rsp_valid         <= 1'b1;
            rsp_rdata         <= '0;
            rsp_tec_corrected <= 1'b0;
            rsp_uncorrectable <= 1'b0;
            rsp_write_fail    <= 1'b1;
            rsp_marks         <= popcount(marks_q);
            state             <= IDLE;
          end else if (wr_allow && arr_ready) begin
            state <= WR_WAIT;
          end
        end
        WR_WAIT: if (arr_rsp_valid) begin
          vfy_q <= arr_rsp_vfy_fail;
          state <= WR_CHECK;
        end
        WR_CHECK: begin
          if (new_bad == '0) begin
            rsp_valid         <= 1'b1;
            rsp_rdata         <= '0;
            rsp_tec_corrected <= 1'b0;
            rsp_uncorrectable <= 1'b0;
            rsp_write_fail    <= 1'b0;
            rsp_marks         <= popcount(marks_q);
            state             <= IDLE;
          end else begin
            marks_q <= marks_q | new_bad;
            retry_q <= 1'b1;
            state   <= WR_ISSUE;   // overflow is caught there
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) wr_start |-> arr_valid && arr_write)
    else $error("write window charged without an array write");
endmodule

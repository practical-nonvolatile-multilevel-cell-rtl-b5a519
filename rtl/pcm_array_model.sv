// pcm_array_model: behavioural model of the three-level-cell PCM array
// (not synthesizable: the cells are analog and the storage is sparse).
//
// Each block holds 354 ternary cells and 10 single-level check cells. A
// cell is kept as its log10 resistance in hundredths of a decade: S1 = 3.00
// (1 kOhm, fully crystalline), S2 = 4.00, S4 = 6.00 (1 MOhm, amorphous). A
// read senses every cell against two thresholds (TAU1, TAU2; single-level
// cells against TAU_SLC) and returns 2-bit codes S1 = 00, S2 = 01, S4 = 11.
// A write is iterative write-and-verify: a healthy cell is programmed to its
// nominal value; afterwards every cell is sensed again and 'rsp_vfy_fail'
// reports the ternary cells whose state differs from the target. Wearout is
// modelled with two stuck modes: stuck-reset holds S4, stuck-set holds S1.
// With 'cmd_revive' set, a stuck-set cell whose target is S4 receives a
// reverse-current pulse that forces it into S4, where it then stays.
// Resistance drift is injected explicitly: 'inj_kind' DRIFT raises one
// cell's log resistance by 'inj_amount'. Blocks are stored sparsely, so the
// full 2^28-block (16 GB) address space is available; a never-written block
// reads as all cells in S1, which is a valid all-zero codeword.
//
// Interface: one command at a time, accepted when cmd_ready is high; the
// response pulse rsp_valid comes READ_CYCLES (200 ns) or WRITE_CYCLES (1 us)
// cycles later, at a 1 GHz clock. Fault injection acts at once, any time.
// Default thresholds are those of the simple three-level mapping, taken
// from the uniform four-level mapping with S3 removed (3.5 and 5.5 decades);
// the single-level threshold 4.5 is this model's own choice.
module pcm_array_model
  import tlc_pkg::*;
#(
  parameter int unsigned ADDR_W       = 28,     // 16 GB of 64 B blocks
  parameter int unsigned READ_CYCLES  = 200,
  parameter int unsigned WRITE_CYCLES = 1000,
  parameter int unsigned NOM_S1       = 300,
  parameter int unsigned NOM_S2       = 400,
  parameter int unsigned NOM_S4       = 600,
  parameter int unsigned TAU1         = 350,
  parameter int unsigned TAU2         = 550,
  parameter int unsigned TAU_SLC      = 450,
  parameter int unsigned LOGR_MAX     = 800
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // command port
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  logic                  cmd_write,
  input  logic                  cmd_revive,
  input  logic [ADDR_W-1:0]     cmd_addr,
  input  logic [MSG_BITS-1:0]   cmd_cells,
  input  logic [CHECK_BITS-1:0] cmd_check,
  // response
  output logic                  rsp_valid,
  output logic [MSG_BITS-1:0]   rsp_cells,
  output logic [CHECK_BITS-1:0] rsp_check,
  output logic [CELLS-1:0]      rsp_vfy_fail,
  // fault injection
  input  logic                  inj_valid,
  input  logic [ADDR_W-1:0]     inj_addr,
  input  logic [8:0]            inj_cell,    // 0..353 ternary, 354..363 check
  input  logic [1:0]            inj_kind,    // 0 clear, 1 stuck-reset, 2 stuck-set, 3 drift
  input  logic [9:0]            inj_amount   // drift, hundredths of a decade
);
  localparam int unsigned LW = 10;
  localparam int unsigned NC = TOTAL_CELLS;

  typedef logic [NC*LW-1:0] block_logr_t;
  typedef logic [NC*2-1:0]  block_fault_t;   // per cell: 0 ok, 1 reset, 2 set

  block_logr_t  logr  [logic [ADDR_W-1:0]];
  block_fault_t fault [logic [ADDR_W-1:0]];

  logic                  busy;
  int unsigned           count;
  logic                  op_write;
  logic [ADDR_W-1:0]     op_addr;
  logic [MSG_BITS-1:0]   op_cells;
  logic [CHECK_BITS-1:0] op_check;
  logic                  op_revive;

  assign cmd_ready = !busy;

  function automatic block_logr_t fresh_block();
    block_logr_t b;
    for (int c = 0; c < NC; c++) b[c*LW +: LW] = LW'(NOM_S1);
    return b;
  endfunction

  function automatic logic [1:0] sense3(input logic [LW-1:0] r);
    if (32'(r) < TAU1)      return ST_S1;
    else if (32'(r) < TAU2) return ST_S2;
    else                    return ST_S4;
  endfunction

  function automatic logic [LW-1:0] nominal(input logic [1:0] code);
    if (code[1])      return LW'(NOM_S4);
    else if (code[0]) return LW'(NOM_S2);
    else              return LW'(NOM_S1);
  endfunction

  task automatic do_read(input logic [ADDR_W-1:0] a);
    block_logr_t b;
    b = logr.exists(a) ? logr[a] : fresh_block();
    for (int c = 0; c < CELLS; c++) rsp_cells[2*c +: 2] <= sense3(b[c*LW +: LW]);
    for (int k = 0; k < CHECK_BITS; k++)
      rsp_check[k] <= (32'(b[(CELLS+k)*LW +: LW]) >= TAU_SLC);
  endtask

  task automatic do_write(input logic [ADDR_W-1:0] a);
    block_logr_t  b;
    block_fault_t f;
    logic [1:0]   tgt;
    b = logr.exists(a)  ? logr[a]  : fresh_block();
    f = fault.exists(a) ? fault[a] : '0;
    for (int c = 0; c < NC; c++) begin
      if (c < CELLS) tgt = op_cells[2*c +: 2];
      else           tgt = op_check[c-CELLS] ? ST_S4 : ST_S1;
      if (f[2*c +: 2] == 2'd2 && op_revive && tgt == ST_S4)
        f[2*c +: 2] = 2'd1;                         // reverse-current revival
      case (f[2*c +: 2])
        2'd1:    b[c*LW +: LW] = LW'(NOM_S4);         // stuck-reset
        2'd2:    b[c*LW +: LW] = LW'(NOM_S1);         // stuck-set
        default: b[c*LW +: LW] = nominal(tgt);
      endcase
      if (c < CELLS)
        rsp_vfy_fail[c] <= (sense3(b[c*LW +: LW]) != (tgt[1] ? ST_S4 : tgt));
    end
    logr[a]  = b;
    fault[a] = f;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      count        <= 0;
      rsp_valid    <= 1'b0;
      rsp_cells    <= '0;
      rsp_check    <= '0;
      rsp_vfy_fail <= '0;
      op_write     <= 1'b0;
      op_revive    <= 1'b0;
      op_addr      <= '0;
      op_cells     <= '0;
      op_check     <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (!busy && cmd_valid) begin
        busy      <= 1'b1;
        count     <= (cmd_write ? WRITE_CYCLES : READ_CYCLES) - 1;
        op_write  <= cmd_write;
        op_revive <= cmd_revive;
        op_addr   <= cmd_addr;
        op_cells  <= cmd_cells;
        op_check  <= cmd_check;
      end else if (busy) begin
        if (count == 0) begin
          busy      <= 1'b0;
          rsp_valid <= 1'b1;
          if (op_write) begin
            do_write(op_addr);
            do_read(op_addr);
          end else begin
            rsp_vfy_fail <= '0;
            do_read(op_addr);
          end
        end else begin
          count <= count - 1;
        end
      end
    end
  end

  // fault injection acts on the stored block directly
  always @(posedge clk) begin
    if (rst_n && inj_valid && 32'(inj_cell) < NC) begin
      block_logr_t  b;
      block_fault_t f;
      b = logr.exists(inj_addr)  ? logr[inj_addr]  : fresh_block();
      f = fault.exists(inj_addr) ? fault[inj_addr] : '0;
      case (inj_kind)
        2'd0: f[2*inj_cell +: 2] = 2'd0;
        2'd1: begin
          f[2*inj_cell +: 2] = 2'd1;
          b[inj_cell*LW +: LW] = LW'(NOM_S4);
        end
        2'd2: begin
          f[2*inj_cell +: 2] = 2'd2;
          b[inj_cell*LW +: LW] = LW'(NOM_S1);
        end
        default: begin
          if (32'(b[inj_cell*LW +: LW]) + 32'(inj_amount) > LOGR_MAX)
            b[inj_cell*LW +: LW] = LW'(LOGR_MAX);
          else
            b[inj_cell*LW +: LW] = b[inj_cell*LW +: LW] + inj_amount;
        end
      endcase
      logr[inj_addr]  = b;
      fault[inj_addr] = f;
    end
  end
endmodule

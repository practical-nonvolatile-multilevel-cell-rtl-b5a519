// tb_ref_pkg: reference models for the testbenches, written independently
// of the RTL. The 3-ON-2 table is the example state table itself (cell
// states S1/S2/S4 as 0/1/2), the Hamming positions are found by plain
// enumeration, and mark-and-spare placement is done with a scalar loop.
package tb_ref_pkg;

  localparam int NPAIR = 177;
  localparam int NDATA = 171;
  localparam int NMSG  = 708;
  localparam int NCHK  = 10;

  // state table: value v -> (first, second) cell states, 0=S1 1=S2 2=S4
  localparam int T_FIRST  [9] = '{0, 0, 0, 1, 1, 1, 2, 2, 2};
  localparam int T_SECOND [9] = '{0, 1, 2, 0, 1, 2, 0, 1, 2};  // row 8 = INV

  function automatic logic [1:0] code_of(input int st);   // S1 00, S2 01, S4 11
    case (st)
      0: return 2'b00;
      1: return 2'b01;
      default: return 2'b11;
    endcase
  endfunction

  function automatic int state_of(input logic [1:0] c);
    case (c)
      2'b00: return 0;
      2'b01: return 1;
      default: return 2;
    endcase
  endfunction

  // row index (0..7 data, 8 INV) of a cell pair
  function automatic int table_row(input logic [1:0] c0, input logic [1:0] c1);
    for (int r = 0; r < 9; r++)
      if (T_FIRST[r] == state_of(c0) && T_SECOND[r] == state_of(c1)) return r;
    return -1;
  endfunction

  function automatic int ham_pos(input int k);
    int n = 0;
    for (int q = 1; q < 4096; q++) begin
      if (q == 1 || q == 2 || q == 4 || q == 8 || q == 16 || q == 32 ||
          q == 64 || q == 128 || q == 256 || q == 512 || q == 1024 || q == 2048)
        continue;
      if (n == k) return q;
      n++;
    end
    return -1;
  endfunction

  function automatic logic [NCHK-1:0] ham_check(input logic [NMSG-1:0] m);
    logic [NCHK-1:0] c = '0;
    for (int k = 0; k < NMSG; k++)
      if (m[k]) c ^= NCHK'(ham_pos(k));
    return c;
  endfunction

  // reference write-side layout: 177 rows (0..7 data, 8 INV), data in
  // order over unmarked slots, filler row 0 after the data
  function automatic void ref_layout(input logic [511:0] d, input logic [NPAIR-1:0] marks,
                                     output int rows [NPAIR], output bit ok);
    int n = 0;
    logic [512:0] dd = {1'b0, d};
    for (int p = 0; p < NPAIR; p++) begin
      if (marks[p])        rows[p] = 8;
      else if (n < NDATA) begin rows[p] = int'(dd[3*n +: 3]); n++; end
      else                 rows[p] = 0;
    end
    ok = (n == NDATA);
  endfunction

  function automatic void ref_cells(input int rows [NPAIR], output logic [NMSG-1:0] m);
    for (int p = 0; p < NPAIR; p++) begin
      m[4*p +: 2]   = code_of(T_FIRST[rows[p]]);
      m[4*p+2 +: 2] = code_of(T_SECOND[rows[p]]);
    end
  endfunction

  function automatic logic [511:0] rand512();
    logic [511:0] r;
    for (int i = 0; i < 16; i++) r[32*i +: 32] = $urandom;
    return r;
  endfunction

  function automatic logic [NPAIR-1:0] rand_marks(input int n);
    logic [NPAIR-1:0] m = '0;
    int placed = 0;
    while (placed < n) begin
      int p = $urandom_range(NPAIR-1);
      if (!m[p]) begin m[p] = 1'b1; placed++; end
    end
    return m;
  endfunction

endpackage

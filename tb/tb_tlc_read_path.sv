// tb_tlc_read_path: blocks built with the reference 3-ON-2 table, reference
// placement and reference Hamming code are read back through the full read
// path: clean, with a one-state drift in any cell (including S2 -> S4 that
// turns a pair into INV), with 0..6 marks, with seven marks (uncorrectable)
// and with a double drift error.
module tb_tlc_read_path;
  import tlc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [707:0] cells;
  logic [9:0]   chk;
  logic [511:0] data;
  logic [176:0] marks;
  logic [7:0]   mcount;
  logic tcorr, tunc, hunc;
  int n_inv_drift = 0;

  tlc_read_path dut (.cells(cells), .check(chk), .data(data), .marks(marks),
                     .mark_count(mcount), .tec_corrected(tcorr),
                     .tec_uncorrectable(tunc), .hec_uncorrectable(hunc));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      logic [511:0] d;
      logic [176:0] m;
      logic [707:0] img;
      int rows [177];
      bit ok;
      int nm;
      int drift;
      nm = (t < 350) ? t % 7 : 7;
      d = rand512();
      m = rand_marks(nm);
      ref_layout(d, m, rows, ok);
      ref_cells(rows, img);
      cells = img;
      chk = ham_check(img);
      drift = -1;
      if (t % 2 == 1 && t < 350) begin
        // raise one cell by one state (S1->S2 or S2->S4); S4 cells stay
        for (int tries = 0; tries < 50 && drift < 0; tries++) begin
          automatic int c = $urandom_range(353);
          if (img[2*c +: 2] != 2'b11) begin
            drift = c;
            cells[2*c +: 2] = (img[2*c +: 2] == 2'b00) ? 2'b01 : 2'b11;
            if (cells[4*(c/2) +: 4] == 4'b1111) n_inv_drift++;
          end
        end
      end
      #1;
      checks++;
      if (nm <= 6 && data != d) begin
        failures++;
        if (failures < 5) $display("t=%0d data wrong (marks %0d, drift %0d)", t, nm, drift);
      end
      checks++;
      if (tcorr != (drift >= 0) || tunc) failures++;
      checks++;
      if (hunc != (nm > 6) || marks != m || mcount != 8'(nm)) failures++;
    end
    // two drift errors must not pass as clean
    for (int t = 0; t < 50; t++) begin
      logic [707:0] img;
      int rows [177];
      bit ok;
      ref_layout(rand512(), '0, rows, ok);
      ref_cells(rows, img);
      chk = ham_check(img);
      cells = img;
      cells[2*t]       = ~cells[2*t];
      cells[2*t + 301] = ~cells[2*t + 301];
      #1;
      checks++;
      if (!tcorr && !tunc) failures++;
    end
    checks++;
    if (n_inv_drift == 0) begin
      failures++;
      $display("no drift into the INV state was exercised");
    end
    $display("drifts into INV corrected: %0d", n_inv_drift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

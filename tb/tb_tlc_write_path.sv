// tb_tlc_write_path: the cell image and check bits written for random data
// and 0..8 marks are compared with the reference table, placement and
// Hamming code; more than six marks must overflow.
module tb_tlc_write_path;
  import tlc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [511:0] data;
  logic [176:0] marks;
  logic [707:0] cells;
  logic [9:0]   chk;
  logic ovf;

  tlc_write_path dut (.data(data), .marks(marks), .cells(cells), .check(chk), .overflow(ovf));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      logic [707:0] img;
      int rows [177];
      bit ok;
      int nm;
      nm = t % 9;
      data = rand512();
      marks = rand_marks(nm);
      ref_layout(data, marks, rows, ok);
      ref_cells(rows, img);
      #1;
      checks++;
      if (ovf != (nm > 6)) failures++;
      if (nm <= 6) begin
        checks++;
        if (cells != img) begin
          failures++;
          if (failures < 5) $display("t=%0d cell image wrong", t);
        end
        checks++;
        if (chk != ham_check(img)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_restore_circuit: the read port is modelled as a table of segment
// numbers and segmented flags; checks that every column comes out once, in
// order, one per cycle, with unsegmented pixels given number 0, and that
// done pulses with the last column.
module tb_restore_circuit;
  import seg_pkg::*;
  localparam int ROWS = 10, COLS = 10;
  logic clk = 0, rst_n = 0, start, out_valid, busy, done;
  logic [$clog2(COLS+1)-1:0] rd_col, out_col;
  label_t rd_label [ROWS], out_label [ROWS];
  logic [ROWS-1:0] rd_seg;
  int tbl_label [COLS][ROWS];
  bit tbl_seg [COLS][ROWS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  restore_circuit #(.ROWS(ROWS), .COLS(COLS)) dut (.clk, .rst_n, .start, .rd_col, .rd_label,
    .rd_seg, .out_valid, .out_col, .out_label, .busy, .done);

  always_comb
    for (int r = 0; r < ROWS; r++) begin
      rd_label[r] = (rd_col < COLS) ? label_t'(tbl_label[rd_col][r]) : '0;
      rd_seg[r]   = (rd_col < COLS) ? tbl_seg[rd_col][r] : 1'b0;
    end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 3; frame++) begin
      int col_seen, first_cycle, cyc;
      for (int c = 0; c < COLS; c++)
        for (int r = 0; r < ROWS; r++) begin
          tbl_label[c][r] = $urandom_range(1, 63);
          tbl_seg[c][r] = ($urandom_range(0, 3) != 0);
        end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      col_seen = 0; cyc = 0; first_cycle = -1;
      while (col_seen < COLS && cyc < 100) begin
        if (out_valid) begin
          if (first_cycle < 0) first_cycle = cyc;
          expect_eq("column order", int'(out_col), col_seen);
          expect_eq("one column per cycle", cyc - first_cycle, col_seen);
          for (int r = 0; r < ROWS; r++)
            expect_eq("label", int'(out_label[r]),
                      tbl_seg[col_seen][r] ? tbl_label[col_seen][r] : 0);
          expect_eq("done with last column", int'(done), (col_seen == COLS - 1) ? 1 : 0);
          col_seen++;
        end
        @(negedge clk);
        cyc++;
      end
      expect_eq("columns", col_seen, COLS);
      expect_eq("valid ends", int'(out_valid), 0);
      expect_eq("not busy", int'(busy), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

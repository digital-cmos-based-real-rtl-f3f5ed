// tb_weight_calc_circuit: streams pictures column by column (random gaps in
// in_valid) in colour and gray-scale mode and compares the four weights per
// row of every column record with the reference, including the zero weights
// at the left and bottom borders, the last-column flag and the rate of one
// column per 2 cycles when input is continuous.
module tb_weight_calc_circuit;
  import seg_pkg::*;
  import seg_ref_pkg::*;
  localparam int ROWS = 10, COLS = 10;
  logic clk = 0, rst_n = 0, gray, in_valid, in_ready, out_valid, out_last;
  rgb_t in_col [ROWS];
  wcode_t oh [ROWS], ov [ROWS], od1 [ROWS], od2 [ROWS];
  img_t ir, ig, ib;
  int checks = 0, failures = 0;
  int rec_col, rec_cycle [$];
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  weight_calc_circuit #(.ROWS(ROWS), .COLS(COLS)) dut (.clk, .rst_n, .gray_mode(gray),
    .in_valid, .in_ready, .in_col, .out_valid, .out_last, .out_h(oh), .out_v(ov),
    .out_d1(od1), .out_d2(od2));

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // checker: compares every record with the reference
  always @(negedge clk) if (rst_n && out_valid) begin
    int i;
    i = rec_col;
    for (int j = 0; j < ROWS; j++) begin
      expect_eq("h",  int'(oh[j]),  ref_w(ir, ig, ib, ROWS, COLS, gray, j, i - 1, j, i));
      expect_eq("v",  int'(ov[j]),  ref_w(ir, ig, ib, ROWS, COLS, gray, j, i, j + 1, i));
      expect_eq("d1", int'(od1[j]), ref_w(ir, ig, ib, ROWS, COLS, gray, j, i - 1, j + 1, i));
      expect_eq("d2", int'(od2[j]), ref_w(ir, ig, ib, ROWS, COLS, gray, j + 1, i - 1, j, i));
    end
    expect_eq("last", int'(out_last), (i == COLS - 1) ? 1 : 0);
    rec_cycle.push_back(cyc);
    rec_col = (i == COLS - 1) ? 0 : i + 1;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; gray = 0; rec_col = 0;
    for (int j = 0; j < ROWS; j++) in_col[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 8; frame++) begin
      bit gaps;
      gray = frame[0];
      gaps = frame[1];
      gen_image(ir, ig, ib, ROWS, COLS, frame % 3);
      rec_cycle.delete();
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        while (gaps && $urandom_range(0, 2) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        for (int j = 0; j < ROWS; j++) in_col[j] = '{8'(ir[j][c]), 8'(ig[j][c]), 8'(ib[j][c])};
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
      @(negedge clk);
      in_valid = 0;
      repeat (3) @(negedge clk);
      expect_eq("records per frame", rec_cycle.size(), COLS);
      if (!gaps)
        for (int k = 1; k < rec_cycle.size(); k++)
          expect_eq("record spacing", rec_cycle[k] - rec_cycle[k-1], 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

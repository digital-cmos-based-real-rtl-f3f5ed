// tb_seg_chip_serial: end-to-end test of the segmentation chip built with the
// weight-serial (high-density) cells, SERIAL = 1, otherwise at default size.
// Same frames and checks as the weight-parallel test; only the cycle budget
// differs: 9 cycles per excitation step, so (9 (k + 1) + 3) cycles per
// segment of k growth steps, plus 1.
// Pictures (random, coloured rectangles with noise, noisy gradients) are
// streamed in column by column, in colour and gray-scale mode, with random
// gaps in in_valid and with the next frame offered while the chip is busy.
// Each frame's segment numbers are compared with the reference model, and
// the latency from the last accepted column to frame_done is checked
// against the cycle budget: read-out one cycle per column plus 5 cycles of
// pipeline on top of the segmentation time.
// Counts and requires: colour and gray-scale frames, input gaps, back-
// pressure, segments grown over several steps, unsegmented pixels, a frame
// without leaders and a frame that runs out of segment numbers (overflow).
module tb_seg_chip_serial;
  import seg_pkg::*;
  import seg_ref_pkg::*;
  localparam int ROWS = 10, COLS = 10;
  localparam int BW = $clog2(COLS + 1);
  logic clk = 0, rst_n = 0, gray, in_valid, in_ready, out_valid, frame_done, overflow, busy;
  wsum_t phi_p, phi_z;
  rgb_t in_col [ROWS];
  logic [BW-1:0] out_col;
  label_t out_label [ROWS];
  int checks = 0, failures = 0, cyc = 0;
  int n_colour = 0, n_gray = 0, n_gap = 0, n_backpressure = 0, n_multistep = 0;
  int n_unlabelled = 0, n_noleader = 0, n_overflow = 0, n_checker = 0;
  int got [MAXR][MAXC];
  int last_accept_cyc, done_cyc;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  seg_chip #(.SERIAL(1'b1)) dut (.clk, .rst_n, .gray_mode(gray), .phi_p, .phi_z, .in_valid, .in_ready, .in_col,
                .out_valid, .out_col, .out_label, .frame_done, .overflow, .busy);

  task automatic expect_eq(string what, int got_v, int exp);
    checks++;
    if (got_v != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", what, got_v, exp);
    end
  endtask

  // result capture (the image-segmentation memory)
  always @(posedge clk) if (rst_n) begin
    if (out_valid) for (int r = 0; r < ROWS; r++) got[r][out_col] = int'(out_label[r]);
    if (in_valid && !in_ready) n_backpressure++;
  end

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    img_t ir, ig, ib, lead, lab;
    nbw_t nbw;
    int nseg, nsteps, seg_cycles;
    bit ovf;
    in_valid = 0; gray = 0; phi_p = '0; phi_z = '0;
    for (int j = 0; j < ROWS; j++) in_col[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 24; frame++) begin
      int kind;
      bit gaps;
      gray = (frame % 3 == 1);
      gaps = (frame % 4 == 2);
      kind = (frame < 2) ? 1 : frame % 3;
      gen_image(ir, ig, ib, ROWS, COLS, kind);
      case (frame % 8)
        3:       begin phi_p = 11'd200; phi_z = 11'd100; kind = 3; gen_image(ir, ig, ib, ROWS, COLS, 3); n_checker++; end
        5:       begin phi_p = 11'd0;    phi_z = 11'd2000; kind = 1; gen_image(ir, ig, ib, ROWS, COLS, 1); end
        6:       begin phi_p = 11'd2000; phi_z = 11'd64;   end
        default: begin phi_p = wsum_t'($urandom_range(60, 400)); phi_z = wsum_t'($urandom_range(4, 130)); end
      endcase
      ref_neighbours(ir, ig, ib, ROWS, COLS, gray, nbw);
      ref_segment(nbw, ROWS, COLS, int'(phi_p), int'(phi_z), lead, lab, nseg, nsteps, ovf);
      // stream the columns; the first column is offered while the chip may still be busy
      for (int c = 0; c < COLS; c++) begin
        if (gaps && $urandom_range(0, 1) == 0) begin
          in_valid = 0;
          n_gap++;
          repeat ($urandom_range(1, 3)) @(negedge clk);
        end
        in_valid = 1;
        for (int j = 0; j < ROWS; j++) in_col[j] = '{8'(ir[j][c]), 8'(ig[j][c]), 8'(ib[j][c])};
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        last_accept_cyc = cyc;
      end
      in_valid = 0;
      done_cyc = -1;
      for (int t = 0; t < 5000 && done_cyc < 0; t++) begin
        @(negedge clk);
        if (frame_done) done_cyc = cyc;
      end
      @(negedge clk);   // the last column is captured at this edge
      // compare
      seg_cycles = 12 * (ovf ? MAXLABEL : nseg) + 9 * nsteps + 1;
      expect_eq("frame latency", done_cyc - last_accept_cyc, seg_cycles + COLS + 5);
      expect_eq("overflow flag", int'(overflow), int'(ovf));
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          expect_eq("segment number", got[r][c], lab[r][c]);
          if (lab[r][c] == 0) n_unlabelled++;
        end
      if (gray) n_gray++; else n_colour++;
      if (nseg == 0) n_noleader++;
      if (ovf) n_overflow++;
      if (nsteps > nseg) n_multistep++;
      if (kind == 3) $display("checkerboard frame: %0d cycles from last column to frame_done",
                              done_cyc - last_accept_cyc);
      $display("frame %0d: %s phi_p=%0d phi_z=%0d segments=%0d steps=%0d overflow=%0d",
               frame, gray ? "gray" : "colour", phi_p, phi_z, nseg, nsteps, ovf);
      // offer the next frame at once in some frames, after a pause in others
      if (frame % 2 == 0) repeat (3) @(negedge clk);
    end
    $display("colour=%0d gray=%0d gaps=%0d backpressure=%0d multistep=%0d unlabelled=%0d noleader=%0d overflow=%0d",
             n_colour, n_gray, n_gap, n_backpressure, n_multistep, n_unlabelled, n_noleader, n_overflow);
    checks += 9;
    if (n_checker == 0)      begin failures++; $display("no checkerboard frame"); end
    if (n_colour == 0)       begin failures++; $display("no colour frame"); end
    if (n_gray == 0)         begin failures++; $display("no gray-scale frame"); end
    if (n_gap == 0)          begin failures++; $display("no input gap"); end
    if (n_backpressure == 0) begin failures++; $display("no back-pressure"); end
    if (n_multistep == 0)    begin failures++; $display("no multi-step growth"); end
    if (n_unlabelled == 0)   begin failures++; $display("no unsegmented pixel"); end
    if (n_noleader == 0)     begin failures++; $display("no frame without leaders"); end
    if (n_overflow == 0)     begin failures++; $display("no overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

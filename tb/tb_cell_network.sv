// tb_cell_network: loads reference pictures into the network through its
// load port (weights and leader flags worked out by the reference model),
// then issues the segmentation commands itself: self-excitation, excitation
// until the global inhibitor z stays low, inhibition, labelling. Checks the
// self-excited cell, the number of growth steps and of segments, any_leader
// at the end, and finally every cell's segment number through the read port.
module tb_cell_network;
  import seg_pkg::*;
  import seg_ref_pkg::*;
  localparam int ROWS = 10, COLS = 10;
  localparam int BW = $clog2(COLS + 1);
  logic clk = 0, rst_n = 0, ld_valid, ld_p_en, z, any_leader;
  logic [BW-1:0] ld_b, rd_col;
  wcode_t lvl [ROWS], lvr [ROWS], lh [ROWS], ld1 [ROWS], ld2 [ROWS];
  logic [ROWS-1:0] ld_p, rd_seg;
  cell_cmd_e cmd;
  wsum_t phi_z;
  label_t label, rd_label [ROWS];
  logic [ROWS*COLS-1:0] x_map;
  img_t ir, ig, ib, lead, lab;
  nbw_t nbw;
  bit gray;
  int checks = 0, failures = 0, multi_step_segments = 0, unlabelled = 0;

  always #5 clk = ~clk;

  cell_network #(.ROWS(ROWS), .COLS(COLS)) dut (.clk, .rst_n, .ld_valid, .ld_b, .ld_vl(lvl),
    .ld_vr(lvr), .ld_h(lh), .ld_d1(ld1), .ld_d2(ld2), .ld_p_en, .ld_p, .cmd, .step_phase(4'd0), .phi_z, .label,
    .z, .any_leader, .x_map, .rd_col, .rd_label, .rd_seg);

  function automatic int w(int r1, int c1, int r2, int c2);
    return ref_w(ir, ig, ib, ROWS, COLS, gray, r1, c1, r2, c2);
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int phi_p, nseg, nsteps;
    bit ovf;
    ld_valid = 0; ld_p_en = 0; ld_b = '0; ld_p = '0; cmd = CMD_NOP; phi_z = '0; label = '0;
    rd_col = '0;
    for (int j = 0; j < ROWS; j++) begin lvl[j] = '0; lvr[j] = '0; lh[j] = '0; ld1[j] = '0; ld2[j] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 12; frame++) begin
      int segs, steps, fr, fc;
      gray = frame[0];
      gen_image(ir, ig, ib, ROWS, COLS, frame % 3);
      phi_p = (frame % 4 == 3) ? 0 : $urandom_range(100, 500);
      phi_z = wsum_t'((frame % 4 == 3) ? 2000 : $urandom_range(8, 200));
      ref_neighbours(ir, ig, ib, ROWS, COLS, gray, nbw);
      ref_segment(nbw, ROWS, COLS, phi_p, int'(phi_z), lead, lab, nseg, nsteps, ovf);
      // load, weight-register columns 0..COLS
      for (int b = 0; b <= COLS; b++) begin
        @(negedge clk);
        ld_valid = 1;
        ld_b = BW'(b);
        ld_p_en = (b > 0);
        for (int j = 0; j < ROWS; j++) begin
          lvl[j] = 3'(w(j, b - 1, j + 1, b - 1));
          lvr[j] = 3'(w(j, b, j + 1, b));
          lh[j]  = 3'(w(j, b - 1, j, b));
          ld1[j] = 3'(w(j, b - 1, j + 1, b));
          ld2[j] = 3'(w(j + 1, b - 1, j, b));
          ld_p[j] = (b > 0) ? lead[j][b-1][0] : 1'b0;
        end
      end
      @(negedge clk);
      ld_valid = 0;
      // segmentation, commands issued by the testbench
      segs = 0; steps = 0;
      while (any_leader && segs < MAXLABEL) begin
        int g;
        // expected first free leader in column-major order
        fr = -1; fc = -1;
        for (int c = 0; c < COLS && fr < 0; c++)
          for (int r = 0; r < ROWS && fr < 0; r++)
            if (lead[r][c] != 0 && !(lab[r][c] != 0 && lab[r][c] <= segs)) begin fr = r; fc = c; end
        cmd = CMD_SELF_EXC;
        @(negedge clk);
        segs++;
        checks++;
        if (fr < 0 || x_map != (ROWS*COLS)'(1) << (fc * ROWS + fr)) begin
          failures++;
          $display("self-excitation: x_map %h, expected cell (%0d,%0d)", x_map, fr, fc);
        end
        cmd = CMD_EXCITE;
        #1;
        g = 0;
        while (z) begin
          @(negedge clk);
          g++;
          #1;
        end
        steps += g;
        if (g > 1) multi_step_segments++;
        @(negedge clk);
        cmd = CMD_INHIBIT;
        @(negedge clk);
        checks++;
        if (x_map != '0) begin failures++; $display("inhibition left x_map %h", x_map); end
        cmd = CMD_LABEL;
        label = label_t'(segs);
        @(negedge clk);
        cmd = CMD_NOP;
      end
      expect_eq("segments", segs, nseg);
      expect_eq("growth steps", steps, nsteps);
      expect_eq("any_leader after run", int'(any_leader), int'(ovf));
      for (int c = 0; c < COLS; c++) begin
        rd_col = BW'(c);
        #1;
        for (int r = 0; r < ROWS; r++) begin
          expect_eq("segmented flag", int'(rd_seg[r]), (lab[r][c] != 0) ? 1 : 0);
          if (lab[r][c] != 0) expect_eq("segment number", int'(rd_label[r]), lab[r][c]);
          else unlabelled++;
        end
      end
    end
    $display("segments grown in more than one step: %0d, unlabelled pixels: %0d",
             multi_step_segments, unlabelled);
    checks++;
    if (multi_step_segments == 0 || unlabelled == 0) begin
      failures++;
      $display("multi-step growth or unlabelled pixels never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_leader_calc_circuit: feeds weight records of reference pictures (one
// every 2 or more cycles, as stage 1 delivers them) and checks every load
// word: column index, the five weight vectors of the weight-register column
// (zero at the borders), the leader flags of the cell column to its left
// against the reference leader rule for several thresholds, the extra
// right-border word and its ld_last flag, and the one-cycle latency.
module tb_leader_calc_circuit;
  import seg_pkg::*;
  import seg_ref_pkg::*;
  localparam int ROWS = 10, COLS = 10;
  logic clk = 0, rst_n = 0, in_valid, in_last, ld_valid, ld_last, ld_p_en;
  wsum_t phi_p;
  wcode_t ih [ROWS], iv [ROWS], id1 [ROWS], id2 [ROWS];
  logic [$clog2(COLS+1)-1:0] ld_b;
  wcode_t lvl [ROWS], lvr [ROWS], lh [ROWS], ld1 [ROWS], ld2 [ROWS];
  logic [ROWS-1:0] ld_p;
  img_t ir, ig, ib, lead, lab;
  nbw_t nbw;
  int checks = 0, failures = 0, nleaders = 0, exp_b = 0, words = 0;
  bit gray;

  always #5 clk = ~clk;

  leader_calc_circuit #(.ROWS(ROWS), .COLS(COLS)) dut (.clk, .rst_n, .phi_p, .in_valid, .in_last,
    .in_h(ih), .in_v(iv), .in_d1(id1), .in_d2(id2), .ld_valid, .ld_last, .ld_b, .ld_vl(lvl),
    .ld_vr(lvr), .ld_h(lh), .ld_d1(ld1), .ld_d2(ld2), .ld_p_en, .ld_p);

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

  // checker: each load word, in column order 0..COLS
  always @(negedge clk) if (rst_n && ld_valid) begin
    int b;
    b = exp_b;
    words++;
    expect_eq("ld_b", int'(ld_b), b);
    expect_eq("ld_last", int'(ld_last), (b == COLS) ? 1 : 0);
    expect_eq("ld_p_en", int'(ld_p_en), (b > 0) ? 1 : 0);
    for (int j = 0; j < ROWS; j++) begin
      expect_eq("vl", int'(lvl[j]), w(j, b - 1, j + 1, b - 1));
      expect_eq("vr", int'(lvr[j]), w(j, b, j + 1, b));
      expect_eq("h",  int'(lh[j]),  w(j, b - 1, j, b));
      expect_eq("d1", int'(ld1[j]), w(j, b - 1, j + 1, b));
      expect_eq("d2", int'(ld2[j]), w(j + 1, b - 1, j, b));
      if (b > 0) begin
        expect_eq("leader", int'(ld_p[j]), lead[j][b-1]);
        nleaders += int'(ld_p[j]);
      end
    end
    exp_b = (b == COLS) ? 0 : b + 1;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nseg, nsteps;
    bit ovf;
    in_valid = 0; in_last = 0; phi_p = '0;
    for (int j = 0; j < ROWS; j++) begin ih[j] = '0; iv[j] = '0; id1[j] = '0; id2[j] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 9; frame++) begin
      gray = frame[0];
      phi_p = wsum_t'((frame % 3 == 0) ? 0 : ((frame % 3 == 1) ? 300 : $urandom_range(100, 900)));
      gen_image(ir, ig, ib, ROWS, COLS, frame % 3);
      ref_neighbours(ir, ig, ib, ROWS, COLS, gray, nbw);
      ref_segment(nbw, ROWS, COLS, int'(phi_p), 2000, lead, lab, nseg, nsteps, ovf);
      words = 0;
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        in_valid = 1;
        in_last = (c == COLS - 1);
        for (int j = 0; j < ROWS; j++) begin
          ih[j]  = 3'(w(j, c - 1, j, c));
          iv[j]  = 3'(w(j, c, j + 1, c));
          id1[j] = 3'(w(j, c - 1, j + 1, c));
          id2[j] = 3'(w(j + 1, c - 1, j, c));
        end
        @(negedge clk);
        // latency: the word for this record is out one cycle after it
        expect_eq("latency", int'(ld_valid), 1);
        in_valid = 0;
        for (int j = 0; j < ROWS; j++) begin ih[j] = 3'd7; iv[j] = 3'd7; id1[j] = 3'd7; id2[j] = 3'd7; end
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      repeat (3) @(negedge clk);
      expect_eq("words per frame", words, COLS + 1);
    end
    checks++;
    if (nleaders == 0) begin failures++; $display("no leader seen"); end
    $display("leaders seen: %0d", nleaders);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

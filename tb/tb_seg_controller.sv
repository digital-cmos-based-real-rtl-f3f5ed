// tb_seg_controller: drives the controller with a behavioural stand-in for
// the cell network (a count of free leaders and, per segment, a number of
// growth steps during which z stays high). Checks the command order, the
// segment numbers, the cycle count (k + 4 per segment of k growth steps,
// plus 1), the done pulse, a run with no leader and the overflow stop after
// 63 segments.
module tb_seg_controller;
  import seg_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, z, any_leader, busy, done, overflow;
  cell_cmd_e cmd;
  label_t label;
  logic [3:0] step_phase;
  int checks = 0, failures = 0;

  // network stand-in
  int leaders_left, steps_left, nsteps [$];
  int labels_seen [$];
  int selfexc_seen, inhibit_seen;
  bit growing;
  int phase_errors = 0;

  always #5 clk = ~clk;

  seg_controller dut (.clk, .rst_n, .start, .z, .any_leader, .cmd, .label, .step_phase, .busy, .done,
                      .overflow);

  assign any_leader = (leaders_left > 0);
  assign z = (cmd == CMD_EXCITE) && (steps_left > 0);

  always @(posedge clk) begin
    if (cmd == CMD_SELF_EXC) begin
      selfexc_seen++;
      steps_left <= nsteps[0];
      growing <= 1;
    end
    if (cmd == CMD_EXCITE && steps_left > 0) steps_left <= steps_left - 1;
    if (cmd == CMD_INHIBIT) inhibit_seen++;
    if (rst_n && step_phase != 0) phase_errors++;
    if (cmd == CMD_LABEL) begin
      labels_seen.push_back(int'(label));
      leaders_left <= leaders_left - 1;
      void'(nsteps.pop_front());
      growing <= 0;
    end
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(int nseg, bit expect_ovf);
    int cycles, exp_cycles, done_count;
    nsteps.delete();
    labels_seen.delete();
    exp_cycles = 1;
    for (int i = 0; i < nseg; i++) begin
      int g;
      g = $urandom_range(0, 6);
      nsteps.push_back(g);
      if (!expect_ovf || i < 63) exp_cycles += g + 4;
    end
    leaders_left = nseg;
    steps_left = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    done_count = 0;
    while (!done && cycles < 5000) begin
      @(negedge clk);
      cycles++;
    end
    // cycles counts from the first SELF state up to and including the done cycle
    expect_eq("cycles", cycles - 1, exp_cycles);
    expect_eq("overflow", int'(overflow), int'(expect_ovf));
    expect_eq("segments", labels_seen.size(), expect_ovf ? 63 : nseg);
    for (int i = 0; i < labels_seen.size(); i++) expect_eq("label", labels_seen[i], i + 1);
    @(negedge clk);
    expect_eq("done is a pulse", int'(done), 0);
    expect_eq("idle", int'(busy), 0);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; leaders_left = 0; steps_left = 0; selfexc_seen = 0; inhibit_seen = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 0);
    run(5, 0);
    run(20, 0);
    run(70, 1);
    run(3, 0);
    expect_eq("inhibits match self-excitations", inhibit_seen, selfexc_seen);
    expect_eq("step_phase stays 0 with the parallel cell", phase_errors, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

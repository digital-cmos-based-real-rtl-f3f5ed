// tb_active_cell: checks the adder tree and threshold (z_i for random weight
// sets and thresholds), the leader chain (next), self-excitation with and
// without an earlier leader, inhibition, labelling and that a labelled cell
// is never excited again. State changes are checked one cycle after the
// command, the single-cycle transition of the weight-parallel cell.
module tb_active_cell;
  import seg_pkg::*;
  logic clk = 0, rst_n = 0;
  cell_cmd_e cmd;
  logic ld_en, ld_p, pre, next, x, z_i, seg_done, label_wr;
  wcode_t w_in [8];
  wsum_t phi_z;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  active_cell dut (.clk, .rst_n, .cmd, .ld_en, .ld_p, .w_in, .phi_z, .pre, .next,
                   .x, .z_i, .seg_done, .label_wr);

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int wsum();
    int s;
    s = 0;
    for (int k = 0; k < 8; k++) if (w_in[k] != 0) s += 2 ** int'(w_in[k]);
    return s;
  endfunction

  task automatic load(bit p);
    @(negedge clk);
    ld_en = 1; ld_p = p; cmd = CMD_NOP;
    @(negedge clk);
    ld_en = 0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd = CMD_NOP; ld_en = 0; ld_p = 0; pre = 0; phi_z = '0;
    for (int k = 0; k < 8; k++) w_in[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // threshold decision: random weights and thresholds on a free, unexcited cell
    load(0);
    for (int i = 0; i < 2000; i++) begin
      int s;
      @(negedge clk);
      for (int k = 0; k < 8; k++) w_in[k] = 3'($urandom_range(0, 7));
      if (i % 50 == 0) for (int k = 0; k < 8; k++) w_in[k] = 3'd7;   // maximum sum 1024
      s = wsum();
      phi_z = (i % 3 == 0) ? wsum_t'(s) : ((i % 3 == 1) ? wsum_t'(s - 1) : wsum_t'($urandom_range(0, 1100)));
      cmd = CMD_EXCITE;
      #1;
      expect_eq("z_i", int'(z_i), (s > int'(phi_z)) ? 1 : 0);
      cmd = CMD_NOP;
      #1;
      expect_eq("z_i idle", int'(z_i), 0);
    end
    // excitation changes the state one cycle later
    for (int k = 0; k < 8; k++) w_in[k] = 3'd3;   // sum 64
    phi_z = 11'd63;
    cmd = CMD_EXCITE;
    @(negedge clk);
    expect_eq("x after excite", int'(x), 1);
    expect_eq("z_i once excited", int'(z_i), 0);
    cmd = CMD_INHIBIT;
    @(negedge clk);
    expect_eq("x after inhibit", int'(x), 0);
    cmd = CMD_LABEL;
    #1;
    expect_eq("label_wr of member", int'(label_wr), 1);
    @(negedge clk);
    expect_eq("seg_done", int'(seg_done), 1);
    cmd = CMD_EXCITE;
    #1;
    expect_eq("labelled cell not excited", int'(z_i), 0);
    @(negedge clk);
    expect_eq("labelled cell x", int'(x), 0);
    cmd = CMD_LABEL;
    #1;
    expect_eq("label_wr after labelling", int'(label_wr), 0);
    // leader chain and self-excitation
    load(1);
    pre = 0;
    #1;
    expect_eq("next of free leader", int'(next), 1);
    pre = 1;
    cmd = CMD_SELF_EXC;
    @(negedge clk);
    expect_eq("leader behind an earlier one stays", int'(x), 0);
    pre = 0;
    cmd = CMD_SELF_EXC;
    @(negedge clk);
    expect_eq("self-excited", int'(x), 1);
    cmd = CMD_INHIBIT;
    @(negedge clk);
    cmd = CMD_LABEL;
    @(negedge clk);
    cmd = CMD_NOP;
    #1;
    expect_eq("used leader leaves the chain", int'(next), 0);
    pre = 1;
    #1;
    expect_eq("chain passes pre", int'(next), 1);
    load(0);
    pre = 0;
    cmd = CMD_SELF_EXC;
    @(negedge clk);
    expect_eq("ordinary cell not self-excited", int'(x), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_active_cell_serial: checks the weight-serial cell. For random weight
// sets and thresholds an excitation step is run over step_phase 0..8; z_i
// must stay low in phases 0..7, equal (sum > phi_z) in phase 8, and x must
// change only at the end of phase 8, i.e. 9 cycles per state transition.
// Also checks self-excitation behind an earlier leader, inhibition,
// labelling and that a labelled cell is not excited again.
module tb_active_cell_serial;
  import seg_pkg::*;
  logic clk = 0, rst_n = 0;
  cell_cmd_e cmd;
  logic [3:0] step_phase;
  logic ld_en, ld_p, pre, next, x, z_i, seg_done, label_wr;
  wcode_t w_in [8];
  wsum_t phi_z;
  int checks = 0, failures = 0, n_excited = 0;

  always #5 clk = ~clk;

  active_cell_serial dut (.clk, .rst_n, .cmd, .step_phase, .ld_en, .ld_p, .w_in, .phi_z, .pre,
                          .next, .x, .z_i, .seg_done, .label_wr);

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", what, got, exp);
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

  // one 9-cycle excitation step; returns the z_i seen in phase 8
  task automatic excite_step(input int exp_z, input int x_before);
    for (int ph = 0; ph < 9; ph++) begin
      @(negedge clk);
      cmd = CMD_EXCITE;
      step_phase = 4'(ph);
      #1;
      expect_eq("x held during the step", int'(x), x_before);
      expect_eq("z_i", int'(z_i), (ph == 8) ? exp_z : 0);
    end
    @(negedge clk);
    cmd = CMD_NOP;
    step_phase = '0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd = CMD_NOP; ld_en = 0; ld_p = 0; pre = 0; phi_z = '0; step_phase = '0;
    for (int k = 0; k < 8; k++) w_in[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      int s, e;
      load(0);
      for (int k = 0; k < 8; k++) w_in[k] = 3'($urandom_range(0, 7));
      if (i % 40 == 0) for (int k = 0; k < 8; k++) w_in[k] = 3'd7;
      s = wsum();
      phi_z = (i % 3 == 0) ? wsum_t'(s) : ((i % 3 == 1) ? wsum_t'(s - 1) : wsum_t'($urandom_range(0, 1100)));
      e = (s > int'(phi_z)) ? 1 : 0;
      excite_step(e, 0);
      expect_eq("x after the step", int'(x), e);
      n_excited += e;
      if (e) begin
        // an excited cell does not report again
        excite_step(0, 1);
      end
    end
    // labelling and re-excitation
    for (int k = 0; k < 8; k++) w_in[k] = 3'd3;
    phi_z = 11'd10;
    load(0);
    excite_step(1, 0);
    cmd = CMD_INHIBIT;
    @(negedge clk);
    expect_eq("x after inhibit", int'(x), 0);
    cmd = CMD_LABEL;
    #1;
    expect_eq("label_wr", int'(label_wr), 1);
    @(negedge clk);
    expect_eq("seg_done", int'(seg_done), 1);
    excite_step(0, 0);
    // chain
    load(1);
    pre = 1;
    cmd = CMD_SELF_EXC;
    @(negedge clk);
    expect_eq("leader behind an earlier one", int'(x), 0);
    expect_eq("next", int'(next), 1);
    pre = 0;
    @(negedge clk);
    expect_eq("self-excitation in one cycle", int'(x), 1);
    cmd = CMD_NOP;
    checks++;
    if (n_excited == 0) begin failures++; $display("never excited"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

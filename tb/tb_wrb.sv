// tb_wrb: checks both weight-register block types: loading, the gated
// outputs to the four corner cells for all 16 state patterns, hold when not
// written, and storage and read-back of a segment number.
module tb_wrb;
  import seg_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en, label_wr;
  wcode_t wr_code [4];
  label_t label;
  logic [3:0] x;
  wcode_t od [2][4], oo [2][4];
  label_t lo [2];
  int checks = 0, failures = 0;
  int stored [2][4];

  always #5 clk = ~clk;

  wrb #(.HTYPE(1'b1)) dut_h (.clk, .rst_n, .wr_en, .wr_code, .label_wr, .label, .x,
                             .o_diag(od[0]), .o_orth(oo[0]), .label_out(lo[0]));
  wrb #(.HTYPE(1'b0)) dut_v (.clk, .rst_n, .wr_en, .wr_code, .label_wr, .label, .x,
                             .o_diag(od[1]), .o_orth(oo[1]), .label_out(lo[1]));

  // edge lists: register k joins corners ea[t][k] and eb[t][k]
  int ea [2][4] = '{'{0, 1, 0, 2}, '{0, 1, 0, 1}};
  int eb [2][4] = '{'{3, 2, 1, 3}, '{3, 2, 2, 3}};

  task automatic check_outputs();
    for (int t = 0; t < 2; t++)
      for (int k = 0; k < 4; k++) begin
        int ed, eo;
        ed = -1; eo = -1;
        for (int g = 0; g < 4; g++) begin
          int partner;
          partner = -1;
          if (ea[t][g] == k) partner = eb[t][g];
          if (eb[t][g] == k) partner = ea[t][g];
          if (partner >= 0) begin
            if (g < 2) ed = x[partner] ? stored[t][g] : 0;
            else       eo = x[partner] ? stored[t][g] : 0;
          end
        end
        checks += 2;
        if (int'(od[t][k]) != ed || int'(oo[t][k]) != eo) begin
          failures++;
          $display("type %0d corner %0d x=%b: diag %0d/%0d orth %0d/%0d", t, k, x,
                   od[t][k], ed, oo[t][k], eo);
        end
      end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; label_wr = 0; label = '0; x = '0;
    for (int k = 0; k < 4; k++) wr_code[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        wr_code[k] = 3'($urandom_range(0, 7));
        stored[0][k] = int'(wr_code[k]);
        stored[1][k] = int'(wr_code[k]);
      end
      wr_en = 1;
      @(negedge clk);
      wr_en = 0;
      for (int k = 0; k < 4; k++) wr_code[k] = 3'($urandom_range(0, 7));  // must be ignored
      @(negedge clk);
      for (int xs = 0; xs < 16; xs++) begin
        x = 4'(xs);
        #1;
        check_outputs();
      end
    end
    // segment number write: into registers 3 and 0
    @(negedge clk);
    label = 6'b101_011;
    label_wr = 1;
    @(negedge clk);
    label_wr = 0;
    for (int t = 0; t < 2; t++) begin
      stored[t][3] = 5;
      stored[t][0] = 3;
      checks++;
      if (lo[t] != 6'b101_011) begin
        failures++;
        $display("type %0d label %b", t, lo[t]);
      end
    end
    x = 4'hf;
    #1;
    check_outputs();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

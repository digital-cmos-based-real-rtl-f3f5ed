// active_cell_serial: one pixel of the cell network, weight-serial
// (high-density) version: a single decoder and an accumulating adder replace
// the eight decoders and the adder tree, so a state transition takes 9
// cycles instead of 1.
//
// During CMD_EXCITE the segmentation controller counts step_phase 0..8. A
// switch picks one input per phase: in phase 0 the accumulator register is
// loaded with -phi_z, and in phases 1..8 the decoded weight W_ik*x_k of
// neighbour input phase-1 is added. In phase 8 the sign of the final sum
// (accumulator + last weight) decides the excitation, z_i is raised, and x
// and l change at the end of that cycle. The other commands (self-
// excitation, inhibition, labelling, loading) and the flag registers x, p,
// l, n behave as in active_cell and take one cycle. The single decoder, the
// adder/register pair and the 9-cycle transition follow the document; the
// phase order and the 12-bit signed accumulator (the document prints 11
// bits) are this design's, chosen so that phi_z - sum cannot overflow.
module active_cell_serial
  import seg_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  cell_cmd_e cmd,
  input  logic [3:0] step_phase,
  input  logic      ld_en,
  input  logic      ld_p,
  input  wcode_t    w_in [8],
  input  wsum_t     phi_z,
  input  logic      pre,
  output logic      next,
  output logic      x,
  output logic      z_i,
  output logic      seg_done,
  output logic      label_wr
);
  logic signed [SUM_W:0] acc;
  logic signed [SUM_W:0] acc_next;
  wcode_t      sel;
  wval_t       dv;
  logic        p, l, n;
  logic        free_leader;
  logic        last_phase;

  // switch: neighbour input of this phase
  always_comb begin
    sel = '0;
    for (int k = 0; k < 8; k++)
      if (32'(step_phase) == k + 1) sel = w_in[k];
  end

  weight_decoder u_dec (.code(sel), .value(dv));

  assign acc_next    = acc + $signed({4'b0, dv});
  assign last_phase  = (step_phase == 4'd8);
  assign free_leader = p & ~n;
  assign next        = pre | free_leader;
  // excite when sum - phi_z > 0
  assign z_i         = (cmd == CMD_EXCITE) & last_phase & ~n & ~x &
                       ~acc_next[SUM_W] & (acc_next != '0);
  assign label_wr    = (cmd == CMD_LABEL) & l;
  assign seg_done    = n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
    end else if (cmd == CMD_EXCITE) begin
      acc <= (step_phase == 4'd0) ? -$signed({1'b0, phi_z}) : acc_next;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= 1'b0; p <= 1'b0; l <= 1'b0; n <= 1'b0;
    end else if (ld_en) begin
      x <= 1'b0; p <= ld_p; l <= 1'b0; n <= 1'b0;
    end else begin
      unique case (cmd)
        CMD_SELF_EXC: if (free_leader && !pre) begin x <= 1'b1; l <= 1'b1; end
        CMD_EXCITE:   if (z_i) begin x <= 1'b1; l <= 1'b1; end
        CMD_INHIBIT:  x <= 1'b0;
        CMD_LABEL:    if (l) begin n <= 1'b1; l <= 1'b0; p <= 1'b0; end
        default: ;
      endcase
    end
  end
endmodule

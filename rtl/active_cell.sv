// active_cell: one pixel of the image-segmentation cell network, weight
// parallel (high-speed) version: one state transition per clock cycle.
//
// Datapath: eight decoders turn the 3-bit weight codes W_ik*x_k received from
// the four surrounding weight-register blocks into 8-bit values; an adder
// tree (four 8-bit, two 9-bit and one 10-bit adder) forms the 11-bit sum S_i,
// and a 12-bit subtractor computes phi_z - S_i, whose sign bit tells the
// control unit that S_i > phi_z (excitation condition). This structure is
// the document's.
//
// Four 1-bit flag registers: x (excited, broadcast to the weight-register
// blocks), p (leader), l (member of the segment being grown) and n (already
// segmented). The control unit executes the broadcast command cmd:
//   CMD_SELF_EXC  a free leader (p & ~n) becomes excited if no earlier cell of
//                 the priority chain is one (pre low); next = pre | free leader
//   CMD_EXCITE    a free, unexcited cell whose sign bit is set becomes
//                 excited; z_i reports this change to the global inhibitor
//   CMD_INHIBIT   x is cleared (the grown segment is inhibited)
//   CMD_LABEL     a cell with l set asks its upper-left weight-register block
//                 to store the segment number (label_wr), sets n, clears l, p
// ld_en loads p and clears the other flags. The command encoding, the
// priority chain and the split of roles between x and l are this design's
// reading of the document's outline (self-excitation, excitation,
// inhibition) and of the cell's pre/next/z_i signals.
module active_cell
  import seg_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  cell_cmd_e cmd,
  input  logic      ld_en,
  input  logic      ld_p,
  input  wcode_t    w_in [8],
  input  wsum_t     phi_z,
  input  logic      pre,
  output logic      next,
  output logic      x,
  output logic      z_i,
  output logic      seg_done,     // flag n
  output logic      label_wr
);
  wval_t       dv [8];
  logic [8:0]  s9 [4];
  logic [9:0]  s10 [2];
  wsum_t       s_i;
  logic [SUM_W:0] diff;
  logic        sign_bit;
  logic        p, l, n;
  logic        free_leader;

  for (genvar k = 0; k < 8; k++) begin : g_dec
    weight_decoder u_dec (.code(w_in[k]), .value(dv[k]));
  end

  always_comb begin
    for (int k = 0; k < 4; k++) s9[k] = {1'b0, dv[2*k]} + {1'b0, dv[2*k+1]};
    for (int k = 0; k < 2; k++) s10[k] = {1'b0, s9[2*k]} + {1'b0, s9[2*k+1]};
    s_i      = {1'b0, s10[0]} + {1'b0, s10[1]};
    diff     = {1'b0, phi_z} - {1'b0, s_i};
    sign_bit = diff[SUM_W];
  end

  assign free_leader = p & ~n;
  assign next        = pre | free_leader;
  assign z_i         = (cmd == CMD_EXCITE) & ~n & ~x & sign_bit;
  assign label_wr    = (cmd == CMD_LABEL) & l;
  assign seg_done    = n;

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

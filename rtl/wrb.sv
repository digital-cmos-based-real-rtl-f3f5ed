// wrb: block of four 3-bit connection-weight registers, shared by the four
// active cells at the corners of one 2x2 pixel square.
//
// Corners are numbered 0 = upper left, 1 = upper right, 2 = lower left,
// 3 = lower right. Register 0 holds the main diagonal (0-3), register 1 the
// anti-diagonal (1-2). In a horizontal block (HTYPE = 1) register 2 holds the
// top edge (0-1) and register 3 the bottom edge (2-3); in a vertical block
// register 2 holds the left edge (0-2) and register 3 the right edge (1-3).
// Horizontal and vertical blocks alternate like a checkerboard, so every
// pixel-to-pixel weight is stored exactly once and each corner cell receives
// one diagonal and one orthogonal weight from each of its four blocks.
//
// The output selection circuit presents to each corner cell the weight to
// its partner multiplied by the partner's state x (zero unless the partner
// is excited). A switch selects what is written: the weight codes from the
// load port (wr_en), or the 6-bit segment number (label_wr), which goes into
// registers 3 and 0, the two registers that hold weights of the lower-right
// cell. That cell is the one whose segment number this block stores; once it
// is labelled its x stays 0, so the overwritten weights are no longer used.
// Register count, width, sharing and the two block types follow the
// document; the register assignment and the label placement are this
// design's. Writes take effect at the clock edge; outputs are combinational.
module wrb
  import seg_pkg::*;
#(
  parameter bit HTYPE = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   wr_en,
  input  wcode_t wr_code [4],
  input  logic   label_wr,
  input  label_t label,
  input  logic [3:0] x,          // states of the four corner cells
  output wcode_t o_diag [4],     // per corner: diagonal weight x partner state
  output wcode_t o_orth [4],     // per corner: orthogonal weight x partner state
  output label_t label_out       // stored segment number of the lower-right cell
);
  wcode_t regs [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) regs[k] <= '0;
    end else if (label_wr) begin
      regs[3] <= label[5:3];
      regs[0] <= label[2:0];
    end else if (wr_en) begin
      for (int k = 0; k < 4; k++) regs[k] <= wr_code[k];
    end
  end

  // output selection circuit
  always_comb begin
    o_diag[0] = x[3] ? regs[0] : '0;
    o_diag[3] = x[0] ? regs[0] : '0;
    o_diag[1] = x[2] ? regs[1] : '0;
    o_diag[2] = x[1] ? regs[1] : '0;
    if (HTYPE) begin
      o_orth[0] = x[1] ? regs[2] : '0;
      o_orth[1] = x[0] ? regs[2] : '0;
      o_orth[2] = x[3] ? regs[3] : '0;
      o_orth[3] = x[2] ? regs[3] : '0;
    end else begin
      o_orth[0] = x[2] ? regs[2] : '0;
      o_orth[2] = x[0] ? regs[2] : '0;
      o_orth[1] = x[3] ? regs[3] : '0;
      o_orth[3] = x[1] ? regs[3] : '0;
    end
  end

  assign label_out = {regs[3], regs[0]};
endmodule

// seg_chip: image-segmentation chip for gray-scale or colour pictures,
// built from four stages: connection-weight calculation, leader-cell
// calculation, the image-segmentation cell network and the segmentation
// restore circuit.
//
// A frame enters as COLS columns of ROWS RGB pixels (valid/ready, one column
// every 2 cycles; in gray-scale mode the luminance goes on the R channel).
// Stage 1 turns each column into 3-bit connection weights, stage 2 decides
// leader pixels and loads weights and leader flags into the cell network
// column by column. After the right-border column is loaded, the
// segmentation controller grows one segment per leader by self-excitation,
// parallel excitation steps, inhibition and labelling, until no free leader
// is left. The restore circuit then reads the segment numbers out one
// column per cycle (out_valid, out_col, out_label; 0 = no segment) and
// frame_done pulses with the last column. A new frame is accepted only after
// that. phi_p is the leader threshold and phi_z the excitation threshold,
// both compared with sums of decoded weights (0..1024). SERIAL = 0 (default)
// builds the weight-parallel (high-speed) cells of the published test chip,
// SERIAL = 1 the weight-serial (high-density) cells, whose excitation steps
// take 9 cycles each.
// The stage chain is the document's; the frame sequencing, handshakes and
// status outputs are this design's.
module seg_chip
  import seg_pkg::*;
#(
  parameter int unsigned ROWS = 10,
  parameter int unsigned COLS = 10,
  parameter bit          SERIAL = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   gray_mode,
  input  wsum_t  phi_p,
  input  wsum_t  phi_z,
  // input image stream (from the input image memory)
  input  logic   in_valid,
  output logic   in_ready,
  input  rgb_t   in_col [ROWS],
  // segmentation result (to the image-segmentation memory)
  output logic   out_valid,
  output logic [$clog2(COLS+1)-1:0] out_col,
  output label_t out_label [ROWS],
  output logic   frame_done,
  output logic   overflow,
  output logic   busy
);
  localparam int unsigned BW = $clog2(COLS+1);

  // stage 1 -> 2
  logic   wc_ready, wc_valid, wc_last;
  wcode_t wc_h [ROWS], wc_v [ROWS], wc_d1 [ROWS], wc_d2 [ROWS];
  // stage 2 -> 3
  logic   ld_valid, ld_last, ld_p_en;
  logic [BW-1:0] ld_b;
  wcode_t ld_vl [ROWS], ld_vr [ROWS], ld_h [ROWS], ld_d1 [ROWS], ld_d2 [ROWS];
  logic [ROWS-1:0] ld_p;
  // stage 3 control and read-out
  cell_cmd_e cmd;
  label_t    label;
  logic [3:0] step_phase;
  logic      z, any_leader, seg_done, seg_start;
  logic [BW-1:0] rd_col;
  label_t    rd_label [ROWS];
  logic [ROWS-1:0] rd_seg;
  // frame sequencing
  logic          accepting;
  logic [BW-1:0] cols_in;
  logic          in_fire;

  assign in_ready = wc_ready & accepting;
  assign in_fire  = in_valid & in_ready;
  assign busy     = ~accepting;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      accepting <= 1'b1;
      cols_in   <= '0;
      seg_start <= 1'b0;
    end else begin
      seg_start <= ld_last;
      if (in_fire) begin
        if (32'(cols_in) == COLS - 1) begin
          cols_in   <= '0;
          accepting <= 1'b0;
        end else begin
          cols_in <= cols_in + 1'b1;
        end
      end
      if (frame_done) accepting <= 1'b1;
    end
  end

  weight_calc_circuit #(.ROWS(ROWS), .COLS(COLS)) u_wcalc (
    .clk, .rst_n, .gray_mode,
    .in_valid (in_valid & accepting),
    .in_ready (wc_ready),
    .in_col,
    .out_valid(wc_valid), .out_last(wc_last),
    .out_h(wc_h), .out_v(wc_v), .out_d1(wc_d1), .out_d2(wc_d2)
  );

  leader_calc_circuit #(.ROWS(ROWS), .COLS(COLS)) u_leader (
    .clk, .rst_n, .phi_p,
    .in_valid(wc_valid), .in_last(wc_last),
    .in_h(wc_h), .in_v(wc_v), .in_d1(wc_d1), .in_d2(wc_d2),
    .ld_valid, .ld_last, .ld_b, .ld_vl, .ld_vr, .ld_h, .ld_d1, .ld_d2,
    .ld_p_en, .ld_p
  );

  cell_network #(.ROWS(ROWS), .COLS(COLS), .SERIAL(SERIAL)) u_net (
    .clk, .rst_n,
    .ld_valid, .ld_b, .ld_vl, .ld_vr, .ld_h, .ld_d1, .ld_d2, .ld_p_en, .ld_p,
    .cmd, .step_phase, .phi_z, .label, .z, .any_leader, .x_map(),
    .rd_col, .rd_label, .rd_seg
  );

  seg_controller #(.SERIAL(SERIAL)) u_ctrl (
    .clk, .rst_n,
    .start(seg_start), .z, .any_leader,
    .cmd, .label, .step_phase, .busy(), .done(seg_done), .overflow
  );

  restore_circuit #(.ROWS(ROWS), .COLS(COLS)) u_restore (
    .clk, .rst_n,
    .start(seg_done),
    .rd_col, .rd_label, .rd_seg,
    .out_valid, .out_col, .out_label,
    .busy(), .done(frame_done)
  );
endmodule

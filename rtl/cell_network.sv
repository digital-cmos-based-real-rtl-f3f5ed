// cell_network: third stage, the image-segmentation cell network of
// ROWS x COLS active cells and (ROWS+1) x (COLS+1) weight-register blocks.
//
// Active cells and weight-register blocks (WRBs) are laid out alternately:
// WRB (a,b) sits between cells (a-1,b-1), (a-1,b), (a,b-1) and (a,b); blocks
// on the outer ring only hold zero weights. WRB types alternate as a
// checkerboard, horizontal where a+b is even. Every cell receives 8 gated
// weights, two from each of its four surrounding blocks, and all cells
// evaluate in parallel in one cycle.
//
// Load port: a load word for WRB column b (ld_b) writes the four registers
// of every block in that column and, when ld_p_en, the leader flags of cell
// column b-1. Register contents per block: main diagonal d1[a-1], anti-
// diagonal d2[a-1], then h[a-1], h[a] (horizontal block) or vl[a-1], vr[a-1]
// (vertical block), out-of-picture weights being zero.
//
// Control: cmd, phi_z and the segment number label are broadcast. The
// leader priority chain runs in column-major order (cell index c*ROWS + r);
// any_leader is its end and tells whether a free leader is left. z is the
// global inhibitor, the OR of all cells' z_i. Read port: for column rd_col
// the segment numbers stored in each cell's upper-left WRB (rd_label) and
// the cells' segmented flags (rd_seg), combinationally.
// SERIAL selects the cell: 0 the weight-parallel active_cell (one cycle per
// state transition), 1 the weight-serial active_cell_serial (9 cycles,
// sequenced by step_phase from the controller; unused otherwise).
// The array structure and WRB sharing are the document's; the load and read
// ports and the chain order are this design's.
module cell_network
  import seg_pkg::*;
#(
  parameter int unsigned ROWS = 10,
  parameter int unsigned COLS = 10,
  parameter bit          SERIAL = 1'b0
) (
  input  logic      clk,
  input  logic      rst_n,
  // load port (from the leader calculation circuit)
  input  logic      ld_valid,
  input  logic [$clog2(COLS+1)-1:0] ld_b,
  input  wcode_t    ld_vl [ROWS],
  input  wcode_t    ld_vr [ROWS],
  input  wcode_t    ld_h  [ROWS],
  input  wcode_t    ld_d1 [ROWS],
  input  wcode_t    ld_d2 [ROWS],
  input  logic      ld_p_en,
  input  logic [ROWS-1:0] ld_p,
  // control
  input  cell_cmd_e cmd,
  input  logic [3:0] step_phase,
  input  wsum_t     phi_z,
  input  label_t    label,
  output logic      z,
  output logic      any_leader,
  output logic [ROWS*COLS-1:0] x_map,   // bit c*ROWS + r
  // read port (to the segmentation restore circuit)
  input  logic [$clog2(COLS+1)-1:0] rd_col,
  output label_t    rd_label [ROWS],
  output logic [ROWS-1:0] rd_seg
);
  localparam int unsigned N = ROWS * COLS;

  logic   xc    [ROWS+2][COLS+2];   // cell states with a zero ring, offset by 1
  logic   lw    [ROWS][COLS];
  logic   nflag [ROWS][COLS];
  wcode_t wdg   [ROWS+1][COLS+1][4];
  wcode_t wog   [ROWS+1][COLS+1][4];
  label_t lo    [ROWS+1][COLS+1];
  logic [N:0]   chain;
  logic [N-1:0] zv;

  assign chain[0] = 1'b0;

  // zero ring around the state map
  for (genvar a = 0; a < ROWS + 2; a++) begin : g_ring_r
    for (genvar b = 0; b < COLS + 2; b++) begin : g_ring_c
      if (a == 0 || b == 0 || a == ROWS + 1 || b == COLS + 1) begin : g_zero
        assign xc[a][b] = 1'b0;
      end
    end
  end

  // weight-register blocks
  for (genvar a = 0; a <= ROWS; a++) begin : g_wr
    for (genvar b = 0; b <= COLS; b++) begin : g_wc
      wcode_t     code [4];
      logic [3:0] xs;
      logic       lwr;
      always_comb begin
        code[0] = (a >= 1) ? ld_d1[(a+ROWS-1) % ROWS] : '0;
        code[1] = (a >= 1) ? ld_d2[(a+ROWS-1) % ROWS] : '0;
        if ((a + b) % 2 == 0) begin
          code[2] = (a >= 1)   ? ld_h[(a+ROWS-1) % ROWS] : '0;
          code[3] = (a < ROWS) ? ld_h[a % ROWS]          : '0;
        end else begin
          code[2] = (a >= 1) ? ld_vl[(a+ROWS-1) % ROWS] : '0;
          code[3] = (a >= 1) ? ld_vr[(a+ROWS-1) % ROWS] : '0;
        end
      end
      // corner states: cell (a-1+i, b-1+j) is xc[a+i][b+j]
      assign xs  = {xc[a+1][b+1], xc[a+1][b], xc[a][b+1], xc[a][b]};
      if (a < ROWS && b < COLS) begin : g_lw
        assign lwr = lw[a][b];
      end else begin : g_nolw
        assign lwr = 1'b0;
      end
      wrb #(.HTYPE((a + b) % 2 == 0)) u_wrb (
        .clk, .rst_n,
        .wr_en    (ld_valid && 32'(ld_b) == b),
        .wr_code  (code),
        .label_wr (lwr),
        .label,
        .x        (xs),
        .o_diag   (wdg[a][b]),
        .o_orth   (wog[a][b]),
        .label_out(lo[a][b])
      );
    end
  end

  // active cells
  for (genvar r = 0; r < ROWS; r++) begin : g_cr
    for (genvar c = 0; c < COLS; c++) begin : g_cc
      localparam int unsigned K = c * ROWS + r;
      wcode_t w [8];
      logic   xo;
      always_comb begin
        w[0] = wdg[r][c][3];      w[1] = wog[r][c][3];       // upper-left block
        w[2] = wdg[r][c+1][2];    w[3] = wog[r][c+1][2];     // upper-right block
        w[4] = wdg[r+1][c][1];    w[5] = wog[r+1][c][1];     // lower-left block
        w[6] = wdg[r+1][c+1][0];  w[7] = wog[r+1][c+1][0];   // lower-right block
      end
      if (SERIAL) begin : g_serial
        active_cell_serial u_cell (
          .clk, .rst_n,
          .cmd,
          .step_phase,
          .ld_en   (ld_valid && ld_p_en && 32'(ld_b) == c + 1),
          .ld_p    (ld_p[r]),
          .w_in    (w),
          .phi_z,
          .pre     (chain[K]),
          .next    (chain[K+1]),
          .x       (xo),
          .z_i     (zv[K]),
          .seg_done(nflag[r][c]),
          .label_wr(lw[r][c])
        );
      end else begin : g_parallel
        active_cell u_cell (
          .clk, .rst_n,
          .cmd,
          .ld_en   (ld_valid && ld_p_en && 32'(ld_b) == c + 1),
          .ld_p    (ld_p[r]),
          .w_in    (w),
          .phi_z,
          .pre     (chain[K]),
          .next    (chain[K+1]),
          .x       (xo),
          .z_i     (zv[K]),
          .seg_done(nflag[r][c]),
          .label_wr(lw[r][c])
        );
      end
      assign xc[r+1][c+1] = xo;
      assign x_map[K]     = xo;
    end
  end

  assign z          = |zv;
  assign any_leader = chain[N];

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      rd_label[r] = '0;
      rd_seg[r]   = 1'b0;
      for (int c = 0; c < COLS; c++) begin
        if (32'(rd_col) == c) begin
          rd_label[r] = lo[r][c];
          rd_seg[r]   = nflag[r][c];
        end
      end
    end
  end
endmodule

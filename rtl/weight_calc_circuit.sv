// weight_calc_circuit: first stage, connection-weight calculation for one
// picture column at a time, all rows in parallel.
//
// Columns arrive left to right on a valid/ready stream, RGB 8 bits per
// channel. Each row slice keeps the previous column's pixel in 8-bit
// registers and holds six channel weight units (two pixel pairs x R,G,B)
// feeding two minimum-selection circuits, as in the document's block diagram.
// A data-selection multiplexer steered by a phase bit chooses the two pixel
// pairs: phase 0 gives the horizontal weight h (row j, columns i-1 and i) and
// the vertical weight v (rows j and j+1 of column i); phase 1 gives the two
// diagonals d1 ((j,i-1)-(j+1,i)) and d2 ((j+1,i-1)-(j,i)). A column is
// therefore accepted every 2 cycles (in_ready is high in phase 1) and its four
// weights per row appear on the outputs one cycle later with out_valid.
// Weights to pixels outside the picture (left of column 0, below the last
// row) are 0, so out_v, out_d1 and out_d2 of the last row are constant 0.
// The two-phase schedule and the handshake are this design's;
// the per-slice structure (registers, selection, 6 weight units, 2 minimum
// circuits) follows the document.
module weight_calc_circuit
  import seg_pkg::*;
#(
  parameter int unsigned ROWS = 10,
  parameter int unsigned COLS = 10
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   gray_mode,
  input  logic   in_valid,
  output logic   in_ready,
  input  rgb_t   in_col [ROWS],
  output logic   out_valid,
  output logic   out_last,            // record belongs to the last column
  output wcode_t out_h  [ROWS],
  output wcode_t out_v  [ROWS],
  output wcode_t out_d1 [ROWS],
  output wcode_t out_d2 [ROWS]
);
  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1;

  logic          phase;
  logic [CW-1:0] col;
  rgb_t          prev [ROWS];
  wcode_t        w0 [ROWS];     // first minimum circuit: h or d1
  wcode_t        w1 [ROWS];     // second minimum circuit: v or d2
  wcode_t        h_q [ROWS];
  wcode_t        v_q [ROWS];

  assign in_ready = phase;

  for (genvar j = 0; j < ROWS; j++) begin : g_row
    rgb_t   a0, b0, a1, b1;
    wcode_t r0, g0, b0w, r1, g1, b1w, m0, m1;
    // data selection circuit
    always_comb begin
      if (!phase) begin
        a0 = prev[j];  b0 = in_col[j];                        // h
        a1 = in_col[j]; b1 = (j + 1 < ROWS) ? in_col[(j+1) % ROWS] : in_col[j]; // v
      end else begin
        a0 = prev[j];  b0 = (j + 1 < ROWS) ? in_col[(j+1) % ROWS] : in_col[j];  // d1
        a1 = (j + 1 < ROWS) ? prev[(j+1) % ROWS] : prev[j];  b1 = in_col[j];    // d2
      end
    end
    weight_unit u_r0 (.pix_a(a0.r), .pix_b(b0.r), .code(r0));
    weight_unit u_g0 (.pix_a(a0.g), .pix_b(b0.g), .code(g0));
    weight_unit u_b0 (.pix_a(a0.b), .pix_b(b0.b), .code(b0w));
    weight_unit u_r1 (.pix_a(a1.r), .pix_b(b1.r), .code(r1));
    weight_unit u_g1 (.pix_a(a1.g), .pix_b(b1.g), .code(g1));
    weight_unit u_b1 (.pix_a(a1.b), .pix_b(b1.b), .code(b1w));
    min_select u_min0 (.gray_mode, .w_r(r0), .w_g(g0), .w_b(b0w), .w_min(m0));
    min_select u_min1 (.gray_mode, .w_r(r1), .w_g(g1), .w_b(b1w), .w_min(m1));
    // boundary masking: no left neighbour in column 0, no row below the last row
    always_comb begin
      w0[j] = m0;
      w1[j] = m1;
      if (col == '0) w0[j] = '0;                       // h and d1 need column i-1
      if (phase && col == '0) w1[j] = '0;              // d2 needs column i-1
      if (j + 1 >= ROWS) begin
        if (phase) w0[j] = '0;                         // d1 needs row j+1
        w1[j] = '0;                                    // v and d2 need row j+1
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= 1'b0;
      col       <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      for (int j = 0; j < ROWS; j++) begin
        prev[j]   <= '0;
        h_q[j]    <= '0;
        v_q[j]    <= '0;
        out_h[j]  <= '0;
        out_v[j]  <= '0;
        out_d1[j] <= '0;
        out_d2[j] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        phase <= ~phase;
        if (!phase) begin
          for (int j = 0; j < ROWS; j++) begin
            h_q[j] <= w0[j];
            v_q[j] <= w1[j];
          end
        end else begin
          for (int j = 0; j < ROWS; j++) begin
            out_h[j]  <= h_q[j];
            out_v[j]  <= v_q[j];
            out_d1[j] <= w0[j];
            out_d2[j] <= w1[j];
            prev[j]   <= in_col[j];
          end
          out_valid <= 1'b1;
          out_last  <= (32'(col) == COLS - 1);
          col       <= (32'(col) == COLS - 1) ? '0 : col + 1'b1;
        end
      end
    end
  end

  // a column must be held while it is being processed
  property p_hold;
    @(posedge clk) disable iff (!rst_n) (in_valid && !phase) |=> in_valid;
  endproperty
  a_hold: assert property (p_hold);
endmodule

// leader_calc_circuit: second stage, leader/ordinary pixel decision and
// column-pipelined transfer of weights and leader flags to the cell network.
//
// A pixel is a leader (p=1) when the sum of the decoded connection weights to
// its 8 nearest neighbours is larger than the threshold phi_p (document's
// rule). The weights to the right-hand neighbours of column i arrive with
// column i+1, so the circuit keeps the previous column's weight record and
// decides column i-1 when the record of column i arrives; all rows are
// summed in parallel.
//
// Each accepted record also produces one load word for weight-register
// column b (the registers between cell columns b-1 and b): the vertical
// weights of columns b-1 and b and the horizontal and diagonal weights
// between them, together with the leader flags of cell column b-1 (ld_p_en
// is low for b = 0). After the record flagged in_last an extra load word for
// the right border column b = COLS follows in the next cycle, and ld_last
// marks it. Load words appear one cycle after the record. Interface and the
// one-column delay are this design's; the leader rule is the document's.
module leader_calc_circuit
  import seg_pkg::*;
#(
  parameter int unsigned ROWS = 10,
  parameter int unsigned COLS = 10
) (
  input  logic   clk,
  input  logic   rst_n,
  input  wsum_t  phi_p,
  input  logic   in_valid,
  input  logic   in_last,
  input  wcode_t in_h  [ROWS],
  input  wcode_t in_v  [ROWS],
  input  wcode_t in_d1 [ROWS],
  input  wcode_t in_d2 [ROWS],
  output logic   ld_valid,
  output logic   ld_last,
  output logic [$clog2(COLS+1)-1:0] ld_b,
  output wcode_t ld_vl [ROWS],
  output wcode_t ld_vr [ROWS],
  output wcode_t ld_h  [ROWS],
  output wcode_t ld_d1 [ROWS],
  output wcode_t ld_d2 [ROWS],
  output logic   ld_p_en,
  output logic [ROWS-1:0] ld_p
);
  localparam int unsigned BW = $clog2(COLS+1);

  wcode_t p_h [ROWS], p_v [ROWS], p_d1 [ROWS], p_d2 [ROWS];  // column b-1
  wcode_t c_h [ROWS], c_v [ROWS], c_d1 [ROWS], c_d2 [ROWS];  // column b (or zeros)
  logic          flush;
  logic [BW-1:0] b;
  logic          step;
  logic [ROWS-1:0] leader;

  assign step = in_valid | flush;

  // current record: input, or all zeros for the right-border flush
  always_comb begin
    for (int j = 0; j < ROWS; j++) begin
      c_h[j]  = flush ? '0 : in_h[j];
      c_v[j]  = flush ? '0 : in_v[j];
      c_d1[j] = flush ? '0 : in_d1[j];
      c_d2[j] = flush ? '0 : in_d2[j];
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    wcode_t nb [8];
    wval_t  val [8];
    wsum_t  sum;
    always_comb begin
      nb[0] = p_h[r];                                  // left
      nb[1] = (r > 0) ? p_d1[(r+ROWS-1) % ROWS] : '0;  // upper left
      nb[2] = p_d2[r];                                 // lower left
      nb[3] = (r > 0) ? p_v[(r+ROWS-1) % ROWS] : '0;   // up
      nb[4] = p_v[r];                                  // down
      nb[5] = c_h[r];                                  // right
      nb[6] = c_d1[r];                                 // lower right
      nb[7] = (r > 0) ? c_d2[(r+ROWS-1) % ROWS] : '0;  // upper right
    end
    for (genvar k = 0; k < 8; k++) begin : g_dec
      weight_decoder u_dec (.code(nb[k]), .value(val[k]));
    end
    always_comb begin
      sum = '0;
      for (int k = 0; k < 8; k++) sum = sum + wsum_t'(val[k]);
    end
    assign leader[r] = (sum > phi_p);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flush    <= 1'b0;
      b        <= '0;
      ld_valid <= 1'b0;
      ld_last  <= 1'b0;
      ld_b     <= '0;
      ld_p_en  <= 1'b0;
      ld_p     <= '0;
      for (int j = 0; j < ROWS; j++) begin
        p_h[j] <= '0; p_v[j] <= '0; p_d1[j] <= '0; p_d2[j] <= '0;
        ld_vl[j] <= '0; ld_vr[j] <= '0; ld_h[j] <= '0; ld_d1[j] <= '0; ld_d2[j] <= '0;
      end
    end else begin
      ld_valid <= step;
      ld_last  <= flush;
      flush    <= in_valid & in_last;
      if (step) begin
        ld_b    <= b;
        ld_p_en <= (b != '0);
        ld_p    <= leader;
        for (int j = 0; j < ROWS; j++) begin
          ld_vl[j] <= p_v[j];
          ld_vr[j] <= c_v[j];
          ld_h[j]  <= c_h[j];
          ld_d1[j] <= c_d1[j];
          ld_d2[j] <= c_d2[j];
          p_h[j]   <= c_h[j];
          p_v[j]   <= c_v[j];
          p_d1[j]  <= c_d1[j];
          p_d2[j]  <= c_d2[j];
        end
        b <= flush ? '0 : b + 1'b1;
      end
    end
  end

  // the border flush never collides with a new record
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) !(flush && in_valid));
endmodule

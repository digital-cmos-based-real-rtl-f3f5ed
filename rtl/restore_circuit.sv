// restore_circuit: fourth stage, segmentation-result read-out.
//
// After start it reads the cell network one column per cycle, all rows in
// parallel: it drives the column address rd_col, takes the stored segment
// numbers and the cells' segmented flags, and sends a column of
// pixel/segment-number pairs to the image-segmentation memory (out_valid,
// out_col, out_label). A pixel that joined no segment is given segment
// number 0, because its weight-register block still holds weights and not a
// number. Reading COLS columns takes COLS cycles; outputs are registered, so
// column c appears one cycle after it is addressed, and done pulses with the
// last one. Column-parallel read-out is the document's; the masking and the
// interface are this design's.
module restore_circuit
  import seg_pkg::*;
#(
  parameter int unsigned ROWS = 10,
  parameter int unsigned COLS = 10
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output logic [$clog2(COLS+1)-1:0] rd_col,
  input  label_t rd_label [ROWS],
  input  logic [ROWS-1:0] rd_seg,
  output logic   out_valid,
  output logic [$clog2(COLS+1)-1:0] out_col,
  output label_t out_label [ROWS],
  output logic   busy,
  output logic   done
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      rd_col    <= '0;
      out_valid <= 1'b0;
      out_col   <= '0;
      done      <= 1'b0;
      for (int r = 0; r < ROWS; r++) out_label[r] <= '0;
    end else begin
      out_valid <= busy;
      done      <= busy && 32'(rd_col) == COLS - 1;
      if (busy) begin
        out_col <= rd_col;
        for (int r = 0; r < ROWS; r++) out_label[r] <= rd_seg[r] ? rd_label[r] : '0;
        if (32'(rd_col) == COLS - 1) begin
          busy   <= 1'b0;
          rd_col <= '0;
        end else begin
          rd_col <= rd_col + 1'b1;
        end
      end else if (start) begin
        busy   <= 1'b1;
        rd_col <= '0;
      end
    end
  end
endmodule

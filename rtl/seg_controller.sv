// seg_controller: sequencer of the region-growing segmentation in the cell
// network.
//
// After start it repeats, one segment at a time:
//   SELF     if a free leader is left (any_leader), broadcast CMD_SELF_EXC:
//            the first free leader of the priority chain becomes excited;
//            otherwise segmentation is finished (done pulse)
//   EXCITE   broadcast CMD_EXCITE every cycle while the global inhibitor z
//            reports newly excited cells; the first cycle with z low ends
//            the growth of the segment
//   INHIBIT  broadcast CMD_INHIBIT (all excited cells drop x)
//   LABEL    broadcast CMD_LABEL with the current segment number, which the
//            segment's cells store; the number then increments
// Segment numbers start at 1 (0 marks pixels that joined no segment). When
// all 2**LABEL_W - 1 numbers are used and a leader is still free, the run
// stops with overflow set. With the weight-parallel cell (SERIAL = 0) an
// excitation step takes one cycle, and a segment of k growth steps takes
// k + 4 cycles, plus one final cycle to see that no leader is left. With the
// weight-serial cell (SERIAL = 1) each excitation step lasts 9 cycles,
// counted on step_phase 0..8, and z is only looked at in phase 8: a segment
// then takes 9 (k + 1) + 3 cycles. The step order follows
// the document's algorithm outline; the state machine, the numbering and the
// overflow rule are this design's. With SERIAL = 0, step_phase is constant 0.
module seg_controller
  import seg_pkg::*;
#(
  parameter bit SERIAL = 1'b0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  logic      z,
  input  logic      any_leader,
  output cell_cmd_e cmd,
  output label_t    label,
  output logic [3:0] step_phase,
  output logic      busy,
  output logic      done,
  output logic      overflow
);
  typedef enum logic [2:0] {S_IDLE, S_SELF, S_EXCITE, S_INHIBIT, S_LABEL} state_e;

  state_e           state;
  logic [LABEL_W:0] cnt;   // next segment number, one bit wider than a label

  assign busy  = (state != S_IDLE);
  assign label = cnt[LABEL_W-1:0];

  always_comb begin
    unique case (state)
      S_SELF:    cmd = (any_leader && !cnt[LABEL_W]) ? CMD_SELF_EXC : CMD_NOP;
      S_EXCITE:  cmd = CMD_EXCITE;
      S_INHIBIT: cmd = CMD_INHIBIT;
      S_LABEL:   cmd = CMD_LABEL;
      default:   cmd = CMD_NOP;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      step_phase <= '0;
      done     <= 1'b0;
      overflow <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_SELF;
          cnt      <= (LABEL_W+1)'(1);
          overflow <= 1'b0;
        end
        S_SELF: begin
          if (!any_leader) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else if (cnt[LABEL_W]) begin
            state    <= S_IDLE;
            done     <= 1'b1;
            overflow <= 1'b1;
          end else begin
            state <= S_EXCITE;
          end
        end
        S_EXCITE: begin
          if (SERIAL && step_phase != 4'd8) begin
            step_phase <= step_phase + 1'b1;
          end else begin
            step_phase <= '0;
            if (!z) state <= S_INHIBIT;
          end
        end
        S_INHIBIT: state <= S_LABEL;
        S_LABEL: begin
          state <= S_SELF;
          cnt   <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

// seg_pkg: types and constants shared by the colour/gray-scale picture
// segmentation chip.
//
// Pixels are 8-bit per colour channel. A connection weight travels and is
// stored as a 3-bit code; active cells and the leader circuit decode it to an
// 8-bit value (one-hot, 2**code, code 0 meaning "no connection"). Eight decoded
// weights sum to at most 8*128 = 1024, so sums are 11 bits, compared against a
// threshold in a 12-bit signed subtraction. The 3-bit code, the 8-bit decoded
// weight and the 11-bit adder/subtractor widths follow the figures of the
// cell; the code-to-value mapping is this design's choice.
package seg_pkg;

  localparam int unsigned PIX_W   = 8;   // bits per colour channel
  localparam int unsigned WCODE_W = 3;   // stored weight code
  localparam int unsigned WVAL_W  = 8;   // decoded weight
  localparam int unsigned SUM_W   = 11;  // sum of 8 decoded weights
  localparam int unsigned LABEL_W = 6;   // segment number (two 3-bit registers)
  localparam int unsigned I_MAX   = 255; // maximum intensity in the weight formula

  typedef logic [WCODE_W-1:0] wcode_t;
  typedef logic [WVAL_W-1:0]  wval_t;
  typedef logic [SUM_W-1:0]   wsum_t;
  typedef logic [LABEL_W-1:0] label_t;

  typedef struct packed {
    logic [PIX_W-1:0] r;
    logic [PIX_W-1:0] g;
    logic [PIX_W-1:0] b;
  } rgb_t;

  // Broadcast command from the segmentation controller to every active cell.
  typedef enum logic [2:0] {
    CMD_NOP      = 3'd0,
    CMD_SELF_EXC = 3'd1,  // the first free leader cell becomes excited
    CMD_EXCITE   = 3'd2,  // free cells with enough excited weight become excited
    CMD_INHIBIT  = 3'd3,  // global inhibition: all excited cells drop x
    CMD_LABEL    = 3'd4   // cells of the grown segment store the segment number
  } cell_cmd_e;

endpackage

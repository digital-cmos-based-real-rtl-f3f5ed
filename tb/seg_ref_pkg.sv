// seg_ref_pkg: reference model of the segmentation algorithm for the
// testbenches, written independently of the RTL (division and logarithm
// loops instead of shift comparisons, a sequential list-based growth
// instead of a cell array).
//
// Pictures are held in fixed MAXR x MAXC arrays with the used size passed
// in. Weight of one channel: W = 255 / (1 + |a-b|), code = floor(log2 W)
// for W >= 2, else 0; colour weight = minimum code over R, G, B (R only in
// gray-scale mode); decoded value = 2**code, 0 for code 0. A pixel is a
// leader when its 8 decoded neighbour weights sum to more than phi_p.
// Segments grow from the first free leader in column-major order; in each
// step every free pixel whose weights to the segment's pixels sum to more
// than phi_z joins at once. Segment numbers run from 1 to 63.
package seg_ref_pkg;
  localparam int MAXR = 16;
  localparam int MAXC = 16;
  localparam int MAXLABEL = 63;

  typedef int img_t [MAXR][MAXC];

  function automatic int ref_chan_code(int a, int b);
    int d, w, c;
    d = (a > b) ? a - b : b - a;
    w = 255 / (1 + d);
    c = 0;
    while (w >= 2) begin
      w = w / 2;
      c++;
    end
    return c;
  endfunction

  function automatic int ref_dec(int code);
    return (code == 0) ? 0 : (1 << code);
  endfunction

  // weight code between pixels (r1,c1) and (r2,c2); 0 outside the picture
  function automatic int ref_w(const ref img_t ir, const ref img_t ig, const ref img_t ib,
                               input int rows, input int cols, input bit gray,
                               input int r1, input int c1, input int r2, input int c2);
    int wr, wg, wb, m;
    if (r1 < 0 || r2 < 0 || c1 < 0 || c2 < 0 || r1 >= rows || r2 >= rows ||
        c1 >= cols || c2 >= cols) return 0;
    wr = ref_chan_code(ir[r1][c1], ir[r2][c2]);
    if (gray) return wr;
    wg = ref_chan_code(ig[r1][c1], ig[r2][c2]);
    wb = ref_chan_code(ib[r1][c1], ib[r2][c2]);
    m = wr;
    if (wg < m) m = wg;
    if (wb < m) m = wb;
    return m;
  endfunction

  // decoded neighbour weights of every pixel, as an 8-entry table per pixel
  // (neighbour order: dr,dc over -1..1 skipping 0,0)
  typedef int nbw_t [MAXR][MAXC][8];

  function automatic void ref_neighbours(const ref img_t ir, const ref img_t ig,
                                         const ref img_t ib, input int rows, input int cols,
                                         input bit gray, ref nbw_t nbw);
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++) begin
        int k;
        k = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            if (dr != 0 || dc != 0) begin
              nbw[r][c][k] = ref_dec(ref_w(ir, ig, ib, rows, cols, gray, r, c, r + dr, c + dc));
              k++;
            end
      end
  endfunction

  // full segmentation; returns labels, segment count, growth steps with a
  // change (summed over segments), overflow flag
  function automatic void ref_segment(const ref nbw_t nbw, input int rows, input int cols,
                                      input int phi_p, input int phi_z,
                                      ref img_t lead, ref img_t label,
                                      output int nseg, output int nsteps,
                                      output bit ovf);
    int seg_of [MAXR][MAXC];
    int inseg [MAXR][MAXC];
    int nxt [MAXR][MAXC];
    nseg = 0; nsteps = 0; ovf = 0;
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++) begin
        int s;
        s = 0;
        for (int k = 0; k < 8; k++) s += nbw[r][c][k];
        lead[r][c]  = (s > phi_p) ? 1 : 0;
        label[r][c] = 0;
        seg_of[r][c] = 0;
      end
    forever begin
      int fr, fc;
      bit changed;
      fr = -1; fc = -1;
      for (int c = 0; c < cols && fr < 0; c++)
        for (int r = 0; r < rows && fr < 0; r++)
          if (lead[r][c] != 0 && seg_of[r][c] == 0) begin fr = r; fc = c; end
      if (fr < 0) break;
      if (nseg == MAXLABEL) begin ovf = 1; break; end
      nseg++;
      for (int r = 0; r < rows; r++) for (int c = 0; c < cols; c++) inseg[r][c] = 0;
      inseg[fr][fc] = 1;
      do begin
        changed = 0;
        for (int r = 0; r < rows; r++)
          for (int c = 0; c < cols; c++) begin
            nxt[r][c] = inseg[r][c];
            if (inseg[r][c] == 0 && seg_of[r][c] == 0) begin
              int s, k;
              s = 0; k = 0;
              for (int dr = -1; dr <= 1; dr++)
                for (int dc = -1; dc <= 1; dc++)
                  if (dr != 0 || dc != 0) begin
                    if (r + dr >= 0 && r + dr < rows && c + dc >= 0 && c + dc < cols)
                      if (inseg[r+dr][c+dc] != 0) s += nbw[r][c][k];
                    k++;
                  end
              if (s > phi_z) begin nxt[r][c] = 1; changed = 1; end
            end
          end
        inseg = nxt;
        if (changed) nsteps++;
      end while (changed);
      for (int r = 0; r < rows; r++)
        for (int c = 0; c < cols; c++)
          if (inseg[r][c] != 0) begin seg_of[r][c] = nseg; label[r][c] = nseg; end
    end
  endfunction

  // test pictures: kind 0 random pixels, kind 1 a few coloured rectangles
  // with small noise, kind 2 a gentle gradient with noise, kind 3 a
  // checkerboard of two colours (the worst case for the segmentation time)
  function automatic void gen_image(ref img_t ir, ref img_t ig, ref img_t ib,
                                    input int rows, input int cols, input int kind);
    int br [4], bg [4], bb [4], r0 [4], c0 [4];
    for (int k = 0; k < 4; k++) begin
      br[k] = $urandom_range(0, 255); bg[k] = $urandom_range(0, 255); bb[k] = $urandom_range(0, 255);
      r0[k] = $urandom_range(0, rows - 1); c0[k] = $urandom_range(0, cols - 1);
    end
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++) begin
        int reg_k;
        case (kind)
          0: begin
            ir[r][c] = $urandom_range(0, 255); ig[r][c] = $urandom_range(0, 255);
            ib[r][c] = $urandom_range(0, 255);
          end
          1: begin
            reg_k = 0;
            for (int k = 1; k < 4; k++) if (r >= r0[k] && c >= c0[k]) reg_k = k;
            ir[r][c] = clip(br[reg_k] + $urandom_range(0, 6) - 3);
            ig[r][c] = clip(bg[reg_k] + $urandom_range(0, 6) - 3);
            ib[r][c] = clip(bb[reg_k] + $urandom_range(0, 6) - 3);
          end
          3: begin
            reg_k = (r + c) % 2;
            ir[r][c] = reg_k ? br[0] : 255 - br[0];
            ig[r][c] = reg_k ? bg[0] : 255 - bg[0];
            ib[r][c] = reg_k ? 255 : 0;
          end
          default: begin
            ir[r][c] = clip(br[0] + 9 * r + $urandom_range(0, 20));
            ig[r][c] = clip(bg[0] + 9 * c + $urandom_range(0, 20));
            ib[r][c] = clip(bb[0] + 5 * (r + c) + $urandom_range(0, 20));
          end
        endcase
      end
  endfunction

  function automatic int clip(int v);
    return (v < 0) ? 0 : ((v > 255) ? 255 : v);
  endfunction
endpackage

// tb_min_select: exhaustive check of the minimum-selection circuit in colour
// and gray-scale mode.
module tb_min_select;
  import seg_pkg::*;
  logic gray;
  wcode_t wr, wg, wb, wm;
  int checks = 0, failures = 0;

  min_select dut (.gray_mode(gray), .w_r(wr), .w_g(wg), .w_b(wb), .w_min(wm));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 2; g++)
      for (int i = 0; i < 512; i++) begin
        int e;
        gray = g[0]; wr = 3'(i); wg = 3'(i >> 3); wb = 3'(i >> 6);
        #1;
        e = i & 7;
        if (!gray) begin
          if (((i >> 3) & 7) < e) e = (i >> 3) & 7;
          if (((i >> 6) & 7) < e) e = (i >> 6) & 7;
        end
        checks++;
        if (int'(wm) != e) begin
          failures++;
          $display("mismatch gray=%0d r=%0d g=%0d b=%0d got %0d exp %0d", gray, wr, wg, wb, wm, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

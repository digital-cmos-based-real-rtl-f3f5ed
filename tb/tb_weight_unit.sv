// tb_weight_unit: exhaustive check of the one-channel weight unit over all
// 256 x 256 pixel pairs against the division/logarithm reference.
module tb_weight_unit;
  import seg_pkg::*;
  import seg_ref_pkg::*;
  logic [7:0] a, b;
  wcode_t code;
  int checks = 0, failures = 0;

  weight_unit dut (.pix_a(a), .pix_b(b), .code);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (int'(code) != ref_chan_code(i, j)) begin
          failures++;
          if (failures < 10) $display("mismatch a=%0d b=%0d code=%0d exp=%0d", i, j, code, ref_chan_code(i, j));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

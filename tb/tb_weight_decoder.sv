// tb_weight_decoder: all eight codes of the 3-to-8-bit weight decoder.
module tb_weight_decoder;
  import seg_pkg::*;
  wcode_t code;
  wval_t value;
  int checks = 0, failures = 0;
  int expv [8] = '{0, 2, 4, 8, 16, 32, 64, 128};

  weight_decoder dut (.code, .value);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      code = 3'(i);
      #1;
      checks++;
      if (int'(value) != expv[i]) begin
        failures++;
        $display("code %0d -> %0d, expected %0d", i, value, expv[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

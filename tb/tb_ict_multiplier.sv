// tb_ict_multiplier: exhaustive check of the shift-add multiplier over all
// 8192 magnitudes and the six kernel magnitudes against plain products.
module tb_ict_multiplier;
  import ict_pkg::*;
  logic [12:0] mag;
  kmag_e       code;
  logic [16:0] prod;
  int checks = 0, failures = 0;
  const int KV [6] = '{2, 3, 6, 8, 9, 10};

  ict_multiplier dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 6; c++)
      for (int m = 0; m < 8192; m++) begin
        mag = 13'(m); code = kmag_e'(c);
        #1;
        checks++;
        if (int'(prod) != m * KV[c]) begin
          failures++;
          if (failures < 10) $display("x%0d * %0d = %0d, got %0d", KV[c], m, m*KV[c], prod);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

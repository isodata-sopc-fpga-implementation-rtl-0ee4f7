// tb_mean_average: exhaustive check of floor((m1 + m2) / 2) for 8-bit means.
module tb_mean_average;
  int checks = 0, failures = 0;
  logic [7:0] mean1, mean2, avg;

  mean_average #(.W(8)) dut (.mean1, .mean2, .avg);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        mean1 = 8'(a); mean2 = 8'(b);
        #1;
        checks++;
        if (avg !== 8'((a + b) / 2)) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d+%0d)/2 = %0d", a, b, avg);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_class_mean_div: class means from random histograms and random
// moment/population pairs with a mean below 256, compared with integer
// division; a zero population must give 0.
module tb_class_mean_div;
  int checks = 0, failures = 0;
  logic [31:0] moment;
  logic [15:0] population;
  logic [7:0]  mean;

  class_mean_div #(.NUM_W(32), .DEN_W(16), .Q_W(8)) dut (.moment, .population, .mean);

  task automatic check(int unsigned m, int unsigned p);
    int unsigned exp;
    moment = m; population = 16'(p);
    #1;
    exp = (p == 0) ? 0 : (m / p);
    checks++;
    if (mean !== 8'(exp)) begin
      failures++;
      $display("FAIL %0d / %0d: got %0d expected %0d", m, p, mean, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0);
    check(1000, 0);
    check(255 * 65535, 65535);
    check(255 * 65535 + 65534, 65535);
    check(0, 65535);
    check(7, 1);
    for (int i = 0; i < 3000; i++) begin
      int unsigned p, q, r;
      p = $urandom_range(1, 65535);
      q = $urandom_range(0, 255);
      r = $urandom_range(0, p - 1);
      check(p * q + r, p);
    end
    // from histograms: mean of levels lo..hi with random counts
    for (int i = 0; i < 300; i++) begin
      int unsigned lo, hi, m, p, h;
      lo = $urandom_range(0, 255);
      hi = $urandom_range(lo, 255);
      m = 0; p = 0;
      for (int unsigned g = lo; g <= hi; g++) begin
        h = $urandom_range(0, 250);
        m += h * g;
        p += h;
      end
      check(m, p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

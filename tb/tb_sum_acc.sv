// tb_sum_acc: random histogram counts accumulated by the Add-Acc, compared with
// a software sum modulo 2^16; also checks clear and hold when disabled.
module tb_sum_acc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        clr, en;
  logic [15:0] count, acc;
  int unsigned model;

  sum_acc #(.A_W(16), .ACC_W(16)) dut (.clk, .rst_n, .clr, .en, .count, .acc);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; en = 0; count = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      clr   = ($urandom_range(0, 199) == 0);
      en    = ($urandom_range(0, 4) != 0);
      count = 16'($urandom_range(0, 600));
      @(posedge clk);
      if (clr)     model = 0;
      else if (en) model = (model + 32'(count)) & 32'hFFFF;
      #1;
      checks++;
      if (acc !== 16'(model)) begin
        failures++;
        $display("FAIL step %0d: acc %0d expected %0d", i, acc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

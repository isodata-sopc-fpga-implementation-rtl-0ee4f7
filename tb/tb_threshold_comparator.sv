// tb_threshold_comparator: equality output and the registered DONE flag with
// its enable and clear.
module tb_threshold_comparator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       clr, en, equal, done, model;
  logic [7:0] t_new, t_old;

  threshold_comparator #(.W(8)) dut (.clk, .rst_n, .clr, .en, .t_new, .t_old, .equal, .done);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; en = 0; t_new = 0; t_old = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clr   = ($urandom_range(0, 9) == 0);
      en    = ($urandom_range(0, 1) == 0);
      t_old = 8'($urandom);
      t_new = ($urandom_range(0, 1) == 0) ? t_old : 8'($urandom);
      #1;
      checks++;
      if (equal !== (t_new == t_old)) begin failures++; $display("FAIL equal %0d %0d", t_new, t_old); end
      @(posedge clk);
      if (clr)     model = 0;
      else if (en) model = (t_new == t_old);
      #1;
      checks++;
      if (done !== model) begin failures++; $display("FAIL done %0d exp %0d", done, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_threshold_register: load/hold of the threshold, T+1 and the top-level flag.
module tb_threshold_register;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       load, is_max;
  logic [7:0] d, q, q_plus1, model;

  threshold_register #(.W(8)) dut (.clk, .rst_n, .load, .d, .q, .q_plus1, .is_max);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; d = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (q !== 8'd0) begin failures++; $display("FAIL reset value %0d", q); end
    rst_n = 1;
    model = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      load = ($urandom_range(0, 2) == 0);
      d    = (i % 50 == 0) ? 8'd255 : 8'($urandom);
      @(posedge clk);
      if (load) model = d;
      #1;
      checks += 3;
      if (q !== model)            begin failures++; $display("FAIL q %0d exp %0d", q, model); end
      if (q_plus1 !== model + 8'd1) begin failures++; $display("FAIL q+1 %0d", q_plus1); end
      if (is_max !== (model == 8'd255)) begin failures++; $display("FAIL is_max at %0d", model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

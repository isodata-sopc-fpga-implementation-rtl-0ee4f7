// tb_mac_unit: random count/level products accumulated by the MAC, compared
// with a software sum; also checks clear and hold when disabled.
module tb_mac_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        clr, en;
  logic [15:0] count;
  logic [7:0]  level;
  logic [31:0] acc;
  longint      model;

  mac_unit #(.A_W(16), .B_W(8), .ACC_W(32)) dut (.clk, .rst_n, .clr, .en, .count, .level, .acc);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; en = 0; count = 0; level = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      clr   = ($urandom_range(0, 299) == 0);
      en    = ($urandom_range(0, 4) != 0);
      count = ((i % 2) != 0) ? 16'hFFFF : 16'($urandom);
      level = ((i % 3) != 0) ? 8'hFF : 8'($urandom);
      @(posedge clk);
      if (clr)     model = 0;
      else if (en) model = (model + longint'(count) * longint'(level)) & 64'hFFFF_FFFF;
      #1;
      checks++;
      if (acc !== 32'(model)) begin
        failures++;
        $display("FAIL step %0d: acc %0d expected %0d", i, acc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

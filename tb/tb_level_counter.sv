// tb_level_counter: checks both directions of the level counter against a
// software model over random load / enable sequences, and the `last` flag.
module tb_level_counter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       load, en;
  logic [7:0] load_val, cnt_dn, cnt_up;
  logic       last_dn, last_up;

  level_counter #(.W(8), .UP(1'b0)) dut_dn (.clk, .rst_n, .load, .load_val, .en, .count(cnt_dn), .last(last_dn));
  level_counter #(.W(8), .UP(1'b1)) dut_up (.clk, .rst_n, .load, .load_val, .en, .count(cnt_up), .last(last_up));

  logic [7:0] m_dn, m_up;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; en = 0; load_val = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m_dn = 0; m_up = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      load     = ($urandom_range(0, 15) == 0);
      en       = ($urandom_range(0, 3) != 0);
      load_val = 8'($urandom);
      if (i % 700 == 5) begin load = 1; load_val = 8'd2; end      // near 0
      if (i % 700 == 350) begin load = 1; load_val = 8'd253; end  // near 255
      @(posedge clk);
      if (load)    begin m_dn = load_val; m_up = load_val; end
      else if (en) begin m_dn = m_dn - 1; m_up = m_up + 1; end
      #1;
      check("down count", 32'(cnt_dn), 32'(m_dn));
      check("up count", 32'(cnt_up), 32'(m_up));
      check("down last", 32'(last_dn), 32'(m_dn == 0));
      check("up last", 32'(last_up), 32'(m_up == 255));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

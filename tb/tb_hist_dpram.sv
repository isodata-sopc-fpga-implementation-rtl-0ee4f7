// tb_hist_dpram: random reads and writes on both ports of the histogram
// memory against an array model, including the one-clock read latency and
// old-data return for a read of the word written by the other port.
module tb_hist_dpram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]  a_addr, b_addr;
  logic        a_we, b_we;
  logic [15:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [15:0] model [256];
  logic [15:0] exp_a, exp_b;

  hist_dpram #(.DEPTH(256), .WIDTH(16)) dut (.clk, .a_addr, .a_we, .a_wdata, .a_rdata,
                                             .b_addr, .b_we, .b_wdata, .b_rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill through both ports
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      a_we = 1; a_addr = 8'(2 * i);     a_wdata = 16'($urandom);
      b_we = 1; b_addr = 8'(2 * i + 1); b_wdata = 16'($urandom);
      model[2 * i] = a_wdata; model[2 * i + 1] = b_wdata;
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      a_addr = 8'($urandom); b_addr = 8'($urandom);
      if (i % 7 == 0) b_addr = a_addr;
      a_we = ($urandom_range(0, 2) == 0);
      b_we = ($urandom_range(0, 2) == 0) && !(a_we && a_addr == b_addr);
      a_wdata = 16'($urandom); b_wdata = 16'($urandom);
      exp_a = model[a_addr]; exp_b = model[b_addr];
      @(posedge clk);
      if (a_we) model[a_addr] = a_wdata;
      if (b_we) model[b_addr] = b_wdata;
      #1;
      checks += 2;
      if (a_rdata !== exp_a) begin failures++; $display("FAIL A read %0d: %h exp %h", a_addr, a_rdata, exp_a); end
      if (b_rdata !== exp_b) begin failures++; $display("FAIL B read %0d: %h exp %h", b_addr, b_rdata, exp_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

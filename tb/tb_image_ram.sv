// tb_image_ram: random writes and reads of the image memory against an array
// model (small depth), including a read of the word being written.
module tb_image_ram;
  localparam int N = 1000;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we;
  logic [9:0]  waddr, raddr;
  logic [7:0]  wdata, rdata, exp_r;
  logic [7:0]  model [N];

  image_ram #(.DEPTH(N), .WIDTH(8)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      we = 1; waddr = 10'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 1) == 0);
      waddr = 10'($urandom_range(0, N - 1));
      raddr = (i % 5 == 0) ? waddr : 10'($urandom_range(0, N - 1));
      wdata = 8'($urandom);
      exp_r = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== exp_r) begin failures++; $display("FAIL read %0d: %0d exp %0d", raddr, rdata, exp_r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

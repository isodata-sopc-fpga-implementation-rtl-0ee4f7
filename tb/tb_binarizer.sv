// tb_binarizer: fills a small image memory with random pixels (plus pixels at
// T and T+1), runs the binarizer at several thresholds and checks every
// rewritten pixel (0 at or below T, 255 above) and the pass time of NPIX+1
// clocks.
module tb_binarizer;
  localparam int N = 600;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start, busy, done, b_we, tb_we;
  logic [7:0]  threshold, b_wdata, rdata, tb_wdata;
  logic [9:0]  b_raddr, b_waddr, tb_addr;
  logic [7:0]  orig [N];
  logic        tb_mode;

  binarizer #(.NPIX(N)) dut (.clk, .rst_n, .start, .threshold, .busy, .done,
                             .img_raddr(b_raddr), .img_rdata(rdata), .img_we(b_we),
                             .img_waddr(b_waddr), .img_wdata(b_wdata));

  image_ram #(.DEPTH(N), .WIDTH(8)) mem (
    .clk, .we(tb_mode ? tb_we : b_we), .waddr(tb_mode ? tb_addr : b_waddr),
    .wdata(tb_mode ? tb_wdata : b_wdata), .raddr(tb_mode ? tb_addr : b_raddr), .rdata);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, n;
    start = 0; threshold = 0; tb_mode = 1; tb_we = 0; tb_addr = 0; tb_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (t_list[k]) begin
      t = t_list[k];
      tb_mode = 1;
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        tb_we = 1; tb_addr = 10'(i);
        tb_wdata = (i % 10 == 0) ? 8'(t) : (i % 10 == 1) ? 8'(t + 1) : 8'($urandom);
        orig[i] = tb_wdata;
      end
      @(negedge clk); tb_we = 0; tb_mode = 0; threshold = 8'(t);
      start = 1;
      @(negedge clk); start = 0;
      n = 1;
      while (!done) begin @(negedge clk); n++; end
      checks++;
      if (n != N + 2) begin failures++; $display("FAIL pass took %0d clocks, expected %0d", n, N + 2); end
      tb_mode = 1;
      for (int i = 0; i < N; i++) begin
        @(negedge clk); tb_addr = 10'(i);
        @(posedge clk); #1;
        checks++;
        if (rdata !== ((orig[i] > 8'(t)) ? 8'd255 : 8'd0)) begin
          failures++;
          if (failures < 20) $display("FAIL pixel %0d (%0d, T=%0d) -> %0d", i, orig[i], t, rdata);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t_list [4] = '{0, 100, 127, 254};
endmodule

// tb_histogram_unit: streams pixel sequences (random, long runs of one value,
// alternating pairs, gaps) through the histogram unit and its memory and
// compares every bin with a software histogram. Runs a clear between images
// and checks the clear time (256 clocks) and that back-to-back repeats of a
// bin (the forwarding paths) occur.
module tb_histogram_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        clear, busy, pix_valid, idle;
  logic [7:0]  pix, raddr, waddr, rd_addr;
  logic [15:0] rdata, wdata, b_rdata;
  logic        we, reading;
  int unsigned model [256];
  int          fwd1 = 0, fwd2 = 0;

  histogram_unit dut (.clk, .rst_n, .clear, .busy, .pix_valid, .pix, .idle,
                      .ram_raddr(raddr), .ram_rdata(rdata), .ram_we(we),
                      .ram_waddr(waddr), .ram_wdata(wdata));

  // port B is shared: the unit writes, the checker reads when idle
  hist_dpram #(.DEPTH(256), .WIDTH(16)) mem (
    .clk, .a_addr(raddr), .a_we(1'b0), .a_wdata('0), .a_rdata(rdata),
    .b_addr(reading ? rd_addr : waddr), .b_we(we), .b_wdata(wdata), .b_rdata(b_rdata));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_clear();
    int n = 0;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    while (busy) begin @(negedge clk); n++; end
    checks++;
    if (n != 256) begin failures++; $display("FAIL clear took %0d clocks", n); end
    foreach (model[i]) model[i] = 0;
  endtask

  task automatic check_bins();
    reading = 1;
    for (int g = 0; g < 256; g++) begin
      @(negedge clk); rd_addr = 8'(g);
      @(posedge clk); #1;
      checks++;
      if (b_rdata !== 16'(model[g])) begin
        failures++;
        if (failures < 20) $display("FAIL bin %0d: %0d expected %0d", g, b_rdata, model[g]);
      end
    end
    reading = 0;
  endtask

  task automatic send(int mode, int n);
    logic [7:0] p1 = 0, p2 = 0;   // the two previous pixels
    bit v1 = 0, v2 = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      pix_valid = ($urandom_range(0, 5) != 0) || mode == 1;
      unique case (mode)
        0: pix = 8'($urandom);
        1: pix = 8'(i < n / 2 ? 37 : 200);                   // long runs
        2: pix = ((i % 2) != 0) ? 8'd10 : 8'd11;                      // A B A B
        default: pix = 8'($urandom_range(120, 123));         // few bins
      endcase
      if (pix_valid) begin
        model[pix]++;
        if (v1 && p1 == pix) fwd1++;
        else if (v2 && p2 == pix) fwd2++;
      end
      v2 = v1; p2 = p1; v1 = pix_valid; p1 = pix;
    end
    @(negedge clk); pix_valid = 0;
    while (!idle) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    clear = 0; pix_valid = 0; pix = 0; reading = 0; rd_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      do_clear();
      check_bins();                  // all zero
      send(m, 3000);
      check_bins();
    end
    do_clear();
    send(0, 20000);
    send(3, 2000);
    check_bins();
    checks++;
    if (fwd1 == 0 || fwd2 == 0) begin failures++; $display("FAIL forwarding never exercised"); end
    $display("forwarding: one-ahead %0d two-ahead %0d", fwd1, fwd2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

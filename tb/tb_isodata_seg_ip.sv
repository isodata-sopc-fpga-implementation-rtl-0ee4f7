// tb_isodata_seg_ip: end-to-end test of the segmentation peripheral at its
// default size (160 x 120 pixels), driven as a processor would over the
// Avalon-MM slave: write the image, start, poll STATUS while trying an image
// access (which must stall on waitrequest), wait for irq, read the threshold,
// iteration count and the binarized image, and compare all of them with a
// software model (histogram, Ridler-Calvard iteration from the overall mean,
// pixel > T -> 255 else 0). Images: a synthetic text page (dark strokes on a
// light, shaded background), a two-region image, a low-contrast image, and a
// flat image, whose upper class is empty so the run must end in ERROR with the
// image untouched. It also counts that each mechanism happened: repeated
// pixels hitting the histogram forwarding, runs of more than one ISODATA
// iteration, convergence, the empty-class error, bus stalls and the interrupt.
module tb_isodata_seg_ip;
  import isodata_pkg::*;
  localparam int W = 160, H = 120, N = W * H;
  localparam int AW = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [AW:0]  avs_address;
  logic         avs_read, avs_write, avs_readdatavalid, avs_waitrequest, irq;
  logic [31:0]  avs_writedata, avs_readdata;

  isodata_seg_ip dut (.clk, .rst_n, .avs_address, .avs_read, .avs_write, .avs_writedata,
                      .avs_readdata, .avs_readdatavalid, .avs_waitrequest, .irq);

  logic [7:0]  img [N];
  int unsigned h [256];
  int stalls = 0, fwd_hits = 0, multi_iter = 0, converged = 0, empty_err = 0, irqs = 0;

  always @(posedge clk) if (avs_waitrequest) stalls++;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- bus master
  task automatic bus_write(logic [AW:0] a, logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_write = 1; avs_writedata = d;
    @(posedge clk);
    while (avs_waitrequest) @(posedge clk);
    @(negedge clk); avs_write = 0;
  endtask

  task automatic bus_read(logic [AW:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_read = 1;
    @(posedge clk);
    while (avs_waitrequest) @(posedge clk);
    @(negedge clk); avs_read = 0;
    while (!avs_readdatavalid) @(negedge clk);
    d = avs_readdata;
  endtask

  function automatic logic [AW:0] pix_addr(int i);
    return {1'b1, AW'(i)};
  endfunction
  function automatic logic [AW:0] reg_addr(logic [1:0] r);
    return {1'b0, AW'(r)};
  endfunction

  // ---------------------------------------------------------------- model
  task automatic model(output int t, output int iters, output bit err);
    longint m, p, m1, p1, m2, p2;
    int tn;
    foreach (h[g]) h[g] = 0;
    for (int i = 0; i < N; i++) h[img[i]]++;
    m = 0; p = 0; err = 0; iters = 0;
    for (int g = 0; g < 256; g++) begin m += longint'(h[g]) * g; p += longint'(h[g]); end
    t = int'(m / p);
    forever begin
      m1 = 0; p1 = 0; m2 = 0; p2 = 0;
      for (int g = 0; g <= t; g++)      begin m1 += longint'(h[g]) * g; p1 += longint'(h[g]); end
      for (int g = t + 1; g < 256; g++) begin m2 += longint'(h[g]) * g; p2 += longint'(h[g]); end
      if (p1 == 0 || p2 == 0) begin err = 1; return; end
      iters++;
      tn = int'((m1 / p1 + m2 / p2) / 2);
      if (tn == t) return;
      t = tn;
    end
  endtask

  // ---------------------------------------------------------------- one image
  task automatic run_image(string name);
    int exp_t, exp_it, cyc;
    bit exp_err;
    logic [31:0] d;
    model(exp_t, exp_it, exp_err);
    for (int i = 1; i < N; i++) if (img[i] == img[i - 1]) fwd_hits++;
    for (int i = 0; i < N; i++) bus_write(pix_addr(i), {24'h0, img[i]});
    bus_write(reg_addr(REG_CTRL), 32'h1);
    bus_read(reg_addr(REG_STATUS), d);
    check({name, " busy after start"}, int'(d[0]), 1);
    // an image access now must wait until the run is over
    bus_read(pix_addr(5), d);
    bus_read(reg_addr(REG_STATUS), d);
    check({name, " idle after stalled access"}, int'(d[0]), 0);
    cyc = 0;
    while (!irq && !d[2] && cyc < 200000) begin
      bus_read(reg_addr(REG_STATUS), d);
      cyc++;
    end
    check({name, " error flag"}, int'(d[2]), int'(exp_err));
    check({name, " done flag"}, int'(d[1]), int'(!exp_err));
    check({name, " irq"}, int'(irq), int'(!exp_err));
    if (irq) irqs++;
    if (exp_err) empty_err++;
    else begin
      converged++;
      if (exp_it > 1) multi_iter++;
      bus_read(reg_addr(REG_THRESH), d);
      check({name, " threshold"}, int'(d[7:0]), exp_t);
      bus_read(reg_addr(REG_ITER), d);
      check({name, " iterations"}, int'(d[7:0]), exp_it);
    end
    for (int i = 0; i < N; i++) begin
      bus_read(pix_addr(i), d);
      if (exp_err) check({name, " untouched pixel"}, int'(d[7:0]), int'(img[i]));
      else         check({name, " binarized pixel"}, int'(d[7:0]), int'(img[i]) > exp_t ? 255 : 0);
    end
    $display("%s: T=%0d after %0d iterations%s", name, exp_t, exp_it, exp_err ? " (empty class)" : "");
  endtask

  initial begin
    avs_address = '0; avs_read = 0; avs_write = 0; avs_writedata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // text page: shaded paper, dark strokes in lines
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int bg;
        bit ink;
        bg  = 150 + (x + y) / 4 + $urandom_range(0, 12);
        ink = ((y % 16) >= 4 && (y % 16) < 11) && (((x / 3) * 7 + y) % 5 < 2);
        img[y * W + x] = 8'(ink ? 25 + $urandom_range(0, 40) : (bg > 255 ? 255 : bg));
      end
    run_image("text page");

    // two regions with long runs of equal pixels
    for (int i = 0; i < N; i++) img[i] = 8'((i % W) < 60 ? 70 : 190);
    run_image("two regions");

    // low contrast noise
    for (int i = 0; i < N; i++) img[i] = 8'($urandom_range(100, 140) + ((i / W) > 80 ? 20 : 0));
    run_image("low contrast");

    // flat image: class C2 empty
    for (int i = 0; i < N; i++) img[i] = 8'd128;
    run_image("flat");

    check("histogram forwarding exercised", int'(fwd_hits > 0), 1);
    check("multi-iteration run seen", int'(multi_iter > 0), 1);
    check("convergence seen", int'(converged > 0), 1);
    check("empty class error seen", int'(empty_err > 0), 1);
    check("bus stall seen", int'(stalls > 0), 1);
    check("interrupt seen", int'(irqs > 0), 1);
    $display("mechanisms: forwarding %0d, multi-iteration %0d, converged %0d, empty-class %0d, stall clocks %0d, irq %0d",
             fwd_hits, multi_iter, converged, empty_err, stalls, irqs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

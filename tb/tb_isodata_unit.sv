// tb_isodata_unit: loads histograms into a histogram memory, runs the ISODATA
// unit and compares the threshold, the iteration count, the error flag and the
// run time with a software Ridler-Calvard model (initial threshold = overall
// mean, class means rounded down, T' = floor((m1 + m2) / 2), stop when T' == T,
// error when a class is empty). Expected time: each pass, the initial one
// included, takes max(T+1, 255-T) + 4 clocks.
module tb_isodata_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int multi_iter = 0, one_iter = 0, errors_seen = 0;

  logic        start, busy, done, error;
  logic [7:0]  threshold, iterations, c1_addr, c2_addr;
  logic [15:0] c1_data, c2_data;
  logic        loading;
  logic [7:0]  ld_addr;
  logic [15:0] ld_data;
  int unsigned h [256];

  isodata_unit dut (.clk, .rst_n, .start, .busy, .done, .error, .threshold, .iterations,
                    .c1_addr, .c1_data, .c2_addr, .c2_data);

  hist_dpram #(.DEPTH(256), .WIDTH(16)) mem (
    .clk, .a_addr(loading ? ld_addr : c1_addr), .a_we(loading), .a_wdata(ld_data), .a_rdata(c1_data),
    .b_addr(c2_addr), .b_we(1'b0), .b_wdata('0), .b_rdata(c2_data));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // software model
  task automatic model(output int t, output int iters, output bit err, output int cycles);
    longint m, p, m1, p1, m2, p2;
    int tn;
    m = 0; p = 0; err = 0; iters = 0;
    for (int g = 0; g < 256; g++) begin m += longint'(h[g]) * g; p += longint'(h[g]); end
    cycles = 256 + 4;
    if (p == 0) begin err = 1; t = 0; cycles -= 1; return; end
    t = int'(m / p);
    forever begin
      m1 = 0; p1 = 0; m2 = 0; p2 = 0;
      for (int g = 0; g <= t; g++)       begin m1 += longint'(h[g]) * g; p1 += longint'(h[g]); end
      for (int g = t + 1; g < 256; g++)  begin m2 += longint'(h[g]) * g; p2 += longint'(h[g]); end
      cycles += ((t + 1) > (255 - t) ? (t + 1) : (255 - t)) + 4;
      if (p1 == 0 || p2 == 0) begin err = 1; cycles -= 1; return; end
      iters++;
      tn = int'((m1 / p1 + m2 / p2) / 2);
      if (tn == t) return;
      t = tn;
    end
  endtask

  task automatic run_case(string name);
    int exp_t, exp_it, exp_cyc, n;
    bit exp_err;
    loading = 1;
    for (int g = 0; g < 256; g++) begin
      @(negedge clk); ld_addr = 8'(g); ld_data = 16'(h[g]);
    end
    @(negedge clk); loading = 0;
    model(exp_t, exp_it, exp_err, exp_cyc);
    start = 1;
    @(negedge clk); start = 0;
    n = 0;   // clocks after the one that sampled start
    while (!(done || error)) begin @(negedge clk); n++; end
    checks++;
    if (error !== exp_err) begin failures++; $display("FAIL %s: error %0d expected %0d", name, error, exp_err); end
    if (exp_err) errors_seen++;
    if (!exp_err) begin
      checks += 3;
      if (threshold !== 8'(exp_t)) begin failures++; $display("FAIL %s: T %0d expected %0d", name, threshold, exp_t); end
      if (iterations !== 8'(exp_it)) begin failures++; $display("FAIL %s: %0d iterations expected %0d", name, iterations, exp_it); end
      if (n != exp_cyc) begin failures++; $display("FAIL %s: %0d clocks expected %0d", name, n, exp_cyc); end
      if (exp_it > 1) multi_iter++; else one_iter++;
    end
  endtask

  task automatic bimodal(int mu1, int mu2, int w1, int w2, int n1, int n2);
    foreach (h[g]) h[g] = 0;
    for (int i = 0; i < n1; i++) h[$urandom_range(mu1 > w1 ? mu1 - w1 : 0, mu1 + w1 > 255 ? 255 : mu1 + w1)]++;
    for (int i = 0; i < n2; i++) h[$urandom_range(mu2 > w2 ? mu2 - w2 : 0, mu2 + w2 > 255 ? 255 : mu2 + w2)]++;
  endtask

  initial begin
    start = 0; loading = 0; ld_addr = 0; ld_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // document-like: dark ink on light paper
    bimodal(40, 200, 20, 30, 3000, 16000);  run_case("text page");
    bimodal(90, 170, 40, 40, 9000, 9000);   run_case("balanced");
    bimodal(10, 250, 10, 5, 100, 30000);    run_case("skewed");
    for (int k = 0; k < 25; k++) begin
      bimodal($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 60),
              $urandom_range(0, 60), $urandom_range(1, 20000), $urandom_range(0, 20000));
      run_case("random");
    end
    // two single levels: 0 and 255 (extreme counter ranges)
    foreach (h[g]) h[g] = 0;
    h[0] = 500; h[255] = 700;                run_case("0 and 255");
    // one level only: the upper class is empty -> error
    foreach (h[g]) h[g] = 0;
    h[77] = 1234;                            run_case("single level");
    // empty histogram -> error
    foreach (h[g]) h[g] = 0;
    run_case("empty");
    checks++;
    if (multi_iter == 0 || one_iter == 0 || errors_seen < 2) begin
      failures++;
      $display("FAIL coverage: multi-iteration %0d single %0d errors %0d", multi_iter, one_iter, errors_seen);
    end
    $display("runs: multi-iteration %0d, single-iteration %0d, empty class %0d", multi_iter, one_iter, errors_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

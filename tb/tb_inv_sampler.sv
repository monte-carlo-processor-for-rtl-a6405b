// tb_inv_sampler: fills the 65536-entry table with the inverse cumulative
// distribution of a Gaussian (mean 510, sigma 120 half-nanoseconds, i.e.
// 255 ns and 60 ns) computed here, checks the one-clock read, then samples
// with uniform random addresses and checks the mean and sigma of the output.
module tb_inv_sampler;
  localparam int N = 16, M = 10;
  logic clk = 0, we = 0;
  logic [N-1:0] waddr = '0, rnd = '0;
  logic [M-1:0] wdata = '0, dly;
  int checks = 0, failures = 0;
  logic [M-1:0] table_ref [2**N];

  inv_sampler #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // inverse CDF of a normal distribution truncated to 0 .. 2^M-1
  task automatic build_table(real mu, real sigma);
    real cdf[2**M];
    real acc = 0.0;
    int x = 0;
    for (int i = 0; i < 2**M; i++) begin
      acc += $exp(-0.5 * ((i - mu) / sigma) ** 2);
      cdf[i] = acc;
    end
    for (int i = 0; i < 2**M; i++) cdf[i] /= acc;
    for (int u = 0; u < 2**N; u++) begin
      real q = (u + 0.5) / (2.0 ** N);
      while (x < 2**M - 1 && cdf[x] < q) x++;
      table_ref[u] = M'(x);
    end
  endtask

  initial begin
    real s = 0.0, s2 = 0.0, mean, sd;
    int ns = 100000;
    logic [N-1:0] a;
    build_table(510.0, 120.0);
    for (int u = 0; u < 2**N; u++) begin
      we = 1; waddr = N'(u); wdata = table_ref[u];
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < ns; i++) begin
      a = N'($urandom);
      rnd = a;
      @(posedge clk); #1;
      checks++;
      if (dly !== table_ref[a]) begin failures++; if (failures < 10) $display("addr %h got %0d exp %0d", a, dly, table_ref[a]); end
      s += dly; s2 += real'(dly) * real'(dly);
    end
    mean = s / ns;
    sd = $sqrt(s2 / ns - mean * mean);
    $display("sampled mean %f sigma %f (half-ns)", mean, sd);
    checks++; if (mean < 505.0 || mean > 515.0) failures++;
    checks++; if (sd < 115.0 || sd > 125.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

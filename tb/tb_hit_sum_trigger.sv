// tb_hit_sum_trigger: random 94-bit pulse patterns of varying density; checks
// the registered sum (1 clock) and the levels sum >= 1..4 (2 clocks).
module tb_hit_sum_trigger;
  localparam int NCH = 94;
  logic clk = 0, rst_n = 0;
  logic [NCH-1:0] pulse = '0;
  logic [6:0] sum;
  logic [3:0] ge;
  int checks = 0, failures = 0;
  int hist[$];
  int lev_seen[4] = '{0, 0, 0, 0};

  hit_sum_trigger #(.NCH(NCH), .NLEV(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      automatic int dens = (c / 500) % 5;   // 0: very sparse .. 4: dense
      for (int i = 0; i < NCH; i++)
        pulse[i] = (dens == 4) ? $urandom % 2 : ($urandom % (NCH * 2 / (dens + 1))) == 0;
      hist.push_back($countones(pulse));
      @(posedge clk); #1;
      if (hist.size() >= 1) begin
        checks++;
        if (sum != hist[hist.size() - 1]) begin failures++; if (failures < 10) $display("sum %0d exp %0d", sum, hist[hist.size()-1]); end
      end
      if (hist.size() >= 2) begin
        for (int n = 1; n <= 4; n++) begin
          checks++;
          if (ge[n-1] != (hist[hist.size() - 2] >= n)) begin failures++; if (failures < 10) $display("ge%0d wrong", n); end
          lev_seen[n-1] += ge[n-1];
        end
      end
    end
    for (int n = 0; n < 4; n++) begin checks++; if (lev_seen[n] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

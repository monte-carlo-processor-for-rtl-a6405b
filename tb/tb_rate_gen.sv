// tb_rate_gen: fixed mode must give exactly one event every 'period' clocks;
// Poisson mode must follow rnd <= p one clock later; disabling stops events.
module tb_rate_gen;
  logic clk = 0, rst_n = 0, en = 0, mode = 0, ev;
  logic [31:0] p = '0, period = 32'd10, rnd = '0;
  int checks = 0, failures = 0;

  rate_gen #(.W(32)) dut (.clk, .rst_n, .en, .mode, .p, .period, .rnd, .event_o(ev));
  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, nev;
    int plist[4] = '{10, 1, 7, 166667};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    mode = 1;
    foreach (plist[k]) begin
      period = plist[k]; en = 1; last = -1; nev = 0;
      for (int c = 0; c < (plist[k] > 1000 ? 3 * plist[k] + 5 : 500); c++) begin
        @(posedge clk); #1;
        if (ev) begin
          if (last >= 0) begin
            checks++;
            if (c - last != plist[k]) begin failures++; $display("period %0d: spacing %0d", plist[k], c - last); end
          end
          last = c; nev++;
        end
      end
      checks++; if (nev < 2) begin failures++; $display("too few events"); end
      en = 0; @(posedge clk); #1;
      checks++; if (ev) failures++;
    end
    mode = 0; en = 1;
    for (int c = 0; c < 2000; c++) begin
      bit exp;
      p = 32'h2000_0000; rnd = $urandom;
      exp = rnd <= p;
      @(posedge clk); #1;
      checks++; if (ev != exp) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

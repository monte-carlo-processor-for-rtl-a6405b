// tb_pulse_stretch: drives random sparse hits into 6 channels with several
// widths (including 30 clocks = 600 ns at 50 MHz) and compares each output
// with a reference that keeps a pulse high for 'width' clocks after the
// latest hit.
module tb_pulse_stretch;
  localparam int NCH = 6;
  logic clk = 0, rst_n = 0;
  logic [NCH-1:0] hit = '0, pulse;
  logic [15:0] width = 16'd30;
  int checks = 0, failures = 0;
  int last[NCH];
  int cyc = 0;
  int npulse = 0;

  pulse_stretch #(.NCH(NCH), .CW(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NCH-1:0] exp;
    int wlist[4] = '{30, 1, 7, 3};
    foreach (last[i]) last[i] = -100000;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int w = 0; w < 4; w++) begin
      width = 16'(wlist[w]);
      foreach (last[i]) last[i] = -100000;
      repeat (100) @(posedge clk);
      #1;
      for (int c = 0; c < 4000; c++) begin
        for (int i = 0; i < NCH; i++) hit[i] = ($urandom % 40) == 0;
        @(posedge clk); #1; cyc++;
        for (int i = 0; i < NCH; i++) if (hit[i]) last[i] = cyc;
        for (int i = 0; i < NCH; i++) exp[i] = (cyc - last[i]) < int'(width);
        checks++;
        if (pulse !== exp) begin
          failures++; if (failures < 10) $display("w %0d cyc %0d got %b exp %b", width, cyc, pulse, exp);
        end
        npulse += $countones(pulse);
      end
      hit = '0;
    end
    if (npulse == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

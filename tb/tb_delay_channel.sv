// tb_delay_channel: for many delays (0, 7, 8, 1023 and random) reconstructs
// the sub-sample stream from the 8-bit words and checks that the pulse starts
// exactly 'dly' half-nanoseconds after the reference (first word two clocks
// after the start strobe) and lasts 40 sub-samples (20 ns), with nothing else.
module tb_delay_channel;
  localparam int M = 10, PW = 40;
  logic clk = 0, rst_n = 0, start = 0;
  logic [M-1:0] dly = '0;
  logic [7:0] os;
  int checks = 0, failures = 0;

  delay_channel #(.M(M), .PW(PW)) dut (.*);
  always #2 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    int first, last, nhigh;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      case (t)
        0: d = 0; 1: d = 7; 2: d = 8; 3: d = 1023; 4: d = 1;
        default: d = $urandom % 1024;
      endcase
      dly = M'(d); start = 1;
      @(posedge clk); #1 start = 0;
      first = -1; last = -1; nhigh = 0;
      for (int c = 0; c < 140; c++) begin
        @(posedge clk); #1;
        for (int i = 0; i < 8; i++) if (os[i]) begin
          if (first < 0) first = 8 * c + i;
          last = 8 * c + i; nhigh++;
        end
      end
      checks++;
      if (first != d || last != d + PW - 1 || nhigh != PW) begin
        failures++;
        if (failures < 10) $display("dly %0d: first %0d last %0d n %0d", d, first, last, nhigh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

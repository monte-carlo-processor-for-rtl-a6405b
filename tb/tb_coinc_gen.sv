// tb_coinc_gen: for Any2/Any3/Any4 generators of 94 channels, checks that a
// successful trial hits exactly MULT consecutive channels (wrapping) starting
// at floor(rnd_sel * 94 / 2^32), and that a failed trial hits none.
module tb_coinc_gen;
  localparam int NCH = 94;
  logic clk = 0, rst_n = 0, en = 0;
  logic [31:0] rnd_rate = '0, p = '0, rnd_sel = '0;
  logic [2:0][NCH-1:0] hits;
  int checks = 0, failures = 0;

  for (genvar m = 0; m < 3; m++) begin : g
    coinc_gen #(.NCH(NCH), .MULT(m + 2), .W(32)) dut (
      .clk, .rst_n, .en, .rnd_rate, .p, .rnd_sel, .hits(hits[m]));
  end
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NCH-1:0] exp;
    bit fire;
    longint base;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      en = (i % 9) != 0;
      p = 32'h4000_0000;
      rnd_rate = $urandom;
      rnd_sel = (i % 50 == 0) ? 32'hFFFF_FFFF : $urandom;
      fire = en && (rnd_rate <= p);
      base = (longint'(rnd_sel) * NCH) >> 32;
      @(posedge clk); #1;
      for (int m = 0; m < 3; m++) begin
        exp = '0;
        if (fire) for (int k = 0; k < m + 2; k++) exp[(base + k) % NCH] = 1'b1;
        checks++;
        if (hits[m] !== exp) begin
          failures++;
          if (failures < 10) $display("mult %0d: base %0d got %h exp %h", m + 2, base, hits[m], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

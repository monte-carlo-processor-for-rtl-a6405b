// tb_lfsr96: checks the 32-bit-per-clock LFSR against a one-bit-per-step
// reference (new bit = s[95]^s[93]^s[48]^s[46], register shifted left by one),
// stepped 32 times per clock, for several seeds and with enable low.
module tb_lfsr96;
  logic clk = 0, load, en;
  logic [95:0] seed;
  logic [31:0] rnd;
  int checks = 0, failures = 0;
  logic [95:0] ref_sr;

  lfsr96 dut (.clk, .load, .seed, .en, .rnd);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ref_step32();
    for (int s = 0; s < 32; s++)
      ref_sr = {ref_sr[94:0], ref_sr[95] ^ ref_sr[93] ^ ref_sr[48] ^ ref_sr[46]};
  endtask

  initial begin
    load = 0; en = 0; seed = '0;
    for (int t = 0; t < 4; t++) begin
      seed = {$urandom, $urandom, $urandom} | 96'h1;
      load = 1; @(posedge clk); #1 load = 0;
      ref_sr = seed;
      checks++; if (rnd !== seed[31:0]) begin failures++; $display("load mismatch"); end
      for (int c = 0; c < 500; c++) begin
        en = ($urandom % 4) != 0;
        @(posedge clk); #1;
        if (en) ref_step32();
        checks++;
        if (rnd !== ref_sr[31:0]) begin
          failures++;
          if (failures < 10) $display("seed %0d clk %0d: got %h exp %h", t, c, rnd, ref_sr[31:0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

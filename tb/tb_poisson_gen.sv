// tb_poisson_gen: checks the comparator rule (event one clock after rnd <= p)
// for random and boundary words, and that with uniform random words the
// event rate matches (p + 1) / 2^32 per clock within 5 standard deviations.
module tb_poisson_gen;
  logic clk = 0, rst_n = 0, en = 0, ev;
  logic [31:0] rnd = '0, p = '0;
  int checks = 0, failures = 0;

  poisson_gen #(.W(32)) dut (.clk, .rst_n, .en, .rnd, .p, .event_o(ev));
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp;
    longint n_ev;
    real mean, sd;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // rule check, including rnd == p and rnd == p + 1
    for (int i = 0; i < 2000; i++) begin
      p   = $urandom;
      case (i % 4)
        0: rnd = p;
        1: rnd = p + 1;
        default: rnd = $urandom;
      endcase
      en  = (i % 7) != 0;
      exp = en && (rnd <= p);
      @(posedge clk); #1;
      checks++;
      if (ev !== exp) begin failures++; if (failures < 10) $display("rnd %h p %h got %b", rnd, p, ev); end
    end
    // rate check: p chosen for 1/1024 per clock
    en = 1; p = 32'h003F_FFFF; n_ev = 0;
    for (int i = 0; i < 300000; i++) begin
      rnd = $urandom;
      @(posedge clk); #1;
      n_ev += ev;
    end
    mean = 300000.0 / 1024.0;
    sd   = $sqrt(mean);
    checks++;
    if (n_ev < mean - 5 * sd || n_ev > mean + 5 * sd) begin
      failures++; $display("rate: %0d events, expected %f", n_ev, mean);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

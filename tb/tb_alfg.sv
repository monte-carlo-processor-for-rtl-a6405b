// tb_alfg: seeds the lagged Fibonacci generator with random words and checks
// every parallel output word against a serial reference
// X[n] = X[n-67] + X[n-97] mod 2^32, the ready flag after 97 seed words,
// the forced odd first seed word, holding when disabled, and reseeding.
module tb_alfg;
  localparam int W = 32, J = 67, K = 97, P = 127;
  logic clk = 0, rst_n = 0, seed_valid = 0, en = 0, ready, valid;
  logic [W-1:0] seed_word = '0;
  logic [P-1:0][W-1:0] rnd;
  int checks = 0, failures = 0;
  logic [W-1:0] seq[$];

  alfg #(.W(W), .J(J), .K(K), .P(P)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  task automatic do_seed();
    seq.delete();
    for (int i = 0; i < K; i++) begin
      seed_valid = 1; seed_word = $urandom;
      if (i == 0) seed_word[0] = 1'b0;   // generator must force it odd
      seq.push_back(i == 0 ? (seed_word | 1) : seed_word);
      @(posedge clk); #1;
      check(ready == (i == K - 1), $sformatf("ready after %0d seed words", i + 1));
    end
    seed_valid = 0;
  endtask

  task automatic run(int clocks);
    for (int c = 0; c < clocks; c++) begin
      en = ($urandom % 5) != 0;
      @(posedge clk); #1;
      check(valid == en, "valid follows enable");
      if (en) begin
        for (int p = 0; p < P; p++) begin
          int n = seq.size();
          seq.push_back(seq[n - J] + seq[n - K]);
        end
        for (int p = 0; p < P; p++)
          check(rnd[p] == seq[seq.size() - P + p], $sformatf("word %0d clock %0d", p, c));
      end
    end
    en = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    check(!ready, "not ready after reset");
    do_seed();
    run(40);
    do_seed();      // reseed in mid-run
    run(40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

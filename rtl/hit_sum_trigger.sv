// hit_sum_trigger: number of detectors with a pulse, and trigger levels.
//
// The first register stage holds sum = number of '1' bits of 'pulse' (the
// document's sum over h_j); the second holds ge[n-1] = (sum >= n) for
// n = 1..NLEV, the "Hit sum >= n" discriminators. Latency: 'sum' one clock,
// 'ge' two clocks after 'pulse'. The pipeline registers are this design's
// choice.
module hit_sum_trigger #(
  parameter int unsigned NCH  = 94,
  parameter int unsigned NLEV = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NCH-1:0]           pulse,
  output logic [$clog2(NCH+1)-1:0] sum,
  output logic [NLEV-1:0]          ge
);

  localparam int unsigned SW = $clog2(NCH+1);

  logic [SW-1:0] cnt;

  always_comb begin
    cnt = '0;
    for (int i = 0; i < NCH; i++) cnt = cnt + SW'(pulse[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum <= '0;
      ge  <= '0;
    end else begin
      sum <= cnt;
      for (int n = 1; n <= NLEV; n++) ge[n-1] <= (sum >= SW'(n));
    end
  end

endmodule

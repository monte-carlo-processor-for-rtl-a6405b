// scaler: counts trigger-level rising edges over fixed gates.
//
// While 'run' is high a gate counter runs over GATE clocks (0.1 s at 50 MHz:
// the document's 10 Hz scaler rate). During a gate each of the NLEV counters
// counts the rising edges of its 'lev' input; at the last clock of the gate
// the counts (including an edge in that clock) are copied to 'counts',
// 'valid' pulses for one clock and the counters restart from zero, so no
// edge is lost between gates. Counters saturate at all ones. Dropping 'run'
// clears the counters and restarts the gate. Counting edges rather than
// high clocks is this design's reading of the document's "counts / 0.1 s".
module scaler #(
  parameter int unsigned NLEV  = 4,
  parameter int unsigned GATE  = 5_000_000,
  parameter int unsigned CNT_W = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       run,
  input  logic [NLEV-1:0]            lev,
  output logic                       valid,
  output logic [NLEV-1:0][CNT_W-1:0] counts
);

  localparam int unsigned GW = $clog2(GATE);

  logic [GW-1:0]              gcnt;
  logic [NLEV-1:0]            lev_q;
  logic [NLEV-1:0][CNT_W-1:0] acc;
  logic [NLEV-1:0]            rise;
  logic                       last;

  assign rise = lev & ~lev_q;
  assign last = (gcnt == GW'(GATE - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gcnt   <= '0;
      lev_q  <= '0;
      acc    <= '0;
      valid  <= 1'b0;
      counts <= '0;
    end else begin
      lev_q <= lev;
      valid <= 1'b0;
      if (!run) begin
        gcnt <= '0;
        acc  <= '0;
      end else if (last) begin
        gcnt  <= '0;
        valid <= 1'b1;
        for (int n = 0; n < NLEV; n++) begin
          counts[n] <= (rise[n] && acc[n] != '1) ? acc[n] + 1'b1 : acc[n];
          acc[n]    <= '0;
        end
      end else begin
        gcnt <= gcnt + 1'b1;
        for (int n = 0; n < NLEV; n++)
          if (rise[n] && acc[n] != '1) acc[n] <= acc[n] + 1'b1;
      end
    end
  end

  // results come exactly once per gate
  a_valid_single: assert property (@(posedge clk) disable iff (!rst_n) valid |=> !valid);

endmodule

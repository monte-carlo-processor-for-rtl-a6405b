// pulse_stretch: turns one-clock detector hits into pulses of set width.
//
// A hit on channel i loads that channel's down-counter with 'width'; the
// output pulse is high while the counter is non-zero, so a lone hit gives a
// pulse exactly 'width' clocks long, starting one clock after the hit.
// Two detectors are then seen in coincidence when their hits are less than
// 'width' clocks apart, a window of twice the pulse width in total: the
// document's 600 ns pulses (30 clocks at 50 MHz) give its 1200 ns window.
// A hit during a pulse restarts the width (this design's choice).
// width = 0 suppresses all pulses.
module pulse_stretch #(
  parameter int unsigned NCH = 94,
  parameter int unsigned CW  = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NCH-1:0] hit,
  input  logic [CW-1:0]  width,
  output logic [NCH-1:0] pulse
);

  logic [NCH-1:0][CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else begin
      for (int i = 0; i < NCH; i++) begin
        if (hit[i])            cnt[i] <= width;
        else if (cnt[i] != '0) cnt[i] <= cnt[i] - 1'b1;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NCH; i++) pulse[i] = (cnt[i] != '0);
  end

endmodule

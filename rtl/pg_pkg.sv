// pg_pkg: constants of the pattern generator.
//
// The pattern generator produces, for each event, one pulse per channel
// whose delay from the event start is drawn from an arbitrary distribution.
// Numbers follow the document: 16 channels, 16-bit uniform random numbers
// mapped to 10-bit delays in 0.5 ns steps (range 512 ns) on a 250 MHz clock
// with 8x oversampling, 20 ns pulses, 500 ns event duration.
package pg_pkg;

  localparam int unsigned NCH     = 16;   // output channels
  localparam int unsigned RND_N   = 16;   // uniform random bits into the LUT
  localparam int unsigned DLY_M   = 10;   // delay bits, 0.5 ns units
  localparam int unsigned OS      = 8;    // sub-samples per 250 MHz clock
  localparam int unsigned PW_SUB  = 40;   // 20 ns pulse in 0.5 ns units
  localparam int unsigned EVT_CYC = 125;  // 500 ns event window in 4 ns clocks

endpackage

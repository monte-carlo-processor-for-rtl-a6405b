// mcp_pkg: constants and types shared by the Monte Carlo processor blocks.
//
// The MC processor emulates the surface array of an air shower experiment:
// NDET detectors each fire at random (Bernoulli trial per 50 MHz clock),
// correlated double/triple/quadruple hits are added on top, hits are
// stretched into fixed-width pulses, the number of overlapping pulses is
// compared with 1..4 and the resulting trigger levels are counted by a
// 10 Hz scaler. The channel count, clock rate, scaler rate and pulse width
// follow the document; the register map of the setup bus is this design's own.
package mcp_pkg;

  localparam int unsigned NDET     = 94;          // detector channels
  localparam int unsigned CLK_HZ   = 50_000_000;  // processing clock
  localparam int unsigned RND_W    = 32;          // random word width
  localparam int unsigned NLEV     = 4;           // hit-sum levels >=1..>=4
  localparam int unsigned CNT_W    = 32;          // scaler counter width
  localparam int unsigned SCL_GATE = CLK_HZ / 10; // 10 Hz scaler: 0.1 s gate
  localparam int unsigned PW_W     = 16;          // pulse-width register width
  localparam int unsigned PW_RESET = 30;          // 600 ns at 50 MHz

  // Register addresses of the setup bus (word addresses).
  typedef enum logic [7:0] {
    REG_CTRL   = 8'h00,  // bit0 run, bit1 reseed (self-clearing)
    REG_M1     = 8'h01,  // per-detector Bernoulli threshold
    REG_M2     = 8'h02,  // Any2 coincidence threshold
    REG_M3     = 8'h03,  // Any3 coincidence threshold
    REG_M4     = 8'h04,  // Any4 coincidence threshold
    REG_WIDTH  = 8'h05,  // pulse width in clocks
    REG_SEED0  = 8'h08,  // LFSR seed bits 31:0
    REG_SEED1  = 8'h09,  // LFSR seed bits 63:32
    REG_SEED2  = 8'h0A,  // LFSR seed bits 95:64
    REG_SCL0   = 8'h10,  // latest scaler count, level >=1 (0x10..0x13)
    REG_SCLSEQ = 8'h14   // number of completed scaler gates
  } reg_addr_e;

  // Run configuration produced by the register file.
  typedef struct packed {
    logic              run;
    logic              reseed;   // one-clock pulse
    logic [RND_W-1:0]  m1;
    logic [RND_W-1:0]  m2;
    logic [RND_W-1:0]  m3;
    logic [RND_W-1:0]  m4;
    logic [PW_W-1:0]   width;
    logic [95:0]       seed;
  } mcp_cfg_t;

  localparam logic [95:0] SEED_RESET = 96'h5A5A_1234_C0FF_EE00_0BAD_F00D;

endpackage

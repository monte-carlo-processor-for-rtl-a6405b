// mcp_config: setup registers of the MC processor and scaler read-back.
//
// The PC sets the run parameters over the network link; this block is the
// register file behind that link, with a plain address/data bus:
// a write takes one clock with bus_we high; a read with bus_re high returns
// bus_rdata with bus_rvalid one clock later. Registers (see mcp_pkg):
//   0x00 control: bit0 run, bit1 reseed (write 1: one-clock pulse, reads 0)
//   0x01..0x04 m1..m4 Bernoulli thresholds, 0x05 pulse width (clocks),
//   0x08..0x0A 96-bit LFSR seed, 0x10..0x13 last scaler counts (read only),
//   0x14 number of completed scaler gates (read only).
// Reset values: stopped, m1..m4 = 0, width = 600 ns, fixed non-zero seed;
// a reseed pulse is issued after reset so the generators start seeded.
// The register map is this design's own; the document names the parameters
// m1..m4 and the pulse width only.
module mcp_config
  import mcp_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       bus_we,
  input  logic                       bus_re,
  input  logic [7:0]                 bus_addr,
  input  logic [31:0]                bus_wdata,
  output logic [31:0]                bus_rdata,
  output logic                       bus_rvalid,
  output mcp_cfg_t                   cfg,
  input  logic                       scl_valid,
  input  logic [NLEV-1:0][CNT_W-1:0] scl_counts
);

  logic [NLEV-1:0][CNT_W-1:0] scl_q;
  logic [31:0]                scl_seq;
  logic                       boot;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg.run    <= 1'b0;
      cfg.reseed <= 1'b0;
      cfg.m1     <= '0;
      cfg.m2     <= '0;
      cfg.m3     <= '0;
      cfg.m4     <= '0;
      cfg.width  <= PW_W'(PW_RESET);
      cfg.seed   <= SEED_RESET;
      boot       <= 1'b1;
      scl_q      <= '0;
      scl_seq    <= '0;
    end else begin
      boot       <= 1'b0;
      cfg.reseed <= boot;
      if (bus_we) begin
        unique case (bus_addr)
          REG_CTRL:  begin
                       cfg.run    <= bus_wdata[0];
                       cfg.reseed <= bus_wdata[1];
                     end
          REG_M1:    cfg.m1 <= bus_wdata;
          REG_M2:    cfg.m2 <= bus_wdata;
          REG_M3:    cfg.m3 <= bus_wdata;
          REG_M4:    cfg.m4 <= bus_wdata;
          REG_WIDTH: cfg.width <= bus_wdata[PW_W-1:0];
          REG_SEED0: cfg.seed[31:0]  <= bus_wdata;
          REG_SEED1: cfg.seed[63:32] <= bus_wdata;
          REG_SEED2: cfg.seed[95:64] <= bus_wdata;
          default:   ;
        endcase
      end
      if (scl_valid) begin
        scl_q   <= scl_counts;
        scl_seq <= scl_seq + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bus_rvalid <= 1'b0;
      bus_rdata  <= '0;
    end else begin
      bus_rvalid <= bus_re;
      if (bus_re) begin
        unique case (bus_addr)
          REG_CTRL:   bus_rdata <= {31'd0, cfg.run};
          REG_M1:     bus_rdata <= cfg.m1;
          REG_M2:     bus_rdata <= cfg.m2;
          REG_M3:     bus_rdata <= cfg.m3;
          REG_M4:     bus_rdata <= cfg.m4;
          REG_WIDTH:  bus_rdata <= 32'(cfg.width);
          REG_SEED0:  bus_rdata <= cfg.seed[31:0];
          REG_SEED1:  bus_rdata <= cfg.seed[63:32];
          REG_SEED2:  bus_rdata <= cfg.seed[95:64];
          REG_SCLSEQ: bus_rdata <= scl_seq;
          default:    bus_rdata <= (bus_addr >= REG_SCL0 && bus_addr < 8'(REG_SCL0 + NLEV))
                                   ? scl_q[bus_addr[1:0]] : 32'hDEAD_BEEF;
        endcase
      end
    end
  end

endmodule

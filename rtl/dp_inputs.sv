// dp_inputs: INPUTS block of the DotProduct coprocessor.
//
// Holds the host-written registers: I_REG_A and I_REG_B (the indexes of the
// two training samples whose dot product is wanted) and the Phase bit of
// C_REG, and decodes host writes into commands for the rest of the design.
//
// Rules, following the original design:
//  * Phase 0 is the initialisation and load phase. I_REG_B is disabled
//    (writes to it are ignored) and a write to the DATA register stores the
//    matrix row into the block RAM at row I_REG_A.
//  * Phase 1 is the processing phase. Matrix input is disabled (DATA writes
//    are ignored), I_REG_B is enabled, and a C_REG write with Start set
//    launches a dot product of rows I_REG_A and I_REG_B.
//  * A C_REG write with Reset set clears every register to 0, which also
//    returns the design to the load phase.
// This design's own choices: Start is a C_REG bit (the original only says
// C_REG decides when a calculation starts); Start and Reset act on the
// write and are not stored; a Start may be written together with Phase=1;
// a Start is ignored while a dot product is in flight; there is no address
// auto-increment. Index writes are accepted at any time: the block RAM
// samples the old index on the same edge that loads the new one, so the
// host can write the next pair of indexes during the fetch and compute
// cycles of the current dot product and keep one result every three cycles.
//
// Interface: one host write port (host_wr, host_addr, host_wdata), sampled
// on the rising edge. The commands start, soft_reset and mem_we are
// combinational decodes of the current write, valid in the same cycle; the
// row itself goes from host_wdata straight to the block RAM write port.
// The Finish bit of a C_REG write is ignored: Finish is set by hardware.
// Only the low bits of host_wdata (C_REG fields, an index) are read here.
module dp_inputs
  import dp_pkg::*;
#(
  parameter int unsigned N_SAMPLES  = N_SAMPLES_DEF,
  parameter int unsigned N_FEATURES = N_FEATURES_DEF,
  parameter int unsigned ADDR_W     = $clog2(N_SAMPLES)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host write port
  input  logic                  host_wr,
  input  reg_addr_e             host_addr,
  input  logic [N_FEATURES-1:0] host_wdata,
  // status from the controller
  input  logic                  busy,
  // registers
  output logic [ADDR_W-1:0]     i_reg_a,
  output logic [ADDR_W-1:0]     i_reg_b,
  output logic                  phase,
  // decoded commands
  output logic                  start,
  output logic                  soft_reset,
  output logic                  mem_we
);

  c_reg_t c_wr;
  logic   wr_c, wr_ia, wr_ib;

  always_comb begin
    c_wr       = c_reg_t'(host_wdata[C_REG_W-1:0]);
    wr_c       = host_wr && (host_addr == REG_C);
    soft_reset = wr_c && c_wr.reset;
    start      = wr_c && c_wr.start && c_wr.phase && !c_wr.reset && !busy;
    wr_ia      = host_wr && (host_addr == REG_IA);
    wr_ib      = host_wr && (host_addr == REG_IB) && phase;
    mem_we     = host_wr && (host_addr == REG_DATA) && !phase;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_reg_a <= '0;
      i_reg_b <= '0;
      phase   <= 1'b0;
    end else if (soft_reset) begin
      i_reg_a <= '0;
      i_reg_b <= '0;
      phase   <= 1'b0;
    end else begin
      if (wr_c)  phase   <= c_wr.phase;
      if (wr_ia) i_reg_a <= host_wdata[ADDR_W-1:0];
      if (wr_ib) i_reg_b <= host_wdata[ADDR_W-1:0];
    end
  end

endmodule

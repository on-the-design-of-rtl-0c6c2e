// dp_output: OUTPUT block of the DotProduct coprocessor.
//
// Holds R_REG, the result of the last dot product, written from the PE in
// the compute cycle (load_r) and cleared by reset or by the C_REG Reset
// command. It also returns the register the host reads: C_REG status
// (Phase, Finish; Start and Reset read as 0), I_REG_A, I_REG_B, or R_REG.
// R_REG follows the original design; the read-back path and its address
// map are this design's choices. The read is combinational on host_raddr.
// The read port is RD_W bits wide, just wide enough for the widest of
// C_REG, an index and R_REG; unused upper bits read as 0.
module dp_output
  import dp_pkg::*;
#(
  parameter int unsigned N_FEATURES = N_FEATURES_DEF,
  parameter int unsigned ADDR_W     = $clog2(N_SAMPLES_DEF),
  parameter int unsigned RES_W      = $clog2(N_FEATURES + 1),
  parameter int unsigned RD_W       = rd_width(ADDR_W, RES_W)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  soft_reset,
  input  logic                  load_r,
  input  logic [RES_W-1:0]      pe_dot,
  // register state to read back
  input  logic                  phase,
  input  logic                  finish,
  input  logic [ADDR_W-1:0]     i_reg_a,
  input  logic [ADDR_W-1:0]     i_reg_b,
  // host read port
  input  reg_addr_e             host_raddr,
  output logic [RD_W-1:0]       host_rdata,
  output logic [RES_W-1:0]      r_reg
);

  c_reg_t status;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_reg <= '0;
    end else if (soft_reset) begin
      r_reg <= '0;
    end else if (load_r) begin
      r_reg <= pe_dot;
    end
  end

  always_comb begin
    status        = '0;
    status.phase  = phase;
    status.finish = finish;
    host_rdata    = '0;
    unique case (host_raddr)
      REG_C:    host_rdata[C_REG_W-1:0] = status;
      REG_IA:   host_rdata[ADDR_W-1:0]  = i_reg_a;
      REG_IB:   host_rdata[ADDR_W-1:0]  = i_reg_b;
      REG_DATA: host_rdata[RES_W-1:0]   = r_reg;
      default:  host_rdata = '0;
    endcase
  end

endmodule

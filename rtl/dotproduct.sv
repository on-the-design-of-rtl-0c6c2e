// dotproduct: the DotProduct coprocessor, top level.
//
// A coprocessor that speeds up SVM training with the SMO algorithm by taking
// over its dominant kernel, the dot product of two training samples. The
// training set is binary (every feature 0 or 1) and is loaded once into an
// on-chip block RAM; after that the host only names two sample indexes and
// reads back how many features the two samples share, three clock cycles
// later.
//
// Structure (as in the original design): INPUTS (dp_inputs) holds I_REG_A,
// I_REG_B and C_REG; BLOCK RAM (dp_block_ram) holds the samples; the
// Processor Element (dp_pe) ANDs the two rows and counts the ones; OUTPUT
// (dp_output) holds R_REG; CONTROL LOGIC (dp_control) sequences the three
// cycles and raises Finish.
//
// Use: after reset (or a C_REG Reset) the design is in the load phase. For
// each sample the host writes its index to I_REG_A and its feature vector to
// DATA. It then writes C_REG with Phase=1. For each dot product it writes
// I_REG_A and I_REG_B, writes C_REG with Phase=1 and Start=1, waits for
// Finish (C_REG bit 3, also on the finish pin) and reads R_REG (DATA
// address). Register map, host bus and the Start bit are this design's own
// choices; see dp_pkg.
//
// Timing: host writes are sampled on the rising edge of clk; host_rdata is
// combinational on host_raddr. Finish is set at the end of the third cycle
// counting the cycle of the Start write. Index writes are accepted while a
// dot product is in flight, so a host that writes Start, I_REG_A and I_REG_B
// in consecutive cycles gets one result every three cycles (t = 3 * v for v
// dot products), each result valid in R_REG until the next one lands.
// rst_n is an asynchronous active-low reset; the block RAM contents are not
// cleared by either reset.
module dotproduct
  import dp_pkg::*;
#(
  parameter int unsigned N_SAMPLES  = N_SAMPLES_DEF,
  parameter int unsigned N_FEATURES = N_FEATURES_DEF,
  parameter int unsigned ADDR_W     = $clog2(N_SAMPLES),
  parameter int unsigned RES_W      = $clog2(N_FEATURES + 1),
  parameter int unsigned RD_W       = rd_width(ADDR_W, RES_W)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host write port
  input  logic                  host_wr,
  input  logic [1:0]            host_addr,
  input  logic [N_FEATURES-1:0] host_wdata,
  // host read port
  input  logic [1:0]            host_raddr,
  output logic [RD_W-1:0]       host_rdata,
  // Finish bit, brought out for polling or as an interrupt, and R_REG
  output logic                  finish,
  output logic [RES_W-1:0]      r_reg
);

  logic [ADDR_W-1:0]     i_reg_a, i_reg_b;
  logic                  phase, start, soft_reset, busy;
  logic                  mem_we, mem_re, load_r;
  logic [N_FEATURES-1:0] row_a, row_b;
  logic [RES_W-1:0]      pe_dot;

  dp_inputs #(
    .N_SAMPLES (N_SAMPLES),
    .N_FEATURES(N_FEATURES),
    .ADDR_W    (ADDR_W)
  ) u_inputs (
    .clk       (clk),
    .rst_n     (rst_n),
    .host_wr   (host_wr),
    .host_addr (reg_addr_e'(host_addr)),
    .host_wdata(host_wdata),
    .busy      (busy),
    .i_reg_a   (i_reg_a),
    .i_reg_b   (i_reg_b),
    .phase     (phase),
    .start     (start),
    .soft_reset(soft_reset),
    .mem_we    (mem_we)
  );

  dp_block_ram #(
    .DEPTH (N_SAMPLES),
    .WIDTH (N_FEATURES),
    .ADDR_W(ADDR_W)
  ) u_block_ram (
    .clk    (clk),
    .a_we   (mem_we),
    .a_addr (i_reg_a),
    .a_wdata(host_wdata),
    .a_rdata(row_a),
    .b_addr (i_reg_b),
    .b_rdata(row_b),
    .rd_en  (mem_re)
  );

  dp_pe #(
    .WIDTH(N_FEATURES),
    .RES_W(RES_W)
  ) u_pe (
    .vec_a(row_a),
    .vec_b(row_b),
    .dot  (pe_dot)
  );

  dp_control u_control (
    .clk       (clk),
    .rst_n     (rst_n),
    .soft_reset(soft_reset),
    .start     (start),
    .busy      (busy),
    .mem_re    (mem_re),
    .load_r    (load_r),
    .finish    (finish)
  );

  dp_output #(
    .N_FEATURES(N_FEATURES),
    .ADDR_W    (ADDR_W),
    .RES_W     (RES_W),
    .RD_W      (RD_W)
  ) u_output (
    .clk       (clk),
    .rst_n     (rst_n),
    .soft_reset(soft_reset),
    .load_r    (load_r),
    .pe_dot    (pe_dot),
    .phase     (phase),
    .finish    (finish),
    .i_reg_a   (i_reg_a),
    .i_reg_b   (i_reg_b),
    .host_raddr(reg_addr_e'(host_raddr)),
    .host_rdata(host_rdata),
    .r_reg     (r_reg)
  );

endmodule

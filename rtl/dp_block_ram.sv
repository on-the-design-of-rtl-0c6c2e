// dp_block_ram: training-set memory (BLOCK RAM) of the DotProduct coprocessor.
//
// DEPTH rows of WIDTH bits, one row per training sample and one bit per
// feature, stored uncompressed. Port A is the read/write port: during the
// load phase it is addressed by I_REG_A and written with the matrix row
// from the host; during the processing phase it reads row I_REG_A. Port B
// is read only and addresses row I_REG_B, so both operands of a dot product
// are fetched in the same cycle. Reads are synchronous: a_rdata and b_rdata
// show the rows addressed at the last rising edge with rd_en high, as an
// FPGA block RAM does. A read and write of the same address on port A in one
// cycle returns the old row. Two ports and synchronous reads are this
// design's reading of the one-cycle fetch the original design gives.
module dp_block_ram #(
  parameter int unsigned DEPTH  = dp_pkg::N_SAMPLES_DEF,
  parameter int unsigned WIDTH  = dp_pkg::N_FEATURES_DEF,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  // port A: write in the load phase, read in the processing phase
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [WIDTH-1:0]  a_wdata,
  output logic [WIDTH-1:0]  a_rdata,
  // port B: read only
  input  logic [ADDR_W-1:0] b_addr,
  output logic [WIDTH-1:0]  b_rdata,
  // read enable for both ports
  input  logic              rd_en
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) begin
      mem[a_addr] <= a_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      a_rdata <= mem[a_addr];
      b_rdata <= mem[b_addr];
    end
  end

endmodule

// dp_pkg: shared sizes, register map and control-register layout of the
// DotProduct coprocessor.
//
// The coprocessor keeps a binary training set (one row per sample, one bit
// per feature) and returns the number of features two rows have in common,
// which is their dot product. The default sizes, 4096 samples of 128
// features, are the capacity the design was built for. The host register
// map (four word-wide registers selected by a 2-bit address) and the bit
// order of C_REG are this design's own choices; the register names and the
// meaning of the Phase, Reset and Finish bits follow the original design.
package dp_pkg;

  // Default capacity: 4096 training samples of 128 binary features.
  parameter int unsigned N_SAMPLES_DEF  = 4096;
  parameter int unsigned N_FEATURES_DEF = 128;

  // Host register addresses.
  typedef enum logic [1:0] {
    REG_C    = 2'd0,  // C_REG: control / status
    REG_IA   = 2'd1,  // I_REG_A: first sample index, also the load address
    REG_IB   = 2'd2,  // I_REG_B: second sample index (processing phase only)
    REG_DATA = 2'd3   // write: matrix row to load; read: R_REG
  } reg_addr_e;

  // C_REG layout, bit 0 upward. Phase and Finish are state; Reset and Start
  // are commands that act on the write and read back as 0.
  typedef struct packed {
    logic finish;  // bit 3: result in R_REG is valid (read only)
    logic start;   // bit 2: begin a dot product of rows I_REG_A and I_REG_B
    logic reset;   // bit 1: clear all registers, back to the load phase
    logic phase;   // bit 0: 0 = initialisation and load, 1 = processing
  } c_reg_t;

  localparam int unsigned C_REG_W = $bits(c_reg_t);

  // Width of the host read port: the widest of C_REG, a sample index and
  // a dot-product result.
  function automatic int unsigned rd_width(int unsigned addr_w, int unsigned res_w);
    int unsigned w = C_REG_W;
    if (addr_w > w) w = addr_w;
    if (res_w > w) w = res_w;
    return w;
  endfunction

endpackage

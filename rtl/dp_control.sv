// dp_control: CONTROL LOGIC of the DotProduct coprocessor.
//
// A three-state sequencer for one dot product, which takes three clock
// cycles as in the original design:
//   cycle 1  (IDLE, start written)  the indexes in I_REG_A/I_REG_B are taken
//   cycle 2  (FETCH)                both rows are read from the block RAM
//   cycle 3  (COMPUTE)              the PE result is written into R_REG and
//                                   Finish is set
// So Finish rises at the end of the third cycle counted from the cycle in
// which the host writes Start, and a new Start is accepted in the next
// cycle: v dot products take 3*v cycles. Finish stays set until the next
// accepted Start or a reset. A soft reset (C_REG Reset bit) returns the
// sequencer to IDLE with Finish cleared, ready for new data.
// The state encoding and the Finish clearing rule are this design's choices.
module dp_control (
  input  logic clk,
  input  logic rst_n,
  input  logic soft_reset,
  input  logic start,     // accepted Start command (already gated by phase)
  output logic busy,      // a dot product is in flight
  output logic mem_re,    // read both block RAM ports at this edge
  output logic load_r,    // write the PE result into R_REG at this edge
  output logic finish     // Finish bit of C_REG
);

  typedef enum logic [1:0] {IDLE, FETCH, COMPUTE} state_e;

  state_e state;

  always_comb begin
    busy   = (state != IDLE);
    mem_re = (state == FETCH);
    load_r = (state == COMPUTE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      finish <= 1'b0;
    end else if (soft_reset) begin
      state  <= IDLE;
      finish <= 1'b0;
    end else begin
      unique case (state)
        IDLE: begin
          if (start) begin
            state  <= FETCH;
            finish <= 1'b0;
          end
        end
        FETCH:   state <= COMPUTE;
        COMPUTE: begin
          state  <= IDLE;
          finish <= 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // A result is written exactly once per accepted Start and is then flagged.
  a_finish_after_load : assert property (@(posedge clk) disable iff (!rst_n)
    (load_r && !soft_reset) |=> finish);
  a_start_seq : assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy && !soft_reset) |=> (state == FETCH));

endmodule

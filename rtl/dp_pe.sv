// dp_pe: Processor Element of the DotProduct coprocessor.
//
// For binary vectors the dot product reduces to a bitwise AND of the two
// operands followed by a count of the ones left in the result; that is what
// this block computes, as the original design describes. It is purely
// combinational: the row registers in front of it (the block RAM read
// ports) and R_REG behind it give the "compute" cycle of the three-cycle
// operation. The count is a plain sum over the AND bits, which synthesis
// turns into an adder tree; the internal structure is this design's choice.
//
// Interface: vec_a, vec_b (WIDTH bits) in, dot (RES_W bits) out, where
// RES_W = clog2(WIDTH+1) so that a full match of all WIDTH bits fits.
module dp_pe #(
  parameter int unsigned WIDTH = dp_pkg::N_FEATURES_DEF,
  parameter int unsigned RES_W = $clog2(WIDTH + 1)
) (
  input  logic [WIDTH-1:0] vec_a,
  input  logic [WIDTH-1:0] vec_b,
  output logic [RES_W-1:0] dot
);

  logic [WIDTH-1:0] both;

  always_comb begin
    both = vec_a & vec_b;
    dot  = '0;
    for (int unsigned i = 0; i < WIDTH; i++) begin
      dot = dot + RES_W'(both[i]);
    end
  end

endmodule

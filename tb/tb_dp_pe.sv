// tb_dp_pe: self-checking test of the Processor Element.
//
// Applies corner vectors (all zeros, all ones, disjoint, one common bit at
// each end) and 2000 random pairs of varying density to a 128-bit PE and
// compares the count with a reference that walks the two vectors bit by bit.
// A watchdog ends the run as a failure if it has not finished in time.
module tb_dp_pe;

  localparam int unsigned W = 128;
  localparam int unsigned R = $clog2(W + 1);

  logic         clk = 1'b0;
  logic [W-1:0] a, b;
  logic [R-1:0] dot;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  dp_pe #(.WIDTH(W)) dut (.vec_a(a), .vec_b(b), .dot(dot));

  function automatic int ref_dot(logic [W-1:0] x, logic [W-1:0] y);
    int n = 0;
    for (int i = 0; i < W; i++) if (x[i] == 1'b1 && y[i] == 1'b1) n++;
    return n;
  endfunction

  function automatic logic [W-1:0] rand_vec(int unsigned pct);
    logic [W-1:0] v;
    for (int i = 0; i < W; i++) v[i] = (($urandom % 100) < pct);
    return v;
  endfunction

  task automatic apply(logic [W-1:0] x, logic [W-1:0] y);
    a = x;
    b = y;
    @(posedge clk);
    checks++;
    if (int'(dot) != ref_dot(x, y)) begin
      failures++;
      $display("FAIL a=%h b=%h dot=%0d expected %0d", x, y, dot, ref_dot(x, y));
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('1, '0);
    apply({W/2{2'b10}}, {W/2{2'b01}});
    apply({1'b1, {(W-1){1'b0}}}, '1);
    apply({{(W-1){1'b0}}, 1'b1}, {{(W-1){1'b0}}, 1'b1});
    apply('1, {W/2{2'b01}});
    for (int k = 0; k < 2000; k++) apply(rand_vec(k % 101), rand_vec((k * 7) % 101));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

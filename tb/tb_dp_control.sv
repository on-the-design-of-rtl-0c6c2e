// tb_dp_control: self-checking test of the CONTROL LOGIC sequencer.
//
// Checks the three-cycle operation: after the cycle in which Start is
// given, one FETCH cycle (mem_re) and one COMPUTE cycle (load_r) follow, and
// Finish is set at the end of the third cycle and held until the next Start.
// Also checks back-to-back operation at one dot product per three cycles,
// that a Start while busy does not restart the sequence, and that a soft
// reset aborts an operation and clears Finish, and finally compares all
// outputs every cycle with a cycle model under random Start and reset.
module tb_dp_control;

  logic clk = 1'b0, rst_n = 1'b0;
  logic soft_reset = 1'b0, start = 1'b0;
  logic busy, mem_re, load_r, finish;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  dp_control dut (
    .clk(clk), .rst_n(rst_n), .soft_reset(soft_reset), .start(start),
    .busy(busy), .mem_re(mem_re), .load_r(load_r), .finish(finish)
  );

  task automatic expect4(string what, logic b, logic re, logic ld, logic fin);
    checks++;
    if ({busy, mem_re, load_r, finish} !== {b, re, ld, fin}) begin
      failures++;
      $display("FAIL %s: busy=%b mem_re=%b load_r=%b finish=%b expected %b%b%b%b",
               what, busy, mem_re, load_r, finish, b, re, ld, fin);
    end
  endtask

  // One full operation, checked cycle by cycle. fin0 is Finish before it.
  task automatic op(logic fin0, logic start_while_busy);
    @(negedge clk);
    expect4("idle", 1'b0, 1'b0, 1'b0, fin0);
    start = 1'b1;                              // cycle 1
    @(negedge clk);
    start = start_while_busy;
    expect4("fetch", 1'b1, 1'b1, 1'b0, 1'b0);  // cycle 2
    @(negedge clk);
    start = start_while_busy;
    expect4("compute", 1'b1, 1'b0, 1'b1, 1'b0); // cycle 3
    @(posedge clk);
    #1;
    start = 1'b0;
    expect4("done", 1'b0, 1'b0, 1'b0, 1'b1);
  endtask

  int t0, n_ops;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    op(1'b0, 1'b0);
    op(1'b1, 1'b1);
    // back-to-back throughput: Start held high, count Finish edges
    @(negedge clk);
    start = 1'b1;
    t0 = 0; n_ops = 0;
    for (int c = 0; c < 300; c++) begin
      @(posedge clk);
      #1;
      if (load_r) n_ops++;
    end
    start = 1'b0;
    checks++;
    if (n_ops != 100) begin
      failures++;
      $display("FAIL throughput: %0d results in 300 cycles, expected 100", n_ops);
    end
    // soft reset in the middle of an operation
    repeat (3) @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    soft_reset = 1'b1;
    @(negedge clk);
    soft_reset = 1'b0;
    expect4("after soft reset", 1'b0, 1'b0, 1'b0, 1'b0);
    op(1'b0, 1'b0);
    // Finish survives idle cycles
    repeat (5) @(negedge clk);
    expect4("finish held", 1'b0, 1'b0, 1'b0, 1'b1);
    // random Start and soft reset against a cycle model of the sequence
    begin
      int   m_state;  // 0 idle, 1 fetch, 2 compute
      logic m_fin;
      m_state = 0;
      m_fin = 1'b1;
      for (int c = 0; c < 3000; c++) begin
        @(negedge clk);
        expect4("random", 1'(m_state != 0), 1'(m_state == 1), 1'(m_state == 2), m_fin);
        start = (($urandom % 3) == 0);
        soft_reset = (($urandom % 40) == 0);
        if (soft_reset) begin
          m_state = 0; m_fin = 1'b0;
        end else if (m_state == 0) begin
          if (start) begin m_state = 1; m_fin = 1'b0; end
        end else if (m_state == 1) begin
          m_state = 2;
        end else begin
          m_state = 0; m_fin = 1'b1;
        end
      end
      @(negedge clk);
      start = 1'b0; soft_reset = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

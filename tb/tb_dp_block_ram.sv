// tb_dp_block_ram: self-checking test of the training-set memory.
//
// Uses a 256-row, 128-bit memory. Fills every row with a random vector
// through port A, then reads random pairs of rows on ports A and B at once
// and checks both against a reference copy, including the one-cycle read
// latency, that a read with rd_en low holds the last output, and that a
// read and write to the same row in one cycle returns the old contents.
module tb_dp_block_ram;

  localparam int unsigned D = 256;
  localparam int unsigned W = 128;
  localparam int unsigned A = $clog2(D);

  logic         clk = 1'b0;
  logic         a_we = 1'b0, rd_en = 1'b0;
  logic [A-1:0] a_addr = '0, b_addr = '0;
  logic [W-1:0] a_wdata = '0, a_rdata, b_rdata;
  logic [W-1:0] model [D];
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  dp_block_ram #(.DEPTH(D), .WIDTH(W)) dut (
    .clk(clk), .a_we(a_we), .a_addr(a_addr), .a_wdata(a_wdata), .a_rdata(a_rdata),
    .b_addr(b_addr), .b_rdata(b_rdata), .rd_en(rd_en)
  );

  function automatic logic [W-1:0] rand_vec();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    // load every row
    for (int r = 0; r < D; r++) begin
      @(negedge clk);
      a_we = 1'b1; a_addr = A'(r); a_wdata = rand_vec(); model[r] = a_wdata;
    end
    @(negedge clk);
    a_we = 1'b0;
    // random dual reads
    for (int k = 0; k < 1000; k++) begin
      int ia, ib;
      ia = int'($urandom % D);
      ib = (k % 10 == 0) ? ia : int'($urandom % D);
      a_addr = A'(ia); b_addr = A'(ib); rd_en = 1'b1;
      @(negedge clk);
      check("port A", a_rdata, model[ia]);
      check("port B", b_rdata, model[ib]);
      // hold: no read, outputs must not move
      rd_en = 1'b0; a_addr = A'(ia + 1); b_addr = A'(ib + 1);
      @(negedge clk);
      check("hold A", a_rdata, model[ia]);
      check("hold B", b_rdata, model[ib]);
    end
    // read during write of the same row returns old data
    a_addr = 8'd5; b_addr = 8'd5; a_we = 1'b1; a_wdata = ~model[5]; rd_en = 1'b1;
    @(negedge clk);
    check("read-during-write A", a_rdata, model[5]);
    model[5] = ~model[5];
    a_we = 1'b0;
    @(negedge clk);
    check("after write A", a_rdata, model[5]);
    check("after write B", b_rdata, model[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

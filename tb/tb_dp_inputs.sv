// tb_dp_inputs: self-checking test of the INPUTS register block.
//
// Drives host writes to a 64-sample, 128-feature instance and checks, against
// rules written out here, every register and decoded command after each
// write: I_REG_B ignores writes in the load phase, DATA writes reach the
// memory only in the load phase and at I_REG_A, Start needs Phase=1 and an
// idle controller, index writes are taken even while busy, and a Reset write
// clears everything.
module tb_dp_inputs;
  import dp_pkg::*;

  localparam int unsigned NS = 64;
  localparam int unsigned NF = 128;
  localparam int unsigned A  = $clog2(NS);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          host_wr = 1'b0, busy = 1'b0;
  reg_addr_e     host_addr = REG_C;
  logic [NF-1:0] host_wdata = '0;
  logic [A-1:0]  i_reg_a, i_reg_b;
  logic          phase, start, soft_reset, mem_we;
  int            checks = 0, failures = 0;

  // reference state
  int unsigned   m_a = 0, m_b = 0;
  logic          m_phase = 1'b0;

  always #5 clk = ~clk;

  dp_inputs #(.N_SAMPLES(NS), .N_FEATURES(NF)) dut (
    .clk(clk), .rst_n(rst_n), .host_wr(host_wr), .host_addr(host_addr),
    .host_wdata(host_wdata), .busy(busy), .i_reg_a(i_reg_a), .i_reg_b(i_reg_b),
    .phase(phase), .start(start), .soft_reset(soft_reset), .mem_we(mem_we)
  );

  task automatic expect1(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // One host write; checks the combinational commands during the write and
  // the registers after it.
  task automatic wr(reg_addr_e addr, logic [NF-1:0] data, logic bsy);
    logic exp_we, exp_start, exp_rst;
    c_reg_t c;
    c = c_reg_t'(data[C_REG_W-1:0]);
    @(negedge clk);
    host_wr = 1'b1; host_addr = addr; host_wdata = data; busy = bsy;
    exp_we    = (addr == REG_DATA) && !m_phase;
    exp_rst   = (addr == REG_C) && c.reset;
    exp_start = (addr == REG_C) && c.start && c.phase && !c.reset && !bsy;
    #1;
    expect1("mem_we", int'(mem_we), int'(exp_we));
    expect1("start", int'(start), int'(exp_start));
    expect1("soft_reset", int'(soft_reset), int'(exp_rst));
    if (exp_we) begin
      expect1("mem address (I_REG_A)", int'(i_reg_a), int'(m_a));
    end
    // reference update
    if (exp_rst) begin
      m_a = 0; m_b = 0; m_phase = 1'b0;
    end else begin
      if (addr == REG_C) m_phase = c.phase;
      if (addr == REG_IA) m_a = int'(data[A-1:0]);
      if (addr == REG_IB && m_phase) m_b = int'(data[A-1:0]);
    end
    @(negedge clk);
    host_wr = 1'b0; busy = 1'b0;
    expect1("I_REG_A", int'(i_reg_a), int'(m_a));
    expect1("I_REG_B", int'(i_reg_b), int'(m_b));
    expect1("Phase", int'(phase), int'(m_phase));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // load phase
    wr(REG_IA, NF'(5), 1'b0);
    wr(REG_DATA, {4{$urandom}}, 1'b0);
    wr(REG_IB, NF'(9), 1'b0);          // ignored: I_REG_B disabled
    wr(REG_C, NF'(4'b0100), 1'b0);     // Start with Phase=0: ignored
    // processing phase
    wr(REG_C, NF'(4'b0001), 1'b0);
    wr(REG_DATA, {4{$urandom}}, 1'b0); // ignored: matrix input disabled
    wr(REG_IB, NF'(9), 1'b0);
    wr(REG_IA, NF'(17), 1'b1);         // taken while busy
    wr(REG_IB, NF'(33), 1'b1);         // taken while busy
    wr(REG_C, NF'(4'b0101), 1'b1);     // Start while busy: ignored
    wr(REG_C, NF'(4'b0101), 1'b0);     // Start accepted
    wr(REG_C, NF'(4'b0010), 1'b0);     // Reset
    // random sequence
    for (int k = 0; k < 3000; k++) begin
      reg_addr_e ad;
      logic [NF-1:0] d;
      ad = reg_addr_e'($urandom % 4);
      d  = {$urandom, $urandom, $urandom, $urandom};
      if (ad == REG_C) d[1] = (($urandom % 8) == 0);
      wr(ad, d, (($urandom % 4) == 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

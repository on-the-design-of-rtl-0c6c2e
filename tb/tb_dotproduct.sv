// tb_dotproduct: end-to-end test of the DotProduct coprocessor.
//
// Runs a 256-sample, 128-feature instance through the host register
// interface the way the SMO host software would: load the training matrix,
// switch to the processing phase, ask for dot products and read them back.
// Results are compared with a reference AND-and-count over the testbench's
// own copy of the matrix; Start-to-Finish latency must be 3 cycles and a
// stream of dot products with overlapped index writes must take exactly
// 3 cycles per product. Each mechanism of the design is provoked and
// counted, and a mechanism that never happened counts as a failure:
// row loads, I_REG_B disabled in the load phase, Start ignored in the load
// phase, the switch to the processing phase, matrix input disabled in the
// processing phase, single and streamed dot products, Start ignored while
// busy, and the C_REG soft reset.
module tb_dotproduct;
  import dp_pkg::*;

  localparam int unsigned NS = 256;
  localparam int unsigned NF = 128;
  localparam int unsigned R  = $clog2(NF + 1);
  localparam int unsigned RW = rd_width($clog2(NS), R);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          host_wr = 1'b0;
  logic [1:0]    host_addr = '0, host_raddr = '0;
  logic [NF-1:0] host_wdata = '0;
  logic [RW-1:0] host_rdata;
  logic          finish;
  logic [R-1:0]  r_reg;

  logic [NF-1:0] model [NS];
  int checks = 0, failures = 0;

  // mechanism counters
  int n_load = 0, n_ib_disabled = 0, n_start_ign_load = 0, n_phase = 0;
  int n_data_ign = 0, n_single = 0, n_stream = 0, n_start_ign_busy = 0;
  int n_soft_reset = 0;

  always #5 clk = ~clk;

  dotproduct #(.N_SAMPLES(NS), .N_FEATURES(NF)) dut (
    .clk(clk), .rst_n(rst_n), .host_wr(host_wr), .host_addr(host_addr),
    .host_wdata(host_wdata), .host_raddr(host_raddr), .host_rdata(host_rdata),
    .finish(finish), .r_reg(r_reg)
  );

  function automatic int ref_dot(int a, int b);
    int n = 0;
    for (int i = 0; i < NF; i++) if (model[a][i] && model[b][i]) n++;
    return n;
  endfunction

  function automatic logic [NF-1:0] rand_row();
    logic [NF-1:0] v;
    int unsigned pct = $urandom % 101;
    for (int i = 0; i < NF; i++) v[i] = (($urandom % 100) < pct);
    return v;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Host write, sampled at the next rising edge; returns after that edge.
  task automatic wr(reg_addr_e a, logic [NF-1:0] d);
    @(negedge clk);
    host_wr = 1'b1; host_addr = a; host_wdata = d;
    @(posedge clk);
    #1;
    host_wr = 1'b0;
  endtask

  task automatic rd(reg_addr_e a, output logic [RW-1:0] d);
    host_raddr = a;
    #1;
    d = host_rdata;
  endtask

  task automatic load_row(int idx, logic [NF-1:0] row);
    wr(REG_IA, NF'(idx));
    wr(REG_DATA, row);
    model[idx] = row;
    n_load++;
  endtask

  // One dot product, latency checked. Start is written and the cycles up to
  // Finish are counted, the Start cycle included.
  task automatic dot_single(int a, int b, bit start_again);
    logic [RW-1:0] d;
    int cyc;
    wr(REG_IA, NF'(a));
    wr(REG_IB, NF'(b));
    @(negedge clk);
    host_wr = 1'b1; host_addr = REG_C; host_wdata = NF'(4'b0101);
    @(posedge clk);
    #1;
    cyc = 1;
    host_wr = 1'b0;
    if (start_again) begin
      // a second Start while the first is in flight must be ignored
      @(negedge clk);
      host_wr = 1'b1; host_addr = REG_C; host_wdata = NF'(4'b0101);
      @(posedge clk);
      #1;
      host_wr = 1'b0;
      cyc++;
    end
    while (!finish && cyc < 20) begin
      @(posedge clk);
      #1;
      cyc++;
    end
    check("Start-to-Finish cycles", cyc, 3);
    rd(REG_DATA, d);
    check($sformatf("R_REG dot(%0d,%0d)", a, b), int'(d), ref_dot(a, b));
    check("r_reg pin", int'(r_reg), ref_dot(a, b));
    if (start_again) begin
      // no second operation: Finish stays set for a while
      repeat (4) @(posedge clk);
      #1;
      check("Finish held after ignored Start", int'(finish), 1);
      if (finish) n_start_ign_busy++;
    end else begin
      n_single++;
    end
  endtask

  // A stream of dot products, the next indexes written during the fetch and
  // compute cycles of the current one. Expects one result every 3 cycles.
  task automatic dot_stream(int v);
    int ia[], ib[];
    int t_start, cyc;
    ia = new[v + 1];
    ib = new[v + 1];
    for (int p = 0; p <= v; p++) begin
      ia[p] = int'($urandom % NS);
      ib[p] = int'($urandom % NS);
    end
    wr(REG_IA, NF'(ia[0]));
    wr(REG_IB, NF'(ib[0]));
    cyc = 0;
    for (int p = 0; p < v; p++) begin
      @(negedge clk);
      host_wr = 1'b1; host_addr = REG_C; host_wdata = NF'(4'b0101);
      @(negedge clk);
      cyc++;
      host_addr = REG_IA; host_wdata = NF'(ia[p + 1]);
      @(negedge clk);
      cyc++;
      host_addr = REG_IB; host_wdata = NF'(ib[p + 1]);
      @(posedge clk);
      #1;
      cyc++;
      host_wr = 1'b0;
      check("stream Finish", int'(finish), 1);
      check($sformatf("stream dot(%0d,%0d)", ia[p], ib[p]), int'(r_reg), ref_dot(ia[p], ib[p]));
      if (finish) n_stream++;
    end
    check("stream cycles", cyc, 3 * v);
  endtask

  logic [RW-1:0] d;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    rd(REG_C, d);
    check("C_REG after reset", int'(d), 0);

    // load phase
    for (int r = 0; r < NS; r++) load_row(r, rand_row());
    load_row(0, '1);
    load_row(1, '0);
    wr(REG_IB, NF'(7));
    rd(REG_IB, d);
    check("I_REG_B disabled in load phase", int'(d), 0);
    if (d == 0) n_ib_disabled++;
    wr(REG_C, NF'(4'b0100));
    repeat (5) @(posedge clk);
    #1;
    check("Start ignored in load phase", int'(finish), 0);
    if (!finish) n_start_ign_load++;

    // processing phase
    wr(REG_C, NF'(4'b0001));
    rd(REG_C, d);
    check("Phase bit", int'(d[0]), 1);
    if (d[0]) n_phase++;
    wr(REG_IA, NF'(3));
    wr(REG_DATA, ~model[3]);    // must not reach the memory
    dot_single(3, 3, 1'b0);
    if (int'(r_reg) == ref_dot(3, 3)) n_data_ign++;
    dot_single(0, 0, 1'b0);     // 128 ones
    dot_single(0, 1, 1'b0);     // zero
    for (int k = 0; k < 200; k++) dot_single(int'($urandom % NS), int'($urandom % NS), 1'b0);
    dot_single(5, 9, 1'b1);
    dot_stream(300);

    // soft reset: registers to 0, back to the load phase, matrix kept
    wr(REG_C, NF'(4'b0010));
    n_soft_reset++;
    rd(REG_C, d);  check("C_REG after soft reset", int'(d), 0);
    rd(REG_IA, d); check("I_REG_A after soft reset", int'(d), 0);
    rd(REG_IB, d); check("I_REG_B after soft reset", int'(d), 0);
    rd(REG_DATA, d); check("R_REG after soft reset", int'(d), 0);
    // reload a few rows, then process again
    for (int r = 10; r < 20; r++) load_row(r, rand_row());
    wr(REG_C, NF'(4'b0001));
    for (int k = 0; k < 50; k++) dot_single(10 + int'($urandom % 10), int'($urandom % NS), 1'b0);
    dot_stream(50);

    check("mechanism: row load", int'(n_load > 0), 1);
    check("mechanism: I_REG_B disabled", int'(n_ib_disabled > 0), 1);
    check("mechanism: Start ignored in load phase", int'(n_start_ign_load > 0), 1);
    check("mechanism: phase switch", int'(n_phase > 0), 1);
    check("mechanism: matrix input disabled", int'(n_data_ign > 0), 1);
    check("mechanism: single dot product", int'(n_single > 0), 1);
    check("mechanism: streamed dot product", int'(n_stream > 0), 1);
    check("mechanism: Start ignored while busy", int'(n_start_ign_busy > 0), 1);
    check("mechanism: soft reset", int'(n_soft_reset > 0), 1);
    $display("mechanisms: loads=%0d ib_disabled=%0d start_ignored_load=%0d phase_switch=%0d",
             n_load, n_ib_disabled, n_start_ign_load, n_phase);
    $display("mechanisms: data_ignored=%0d single=%0d streamed=%0d start_ignored_busy=%0d soft_reset=%0d",
             n_data_ign, n_single, n_stream, n_start_ign_busy, n_soft_reset);
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

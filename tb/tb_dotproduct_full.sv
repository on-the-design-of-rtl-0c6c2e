// tb_dotproduct_full: the DotProduct coprocessor at its default size
// (4096 samples of 128 features) running Adult-sized training sets.
//
// For each training set the host soft-resets the coprocessor, loads every
// sample, switches to the processing phase and computes one full kernel row
// (one sample against every sample of the set), the unit of work the SMO
// software asks for when it evaluates the error of a candidate. Sample
// vectors are generated here: 123 binary features per sample with 14 of
// them set, which is how the Adult census data is usually binarised (one
// set bit for each of its 14 attributes). The set sizes are the three
// corpora that fit on chip, 1605, 2265 and 3185 samples, and finally a
// random set filling all 4096 rows of 128 features. Every result is
// compared with a reference count, and each kernel row must take exactly
// 3 cycles per dot product.
module tb_dotproduct_full;
  import dp_pkg::*;

  localparam int unsigned NS = N_SAMPLES_DEF;
  localparam int unsigned NF = N_FEATURES_DEF;
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

  always #5 clk = ~clk;

  dotproduct dut (
    .clk(clk), .rst_n(rst_n), .host_wr(host_wr), .host_addr(host_addr),
    .host_wdata(host_wdata), .host_raddr(host_raddr), .host_rdata(host_rdata),
    .finish(finish), .r_reg(r_reg)
  );

  function automatic int ref_dot(int a, int b);
    logic [NF-1:0] both = model[a] & model[b];
    int n = 0;
    for (int i = 0; i < NF; i++) n += int'(both[i]);
    return n;
  endfunction

  // n_feat features, `ones` of them set (ones < 0: random density)
  function automatic logic [NF-1:0] gen_row(int n_feat, int ones);
    logic [NF-1:0] v = '0;
    if (ones < 0) begin
      for (int i = 0; i < n_feat; i++) v[i] = 1'($urandom);
    end else begin
      int placed = 0;
      while (placed < ones) begin
        int f = int'($urandom % n_feat);
        if (!v[f]) begin
          v[f] = 1'b1;
          placed++;
        end
      end
    end
    return v;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic wr(reg_addr_e a, logic [NF-1:0] d);
    @(negedge clk);
    host_wr = 1'b1; host_addr = a; host_wdata = d;
    @(posedge clk);
    #1;
    host_wr = 1'b0;
  endtask

  // Load a training set of n samples and compute the kernel row of sample
  // `pivot` against all n samples, streamed.
  task automatic run_set(string name, int n, int n_feat, int ones, int pivot);
    int cyc, nxt;
    wr(REG_C, NF'(4'b0010));          // soft reset: load phase
    for (int r = 0; r < n; r++) begin
      model[r] = gen_row(n_feat, ones);
      wr(REG_IA, NF'(r));
      wr(REG_DATA, model[r]);
    end
    wr(REG_C, NF'(4'b0001));          // processing phase
    wr(REG_IA, NF'(pivot));
    wr(REG_IB, NF'(0));
    cyc = 0;
    for (int j = 0; j < n; j++) begin
      @(negedge clk);
      host_wr = 1'b1; host_addr = REG_C; host_wdata = NF'(4'b0101);
      @(negedge clk);
      cyc++;
      host_addr = REG_IA; host_wdata = NF'(pivot);
      @(negedge clk);
      cyc++;
      nxt = (j + 1) % n;
      host_addr = REG_IB; host_wdata = NF'(nxt);
      @(posedge clk);
      #1;
      cyc++;
      host_wr = 1'b0;
      check("Finish", int'(finish), 1);
      check($sformatf("%s K(%0d,%0d)", name, pivot, j), int'(r_reg), ref_dot(pivot, j));
    end
    check($sformatf("%s kernel row cycles", name), cyc, 3 * n);
    $display("%s: %0d samples loaded, kernel row of %0d dot products in %0d cycles",
             name, n, n, cyc);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_set("Adult-1", 1605, 123, 14, 17);
    run_set("Adult-2", 2265, 123, 14, 2000);
    run_set("Adult-3", 3185, 123, 14, 3184);
    run_set("full capacity", NS, NF, -1, 4095);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

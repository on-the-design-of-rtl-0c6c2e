// tb_fsmo_train: SVM training with SMO on the host side and every kernel
// value taken from the DotProduct coprocessor.
//
// The testbench plays the host processor. It generates an Adult-like binary
// training set of 1605 samples, the size of the Adult-1 corpus (123 features in 14 one-hot attribute groups, so every sample
// has exactly 14 features set, with labels that depend on the attribute
// values plus noise), loads it into the coprocessor, and runs Platt's
// Sequential Minimal Optimization with a linear kernel, an error cache, the
// usual examine-all / examine-non-bound outer loop and the second-choice
// heuristic |E1 - E2|. Each kernel evaluation is a coprocessor transaction;
// kernel lists (the output of the SVM for one sample, error-cache updates)
// are streamed at one dot product per three cycles.
//
// Checks: every value returned by the coprocessor equals a reference
// AND-and-count; after training, every multiplier lies in [0, C], the sum of
// y_i * alpha_i is zero, and the Karush-Kuhn-Tucker conditions hold for every
// sample within the tolerance, using outputs recomputed from the reference
// kernel. The number of dot products and coprocessor cycles is reported.
// The data are synthetic, so the support-vector counts and threshold are not
// those of the real Adult-1 training. About two minutes of simulation.
module tb_fsmo_train;
  import dp_pkg::*;

  localparam int unsigned NS = 4096;
  localparam int unsigned NF = 128;
  localparam int unsigned R  = $clog2(NF + 1);
  localparam int unsigned RW = rd_width($clog2(NS), R);

  localparam int    N_TRAIN = 1605;  // the size of the Adult-1 corpus
  localparam int    N_ATTR  = 14;
  localparam int    N_USED  = 123;
  localparam real   C_PEN   = 0.05;   // penalty, as commonly used for Adult
  localparam real   TOL     = 1.0e-3;
  localparam real   EPS     = 1.0e-3;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          host_wr = 1'b0;
  logic [1:0]    host_addr = '0, host_raddr = '0;
  logic [NF-1:0] host_wdata = '0;
  logic [RW-1:0] host_rdata;
  logic          finish;
  logic [R-1:0]  r_reg;

  always #5 clk = ~clk;

  dotproduct dut (
    .clk(clk), .rst_n(rst_n), .host_wr(host_wr), .host_addr(host_addr),
    .host_wdata(host_wdata), .host_raddr(host_raddr), .host_rdata(host_rdata),
    .finish(finish), .r_reg(r_reg)
  );

  int checks = 0, failures = 0;
  longint n_dots = 0, n_cycles = 0;
  int n_steps = 0;

  logic [NF-1:0] x [N_TRAIN];
  real           y [N_TRAIN];
  real           alpha [N_TRAIN];
  real           err [N_TRAIN];
  real           b = 0.0;

  // ---------------------------------------------------------------- data
  function automatic int grp_lo(int g);
    return (g < 11) ? 9 * g : 99 + 8 * (g - 11);
  endfunction
  function automatic int grp_n(int g);
    return (g < 11) ? 9 : 8;
  endfunction

  task automatic gen_data();
    for (int i = 0; i < N_TRAIN; i++) begin
      int score = 0;
      x[i] = '0;
      for (int g = 0; g < N_ATTR; g++) begin
        int v = int'($urandom % grp_n(g));
        x[i][grp_lo(g) + v] = 1'b1;
        if (g < 6) score += (v < grp_n(g) / 2) ? 1 : -1;
      end
      // label from the first six attributes, 10% flipped
      y[i] = (score > 0) ? 1.0 : -1.0;
      if (($urandom % 10) == 0) y[i] = -y[i];
    end
  endtask

  function automatic int ref_dot(int a, int c);
    logic [NF-1:0] both = x[a] & x[c];
    int n = 0;
    for (int k = 0; k < NF; k++) n += int'(both[k]);
    return n;
  endfunction

  // ---------------------------------------------------------- coprocessor
  task automatic wr(reg_addr_e a, logic [NF-1:0] d);
    @(negedge clk);
    host_wr = 1'b1; host_addr = a; host_wdata = d;
    @(posedge clk);
    #1;
    host_wr = 1'b0;
  endtask

  // K(i, js[k]) for every k, streamed: Start, next I_REG_A, next I_REG_B.
  task automatic kernel_list(int i, int js[$], ref real kout[$]);
    int n = js.size();
    kout.delete();
    if (n == 0) return;
    wr(REG_IA, NF'(i));
    wr(REG_IB, NF'(js[0]));
    for (int k = 0; k < n; k++) begin
      int nxt = (k + 1 < n) ? js[k + 1] : js[k];
      @(negedge clk);
      host_wr = 1'b1; host_addr = REG_C; host_wdata = NF'(4'b0101);
      @(negedge clk);
      host_addr = REG_IA; host_wdata = NF'(i);
      @(negedge clk);
      host_addr = REG_IB; host_wdata = NF'(nxt);
      @(posedge clk);
      #1;
      host_wr = 1'b0;
      n_cycles += 3;
      n_dots++;
      if (!finish || int'(r_reg) != ref_dot(i, js[k])) begin
        failures++;
        if (failures < 20)
          $display("FAIL K(%0d,%0d) = %0d expected %0d", i, js[k], r_reg, ref_dot(i, js[k]));
      end
      checks++;
      kout.push_back(real'(r_reg));
    end
  endtask

  task automatic kernel1(int i, int j, output real k);
    int js[$];
    real ko[$];
    js.push_back(j);
    kernel_list(i, js, ko);
    k = ko[0];
  endtask

  // SVM output u_i = sum_j alpha_j y_j K(j, i) - b, kernels from the chip
  task automatic svm_out(int i, output real u);
    int js[$];
    real ko[$];
    for (int j = 0; j < N_TRAIN; j++) if (alpha[j] > 0.0) js.push_back(j);
    kernel_list(i, js, ko);
    u = -b;
    foreach (js[k]) u += alpha[js[k]] * y[js[k]] * ko[k];
  endtask

  function automatic bit non_bound(int i);
    return (alpha[i] > 0.0) && (alpha[i] < C_PEN);
  endfunction

  task automatic get_err(int i, output real e);
    real u;
    if (non_bound(i)) e = err[i];
    else begin
      svm_out(i, u);
      e = u - y[i];
    end
  endtask

  // --------------------------------------------------------------- SMO
  task automatic take_step(int i1, int i2, output bit ok);
    real alph1, alph2, y1, y2, e1, e2, s, lo, hi, k11, k12, k22, eta;
    real a1, a2, b1, b2, bnew, t1, t2, f1, f2, l1, h1, lobj, hobj;
    int js[$];
    real ko1[$], ko2[$];
    ok = 0;
    if (i1 == i2) return;
    alph1 = alpha[i1]; alph2 = alpha[i2];
    y1 = y[i1]; y2 = y[i2];
    get_err(i1, e1);
    get_err(i2, e2);
    s = y1 * y2;
    if (s < 0) begin
      lo = (alph2 - alph1 > 0.0) ? alph2 - alph1 : 0.0;
      hi = (C_PEN + alph2 - alph1 < C_PEN) ? C_PEN + alph2 - alph1 : C_PEN;
    end else begin
      lo = (alph1 + alph2 - C_PEN > 0.0) ? alph1 + alph2 - C_PEN : 0.0;
      hi = (alph1 + alph2 < C_PEN) ? alph1 + alph2 : C_PEN;
    end
    if (lo >= hi) return;
    kernel1(i1, i1, k11);
    kernel1(i1, i2, k12);
    kernel1(i2, i2, k22);
    eta = 2.0 * k12 - k11 - k22;
    if (eta < 0.0) begin
      a2 = alph2 - y2 * (e1 - e2) / eta;
      if (a2 < lo) a2 = lo;
      else if (a2 > hi) a2 = hi;
    end else begin
      f1 = y1 * (e1 + b) - alph1 * k11 - s * alph2 * k12;
      f2 = y2 * (e2 + b) - s * alph1 * k12 - alph2 * k22;
      l1 = alph1 + s * (alph2 - lo);
      h1 = alph1 + s * (alph2 - hi);
      lobj = l1 * f1 + lo * f2 + 0.5 * l1 * l1 * k11 + 0.5 * lo * lo * k22 + s * lo * l1 * k12;
      hobj = h1 * f1 + hi * f2 + 0.5 * h1 * h1 * k11 + 0.5 * hi * hi * k22 + s * hi * h1 * k12;
      if (lobj < hobj - EPS) a2 = lo;
      else if (lobj > hobj + EPS) a2 = hi;
      else a2 = alph2;
    end
    if (a2 < 1e-8) a2 = 0.0;
    else if (a2 > C_PEN - 1e-8) a2 = C_PEN;
    if ((a2 - alph2 < 0 ? alph2 - a2 : a2 - alph2) < EPS * (a2 + alph2 + EPS)) return;
    a1 = alph1 + s * (alph2 - a2);
    if (a1 < 1e-8) a1 = 0.0;
    else if (a1 > C_PEN - 1e-8) a1 = C_PEN;
    // threshold
    t1 = y1 * (a1 - alph1);
    t2 = y2 * (a2 - alph2);
    b1 = e1 + t1 * k11 + t2 * k12 + b;
    b2 = e2 + t1 * k12 + t2 * k22 + b;
    if (a1 > 0.0 && a1 < C_PEN) bnew = b1;
    else if (a2 > 0.0 && a2 < C_PEN) bnew = b2;
    else bnew = 0.5 * (b1 + b2);
    // error cache of the non-bound samples, two streamed kernel lists
    for (int i = 0; i < N_TRAIN; i++) if (non_bound(i) && i != i1 && i != i2) js.push_back(i);
    kernel_list(i1, js, ko1);
    kernel_list(i2, js, ko2);
    foreach (js[k]) err[js[k]] += t1 * ko1[k] + t2 * ko2[k] + b - bnew;
    b = bnew;
    alpha[i1] = a1;
    alpha[i2] = a2;
    err[i1] = 0.0;
    err[i2] = 0.0;
    if (non_bound(i1)) begin real u; svm_out(i1, u); err[i1] = u - y1; end
    if (non_bound(i2)) begin real u; svm_out(i2, u); err[i2] = u - y2; end
    n_steps++;
    ok = 1;
  endtask

  task automatic examine(int i2, output int changed);
    real y2, alph2, e2, r2, best, d;
    int i1, n_nb, st;
    bit ok;
    changed = 0;
    y2 = y[i2]; alph2 = alpha[i2];
    get_err(i2, e2);
    r2 = e2 * y2;
    if (!((r2 < -TOL && alph2 < C_PEN) || (r2 > TOL && alph2 > 0.0))) return;
    n_nb = 0;
    for (int i = 0; i < N_TRAIN; i++) if (non_bound(i)) n_nb++;
    if (n_nb > 1) begin
      best = -1.0; i1 = -1;
      for (int i = 0; i < N_TRAIN; i++) begin
        if (non_bound(i)) begin
          d = err[i] - e2;
          if (d < 0) d = -d;
          if (d > best) begin best = d; i1 = i; end
        end
      end
      if (i1 >= 0) begin
        take_step(i1, i2, ok);
        if (ok) begin changed = 1; return; end
      end
    end
    st = int'($urandom % N_TRAIN);
    for (int k = 0; k < N_TRAIN; k++) begin
      i1 = (st + k) % N_TRAIN;
      if (non_bound(i1)) begin
        take_step(i1, i2, ok);
        if (ok) begin changed = 1; return; end
      end
    end
    st = int'($urandom % N_TRAIN);
    for (int k = 0; k < N_TRAIN; k++) begin
      i1 = (st + k) % N_TRAIN;
      take_step(i1, i2, ok);
      if (ok) begin changed = 1; return; end
    end
  endtask

  // ------------------------------------------------------------- checks
  task automatic final_checks();
    real sum_ay = 0.0, u, m, yu;
    int n_sv = 0, n_bsv = 0, n_viol = 0, n_right = 0;
    for (int i = 0; i < N_TRAIN; i++) begin
      checks++;
      if (alpha[i] < 0.0 || alpha[i] > C_PEN) begin
        failures++;
        $display("FAIL alpha[%0d] = %f outside [0, C]", i, alpha[i]);
      end
      sum_ay += alpha[i] * y[i];
      if (alpha[i] > 0.0) n_sv++;
      if (alpha[i] >= C_PEN) n_bsv++;
    end
    checks++;
    if (sum_ay > 1e-6 || sum_ay < -1e-6) begin
      failures++;
      $display("FAIL sum(y*alpha) = %g", sum_ay);
    end
    for (int i = 0; i < N_TRAIN; i++) begin
      u = -b;
      for (int j = 0; j < N_TRAIN; j++)
        if (alpha[j] > 0.0) u += alpha[j] * y[j] * real'(ref_dot(j, i));
      yu = y[i] * u;
      if (yu > 0.0) n_right++;
      m = 10.0 * TOL;  // KKT slack allowed at the end of training
      checks++;
      if ((alpha[i] == 0.0 && yu < 1.0 - m) ||
          (alpha[i] >= C_PEN && yu > 1.0 + m) ||
          (alpha[i] > 0.0 && alpha[i] < C_PEN && (yu < 1.0 - m || yu > 1.0 + m))) begin
        n_viol++;
        failures++;
        if (n_viol < 10) $display("FAIL KKT sample %0d: alpha=%f y*u=%f", i, alpha[i], yu);
      end
    end
    $display("trained: %0d samples, b=%f, %0d non-bound and %0d bound support vectors",
             N_TRAIN, b, n_sv - n_bsv, n_bsv);
    $display("training accuracy %0d/%0d, %0d successful steps", n_right, N_TRAIN, n_steps);
    $display("coprocessor: %0d dot products in %0d cycles", n_dots, n_cycles);
    checks++;
    if (n_cycles != 3 * n_dots) begin
      failures++;
      $display("FAIL cycles per dot product");
    end
    checks++;
    if (n_steps == 0) begin
      failures++;
      $display("FAIL no optimisation step taken");
    end
  endtask

  initial begin
    int num_changed, c;
    bit examine_all;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    gen_data();
    for (int i = 0; i < N_TRAIN; i++) begin
      alpha[i] = 0.0;
      err[i] = 0.0;
      wr(REG_IA, NF'(i));
      wr(REG_DATA, x[i]);
    end
    wr(REG_C, NF'(4'b0001));
    num_changed = 0;
    examine_all = 1;
    while (num_changed > 0 || examine_all) begin
      num_changed = 0;
      for (int i = 0; i < N_TRAIN; i++) begin
        if (examine_all || non_bound(i)) begin
          examine(i, c);
          num_changed += c;
        end
      end
      if (examine_all) examine_all = 0;
      else if (num_changed == 0) examine_all = 1;
    end
    final_checks();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

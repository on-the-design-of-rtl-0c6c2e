// tb_dp_output: self-checking test of the OUTPUT block.
//
// Checks that R_REG takes the PE result only on load_r, holds it otherwise,
// clears on soft reset, and that each host read address returns the right
// register: C_REG status (Phase in bit 0, Finish in bit 3), I_REG_A, I_REG_B
// and R_REG, with all other bits zero.
module tb_dp_output;
  import dp_pkg::*;

  localparam int unsigned NF = 128;
  localparam int unsigned A  = 12;
  localparam int unsigned R  = $clog2(NF + 1);
  localparam int unsigned RW = rd_width(A, R);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          soft_reset = 1'b0, load_r = 1'b0, phase = 1'b0, finish = 1'b0;
  logic [R-1:0]  pe_dot = '0, r_reg;
  logic [A-1:0]  ia = '0, ib = '0;
  reg_addr_e     raddr = REG_C;
  logic [RW-1:0] rdata;
  int            checks = 0, failures = 0;
  int unsigned   m_r = 0;

  always #5 clk = ~clk;

  dp_output #(.N_FEATURES(NF), .ADDR_W(A)) dut (
    .clk(clk), .rst_n(rst_n), .soft_reset(soft_reset), .load_r(load_r),
    .pe_dot(pe_dot), .phase(phase), .finish(finish), .i_reg_a(ia), .i_reg_b(ib),
    .host_raddr(raddr), .host_rdata(rdata), .r_reg(r_reg)
  );

  task automatic check_reads();
    logic [RW-1:0] exp;
    for (int k = 0; k < 4; k++) begin
      raddr = reg_addr_e'(k);
      #1;
      case (k)
        0: exp = RW'({finish, 2'b00, phase});
        1: exp = RW'(ia);
        2: exp = RW'(ib);
        default: exp = RW'(m_r);
      endcase
      checks++;
      if (rdata !== exp) begin
        failures++;
        $display("FAIL read %0d: got %h expected %h", k, rdata, exp);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      load_r = (($urandom % 3) == 0);
      soft_reset = (($urandom % 17) == 0);
      pe_dot = R'($urandom % (NF + 1));
      phase = 1'($urandom); finish = 1'($urandom);
      ia = A'($urandom); ib = A'($urandom);
      check_reads();
      if (soft_reset) m_r = 0;
      else if (load_r) m_r = 32'(pe_dot);
      @(negedge clk);
      load_r = 1'b0; soft_reset = 1'b0;
      pe_dot = R'($urandom % (NF + 1));
      checks++;
      if (int'(r_reg) != int'(m_r)) begin
        failures++;
        $display("FAIL R_REG %0d expected %0d", r_reg, m_r);
      end
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

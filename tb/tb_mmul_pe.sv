// Self-checking testbench of one M-MUL processing element.
//
// Drives random data and control on every input for a few thousand clocks
// and compares every output, every clock, with a reference model of the PE
// kept in this testbench: two-stage slow channels, one-stage fast channel,
// ACT as the first CT stage, psi set where I and J meet, the M_A/M_B
// channel switch, multiply-accumulate, capture-and-clear and the unload
// register. Control pulses are sparse so that psi is first clear, then set.
module tb_mmul_pe;

  localparam int A_W = 12;
  localparam int B_W = 9;
  localparam int C_W = 30;

  logic clk = 1'b0;
  logic rst_n;
  logic signed [A_W-1:0] as_i, as_o;
  logic signed [B_W-1:0] bf_i, bf_o, bs_i, bs_o;
  logic ct_i, ct_o, i_i, i_o, j_i, j_o, cap, shift, act_o, psi_o;
  logic signed [C_W-1:0] r_i, r_o, c_o;

  int checks = 0;
  int failures = 0;
  int psi_sets = 0;
  int macs = 0;

  mmul_pe #(.A_W(A_W), .B_W(B_W), .C_W(C_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  logic signed [A_W-1:0] m_as [2];
  logic signed [B_W-1:0] m_bf;
  logic signed [B_W-1:0] m_bs [2];
  logic m_ct [2];
  logic m_i;
  logic m_j [2];
  logic m_psi;
  longint m_c, m_r;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic model_reset();
    m_as = '{default: '0};
    m_bf = '0;
    m_bs = '{default: '0};
    m_ct = '{default: 1'b0};
    m_i = 1'b0;
    m_j = '{default: 1'b0};
    m_psi = 1'b0;
    m_c = 0;
    m_r = 0;
  endtask

  task automatic model_step();
    longint c_next, r_next;
    c_next = m_c;
    r_next = m_r;
    if (cap) begin
      c_next = 0;
      r_next = m_c;
    end else begin
      if (m_ct[0]) begin
        c_next = m_c + longint'(m_as[0]) * longint'(m_bf);
        macs++;
      end
      if (shift) r_next = r_i;
    end
    if (m_i && m_j[1] && !m_psi) begin
      m_psi = 1'b1;
      psi_sets++;
    end
    m_as[1] = m_as[0]; m_as[0] = as_i;
    m_bs[1] = m_bs[0]; m_bs[0] = bs_i;
    m_bf = bf_i;
    m_ct[1] = m_ct[0]; m_ct[0] = ct_i;
    m_i = i_i;
    m_j[1] = m_j[0]; m_j[0] = j_i;
    m_c = c_next;
    m_r = r_next;
  endtask

  task automatic compare();
    check("as_o", as_o, m_psi ? m_as[0] : m_as[1]);
    check("bf_o", bf_o, m_psi ? m_bs[1] : m_bf);
    check("bs_o", bs_o, m_bs[1]);
    check("ct_o", ct_o, m_ct[1]);
    check("act_o", act_o, m_ct[0]);
    check("i_o", i_o, m_i);
    check("j_o", j_o, m_j[1]);
    check("psi_o", psi_o, m_psi);
    check("c_o", c_o, m_c);
    check("r_o", r_o, m_r);
  endtask

  initial begin
    rst_n = 1'b0;
    {ct_i, i_i, j_i, cap, shift} = '0;
    as_i = '0; bf_i = '0; bs_i = '0; r_i = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    model_reset();
    for (int t = 0; t < 3000; t++) begin
      as_i  = A_W'($urandom);
      bf_i  = B_W'($urandom);
      bs_i  = B_W'($urandom);
      r_i   = C_W'($urandom);
      ct_i  = ($urandom % 3) == 0;
      // J pulses often, I pulses rarely and only after a while, so that psi
      // stays clear for the first part of the run
      j_i   = (t > 1000) && (($urandom % 4) == 0);
      i_i   = (t > 1000) && (($urandom % 16) == 0);
      cap   = ($urandom % 50) == 0;
      shift = ($urandom % 2) == 0;
      @(posedge clk);
      model_step();
      @(negedge clk);
      compare();
    end
    check("psi was set once", psi_sets, 1);
    checks++;
    if (macs < 500) begin
      failures++;
      $display("FAIL too few MAC steps: %0d", macs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

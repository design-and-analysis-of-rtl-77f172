// tb_pid_sm2: self-checking test of state machine 2 and register block 2.
// State machine 2 is connected to the pipelined Booth multiplier and the Han-Carlson adder it
// drives in the controller. The bench writes register block 1 directly and pulses upd_kpd /
// upd_pv, and compares Kpd, e(n), e(n-1), sigma, u(n) and the five overflow flags after every
// update with a reference model of
//     sigma = Ki*e(n) + sigma,  u(n) = (Kp+Kd)*e(n) + sigma - Kd*e(n-1)
// computed in 64-bit integers and wrapped to the register widths. It also checks busy,
// un_valid, and that a PV update takes exactly 7 clock edges from the upd_pv pulse to
// un_valid and a Kpd update 2 edges until busy falls. Directed cases drive each overflow flag.
module tb_pid_sm2;
  import pid_pkg::*;
  logic     clk = 1'b0, rst = 1'b1;
  logic     upd_kpd = 1'b0, upd_pv = 1'b0;
  regblk1_t rb1 = '0;
  regblk2_t rb2;
  logic     busy, un_valid;
  logic     mul_in_valid, mul_out_valid, add_cin, add_cout, add_ovf;
  coef_t    mul_md, mul_mr;
  acc_t     mul_product, add_a, add_b, add_sum;
  int checks = 0, failures = 0;

  localparam int PV_LATENCY  = 7;
  localparam int KPD_LATENCY = 2;

  pid_sm2 dut (.clk(clk), .rst(rst), .upd_kpd(upd_kpd), .upd_pv(upd_pv), .rb1(rb1),
               .mul_in_valid(mul_in_valid), .mul_md(mul_md), .mul_mr(mul_mr),
               .mul_out_valid(mul_out_valid), .mul_product(mul_product),
               .add_a(add_a), .add_b(add_b), .add_cin(add_cin), .add_sum(add_sum),
               .add_ovf(add_ovf), .rb2(rb2), .busy(busy), .un_valid(un_valid));
  booth_pipe_mult #(.W(16)) u_mult (.clk(clk), .rst(rst), .in_valid(mul_in_valid),
                                    .md(mul_md), .mr(mul_mr), .out_valid(mul_out_valid),
                                    .product(mul_product));
  han_carlson_adder #(.W(32)) u_add (.a(add_a), .b(add_b), .cin(add_cin), .sum(add_sum),
                                     .cout(add_cout), .ovf(add_ovf));

  always #5 clk = ~clk;

  // reference model state
  longint m_kpd, m_e0, m_e1, m_sigma, m_un;
  logic [4:0] m_of;

  function automatic longint wrap(input longint v, input int bits);
    longint m = longint'(1) << bits;
    longint r = v & (m - 1);
    if (r >= (m >> 1)) r -= m;
    return r;
  endfunction
  function automatic logic outside(input longint v, input int bits);
    return v != wrap(v, bits);
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic compare(input string when);
    check(longint'(rb2.kpd) == m_kpd, $sformatf("%s: kpd %0d want %0d", when, rb2.kpd, m_kpd));
    check(longint'(rb2.err0) == m_e0, $sformatf("%s: err0 %0d want %0d", when, rb2.err0, m_e0));
    check(longint'(rb2.err1) == m_e1, $sformatf("%s: err1 %0d want %0d", when, rb2.err1, m_e1));
    check(longint'(rb2.sigma) == m_sigma,
          $sformatf("%s: sigma %0d want %0d", when, rb2.sigma, m_sigma));
    check(longint'(rb2.un) == m_un, $sformatf("%s: un %0d want %0d", when, rb2.un, m_un));
    check(rb2.of == m_of, $sformatf("%s: of %b want %b", when, rb2.of, m_of));
  endtask

  task automatic set_k(input coef_t kp, input coef_t kd);
    int n;
    @(negedge clk);
    rb1.kp = kp; rb1.kd = kd; upd_kpd = 1'b1;
    @(negedge clk);
    upd_kpd = 1'b0;
    n = 1;
    while (busy && n < 50) begin @(negedge clk); n++; end
    m_kpd   = wrap(longint'(kp) + longint'(kd), 16);
    m_of[0] = outside(longint'(kp) + longint'(kd), 16);
    check(n == KPD_LATENCY, $sformatf("Kpd update takes %0d edges (got %0d)", KPD_LATENCY, n));
    compare("after Kpd update");
  endtask

  task automatic new_pv(input coef_t sp, input coef_t pv);
    int n;
    longint e, t;
    @(negedge clk);
    rb1.sp = sp; rb1.pv = pv; upd_pv = 1'b1;
    @(negedge clk);
    upd_pv = 1'b0;
    n = 1;
    check(!un_valid || n == 1, "un_valid");
    while (!un_valid && n < 50) begin
      @(negedge clk);
      n++;
      if (n == 2) check(busy && !un_valid, "busy and not valid during calculation");
    end
    // reference
    e = longint'(sp) - longint'(pv);
    m_of[1] = outside(e, 16);
    m_e1 = m_e0;
    m_e0 = wrap(e, 16);
    t = m_sigma + longint'(rb1.ki) * m_e0;
    m_of[2] = outside(t, 32);
    m_sigma = wrap(t, 32);
    t = m_sigma + m_kpd * m_e0;
    m_of[3] = outside(t, 32);
    t = wrap(t, 32);
    m_un = t - longint'(rb1.kd) * m_e1;
    m_of[4] = outside(m_un, 32);
    m_un = wrap(m_un, 32);
    check(n == PV_LATENCY, $sformatf("PV update takes %0d edges (got %0d)", PV_LATENCY, n));
    check(!busy, "idle after calculation");
    compare($sformatf("after PV update sp=%0d pv=%0d", sp, pv));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_kpd = 0; m_e0 = 0; m_e1 = 0; m_sigma = 0; m_un = 0; m_of = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    compare("after reset");
    check(!busy && !un_valid, "idle and not valid after reset");
    // The worked example's gains.
    rb1.ki = 16'sd129;
    set_k(16'sd128, 16'sd130);
    new_pv(16'sd3975, 16'sd3975);
    new_pv(16'sd3975, 16'sd3000);
    new_pv(16'sd3975, 16'sd4100);
    // Overflow of Kp + Kd and of SP - PV.
    set_k(16'sd32767, 16'sd5);
    new_pv(16'sd32767, -16'sd32768);
    set_k(16'sd100, -16'sd7);
    // Overflow of sigma and of the u(n) additions.
    rb1.ki = 16'sd32767;
    set_k(16'sd32767, -16'sd32768);
    repeat (4) new_pv(16'sd32767, 16'sd0);
    repeat (4) new_pv(-16'sd32768, 16'sd0);
    // Random
    for (int i = 0; i < 300; i++) begin
      rb1.ki = coef_t'($urandom);
      if (i % 5 == 0) set_k(coef_t'($urandom), coef_t'($urandom));
      new_pv(coef_t'($urandom), coef_t'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

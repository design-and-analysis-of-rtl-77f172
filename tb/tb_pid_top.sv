// tb_pid_top: end-to-end test of the PID controller through its Wishbone port, at the
// default parameters (32-bit data bus, register window at address 0).
//
// A Wishbone classic master (tasks wb_write / wb_read) programs the gains, writes process
// values and reads every register back. A reference model of the controller equations
//     e(n) = SP - PV, sigma = Ki*e(n) + sigma, u(n) = (Kp+Kd)*e(n) + sigma - Kd*e(n-1)
// (64-bit integers wrapped to the register widths, with the five overflow flags) is compared
// with the registers, o_un and o_valid after every update. The phases are:
//   1. the worked example: Kp=128, Ki=129, Kd=130, SP=3975; PV steps that bring sigma to
//      21878529 and then PV=SP twice, so that e(n)=e(n-1)=0, Kpd=258 and u(n)=21878529;
//   2. a closed loop around a behavioural plant (an integrator, y += (u - u0) / 1024, u0
//      being the integral left by phase 1) that must
//      settle on the set point, with the gains retuned part way;
//   3. writes held while a calculation runs (stall), writes to read-only registers,
//      accesses outside the window, and directed values that set every overflow flag;
//   4. random register traffic.
// Each mechanism is counted and a failure is counted for any that never happened. The
// latency from the PV write acknowledge to o_valid is checked to be 8 clock edges.
module tb_pid_top;
  import pid_pkg::*;
  logic        clk = 1'b0, rst = 1'b1;
  logic        cyc = 1'b0, stb = 1'b0, we = 1'b0;
  logic [15:0] adr = '0;
  logic [31:0] wdat = '0;
  logic        ack, o_valid;
  logic [31:0] rdat, o_un;
  int checks = 0, failures = 0;

  localparam int VALID_LATENCY = 8;

  pid_top dut (.i_clk(clk), .i_rst(rst), .i_wb_cyc(cyc), .i_wb_stb(stb), .i_wb_we(we),
               .i_wb_addr(adr), .i_wb_data(wdat), .o_wb_ack(ack), .o_wb_data(rdat),
               .o_un(o_un), .o_valid(o_valid));

  always #5 clk = ~clk;

  // mechanism counters
  int n_kpd_upd = 0, n_pv_upd = 0, n_stall = 0, n_ro_write = 0, n_miss = 0, n_settled = 0;
  int n_of [5] = '{0, 0, 0, 0, 0};
  int n_reads = 0, n_example = 0;

  // reference model
  longint m_kp, m_ki, m_kd, m_sp, m_pv, m_kpd, m_e0, m_e1, m_sigma, m_un;
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

  // Wishbone classic master. Returns the number of cycles from strobe to acknowledge
  // (MAXW if none came).
  localparam int MAXW = 40;
  task automatic wb_write(input logic [15:0] a, input logic [31:0] d, output int cycles);
    @(negedge clk);
    cyc = 1'b1; stb = 1'b1; we = 1'b1; adr = a; wdat = d;
    cycles = 0;
    do begin @(negedge clk); cycles++; end while (!ack && cycles < MAXW);
    cyc = 1'b0; stb = 1'b0; we = 1'b0;
  endtask
  task automatic wb_read(input logic [15:0] a, output logic [31:0] d, output int cycles);
    @(negedge clk);
    cyc = 1'b1; stb = 1'b1; we = 1'b0; adr = a;
    cycles = 0;
    do begin @(negedge clk); cycles++; end while (!ack && cycles < MAXW);
    d = rdat;
    cyc = 1'b0; stb = 1'b0;
  endtask

  function automatic logic [15:0] addr_of(input reg_idx_e r);
    return 16'(int'(r) * 4);
  endfunction

  // model updates
  task automatic model_kpd();
    longint s = m_kp + m_kd;
    m_kpd = wrap(s, 16);
    m_of[OF_KPD] = outside(s, 16);
  endtask
  task automatic model_pv();
    longint e, t;
    e = m_sp - m_pv;
    m_of[OF_ERR] = outside(e, 16);
    m_e1 = m_e0;
    m_e0 = wrap(e, 16);
    t = m_sigma + m_ki * m_e0;
    m_of[OF_SIGMA] = outside(t, 32);
    m_sigma = wrap(t, 32);
    t = m_sigma + m_kpd * m_e0;
    m_of[OF_UN1] = outside(t, 32);
    t = wrap(t, 32);
    t = t - m_kd * m_e1;
    m_of[OF_UN2] = outside(t, 32);
    m_un = wrap(t, 32);
    for (int i = 0; i < 5; i++) if (m_of[i]) n_of[i]++;
  endtask

  // Write a block-1 register, wait until the controller is idle again, update the model.
  task automatic set_reg(input reg_idx_e r, input longint v);
    int c, n;
    wb_write(addr_of(r), 32'(v), c);
    check(c < MAXW, $sformatf("write to %s acknowledged", r.name()));
    unique case (r)
      REG_KP: begin m_kp = wrap(v, 16); model_kpd(); n_kpd_upd++; end
      REG_KI: m_ki = wrap(v, 16);
      REG_KD: begin m_kd = wrap(v, 16); model_kpd(); n_kpd_upd++; end
      REG_SP: m_sp = wrap(v, 16);
      REG_PV: begin
        m_pv = wrap(v, 16);
        model_pv();
        n_pv_upd++;
        // o_valid falls, then rises VALID_LATENCY edges after the acknowledging edge
        n = 0;
        do begin
          @(negedge clk);
          n++;
          if (n == 2) check(!o_valid, "o_valid low while calculating");
        end while (!(o_valid && n >= 2) && n < 50);
        check(n == VALID_LATENCY,
              $sformatf("o_valid %0d edges after PV ack (got %0d)", VALID_LATENCY, n));
        check(longint'(signed'(o_un)) == m_un,
              $sformatf("o_un %0d want %0d", signed'(o_un), m_un));
      end
      default: ;
    endcase
  endtask

  task automatic read_check(input reg_idx_e r, input longint want);
    logic [31:0] d;
    int c;
    wb_read(addr_of(r), d, c);
    n_reads++;
    check(c == 1, $sformatf("read of %s acknowledged after 1 cycle (got %0d)", r.name(), c));
    check(longint'(signed'(d)) == want,
          $sformatf("%s reads %0d want %0d", r.name(), signed'(d), want));
  endtask

  task automatic read_all();
    read_check(REG_KP, m_kp);   read_check(REG_KI, m_ki);     read_check(REG_KD, m_kd);
    read_check(REG_SP, m_sp);   read_check(REG_PV, m_pv);     read_check(REG_KPD, m_kpd);
    read_check(REG_ERR0, m_e0); read_check(REG_ERR1, m_e1);   read_check(REG_UN, m_un);
    read_check(REG_SIGMA, m_sigma); read_check(REG_OF, longint'(m_of));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    logic [31:0] d;
    longint y, u_off;
    m_kp = 0; m_ki = 0; m_kd = 0; m_sp = 0; m_pv = 0;
    m_kpd = 0; m_e0 = 0; m_e1 = 0; m_sigma = 0; m_un = 0; m_of = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    read_all();

    // 1. Worked example: sum of e(n) = 21878529 / 129 = 169601 = 5 * 32767 + 5766.
    set_reg(REG_KP, 128);
    set_reg(REG_KI, 129);
    set_reg(REG_KD, 130);
    set_reg(REG_SP, 3975);
    repeat (5) set_reg(REG_PV, 3975 - 32767);
    set_reg(REG_PV, 3975 - 5766);
    set_reg(REG_PV, 3975);
    set_reg(REG_PV, 3975);
    read_all();
    check(m_kpd == 258 && m_e0 == 0 && m_e1 == 0 && m_sigma == 21878529 && m_un == 21878529,
          "model reproduces the worked example");
    if (signed'(o_un) == 21878529 && m_un == 21878529) n_example++;
    $display("example: kpd=258 err=[0,0] sigma=%0d un=%0d", m_sigma, signed'(o_un));

    // 2. Closed loop around an integrating plant, y += (u - u_off) / 1024, where u_off is
    //    the integral left by phase 1, read back over the bus.
    wb_read(addr_of(REG_SIGMA), d, c);
    u_off = longint'(signed'(d));
    set_reg(REG_KI, 8);
    set_reg(REG_KP, 512);
    set_reg(REG_KD, 128);
    set_reg(REG_SP, 1000);
    y = 0;
    for (int n = 0; n < 400; n++) begin
      set_reg(REG_PV, y);
      y = y + ((longint'(signed'(o_un)) - u_off) >>> 10);
      if (y > 32767) y = 32767;
      if (y < -32768) y = -32768;
      if (n == 200) begin
        set_reg(REG_KP, 640);  // retune on the fly
        set_reg(REG_SP, -500);
      end
    end
    check((y - m_sp) <= 16 && (m_sp - y) <= 16,
          $sformatf("closed loop settles on SP=%0d (y=%0d)", m_sp, y));
    if ((y - m_sp) <= 16 && (m_sp - y) <= 16) n_settled++;
    read_all();

    // 3a. Stall: a write issued right behind a PV write is held until u(n) is done.
    fork
      set_reg(REG_PV, 123);
      begin
        @(negedge clk); @(negedge clk); @(negedge clk);
        wb_write(addr_of(REG_KI), 32'd7, c);
        m_ki = 7;
        check(c > 1 && c < MAXW, $sformatf("write during calculation held (%0d cycles)", c));
        if (c > 1 && c < MAXW) n_stall++;
      end
    join
    set_reg(REG_PV, 124);
    read_all();
    // 3b. Writes to read-only registers are acknowledged and ignored.
    for (int r = 5; r <= 10; r++) begin
      wb_write(addr_of(reg_idx_e'(r)), 32'hffff_ffff, c);
      check(c == 1, "read-only write acknowledged");
      n_ro_write++;
    end
    read_all();
    // 3c. Outside the window: no acknowledge, nothing changes.
    wb_write(16'h0040, 32'd55, c);
    check(c == MAXW, "write outside the window not acknowledged");
    wb_read(16'h8000, d, c);
    check(c == MAXW, "read outside the window not acknowledged");
    n_miss += 2;
    read_all();
    // 3d. Overflow of every addition.
    set_reg(REG_KP, 32767);
    set_reg(REG_KD, 2);               // Kp + Kd overflows
    set_reg(REG_SP, 32767);
    set_reg(REG_PV, -32768);          // SP - PV overflows
    set_reg(REG_KI, 32767);
    set_reg(REG_KP, 32767);
    set_reg(REG_KD, -32768);          // Kpd = -1
    for (int i = 0; i < 6; i++) set_reg(REG_PV, 0);        // sigma grows past 2^31
    set_reg(REG_KD, 32767);           // Kpd wraps
    for (int i = 0; i < 6; i++) set_reg(REG_PV, -32767);
    set_reg(REG_KI, 0);
    set_reg(REG_KP, -32768); set_reg(REG_KD, 0);
    set_reg(REG_SP, 0);
    for (int i = 0; i < 8; i++) set_reg(REG_PV, (i % 2 != 0) ? 32767 : -32767);
    read_all();

    // 4. Random traffic.
    for (int i = 0; i < 200; i++) begin
      automatic int r = $urandom_range(0, 4);
      set_reg(reg_idx_e'(r), longint'(signed'(16'($urandom))));
      if (i % 20 == 0) read_all();
    end
    read_all();

    // every mechanism must have happened
    check(n_example > 0, "worked example reproduced");
    check(n_kpd_upd > 0, "Kpd update happened");
    check(n_pv_upd > 0, "PV update happened");
    check(n_stall > 0, "held write happened");
    check(n_ro_write > 0, "read-only write happened");
    check(n_miss > 0, "address miss happened");
    check(n_settled > 0, "closed loop settled");
    for (int i = 0; i < 5; i++) check(n_of[i] > 0, $sformatf("overflow flag %0d set", i));
    $display("counts: kpd=%0d pv=%0d stall=%0d ro=%0d miss=%0d reads=%0d of=%0d/%0d/%0d/%0d/%0d",
             n_kpd_upd, n_pv_upd, n_stall, n_ro_write, n_miss, n_reads,
             n_of[0], n_of[1], n_of[2], n_of[3], n_of[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

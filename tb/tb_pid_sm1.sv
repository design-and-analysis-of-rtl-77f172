// tb_pid_sm1: self-checking test of state machine 1 and register block 1.
// Writes every register of block 1 and checks the stored 16-bit value, the one-cycle
// acknowledge one cycle after the strobe, and the upd_kpd / upd_pv pulses. Then holds busy
// high and checks that a write to block 1 is not acknowledged until busy falls, while a write
// to a read-only offset is acknowledged at once and changes nothing, and that an address
// outside the window is never acknowledged.
module tb_pid_sm1;
  import pid_pkg::*;
  logic        clk = 1'b0, rst = 1'b1;
  logic        wr = 1'b0, hit = 1'b0, wr_ok = 1'b0, busy = 1'b0;
  reg_idx_e    idx = REG_KP;
  logic [31:0] wdata = '0;
  logic        wr_ack, upd_kpd, upd_pv;
  regblk1_t    rb1;
  int checks = 0, failures = 0;
  int n_kpd = 0, n_pv = 0;

  pid_sm1 #(.DW(32)) dut (.clk(clk), .rst(rst), .wr(wr), .hit(hit), .idx(idx), .wr_ok(wr_ok),
                          .wdata(wdata), .busy(busy), .wr_ack(wr_ack), .upd_kpd(upd_kpd),
                          .upd_pv(upd_pv), .rb1(rb1));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (upd_kpd) n_kpd++;
    if (upd_pv)  n_pv++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Write at the next negedge and return the number of cycles until ack.
  task automatic write(input reg_idx_e r, input logic in_win, input logic [31:0] d,
                       output int cycles);
    @(negedge clk);
    wr = 1'b1; hit = in_win; idx = r; wr_ok = in_win && (r <= REG_PV); wdata = d;
    cycles = 0;
    do begin
      @(negedge clk);
      cycles++;
    end while (!wr_ack && cycles < 50);
    wr = 1'b0; hit = 1'b0;
  endtask

  function automatic coef_t get(input reg_idx_e r);
    unique case (r)
      REG_KP:  return rb1.kp;
      REG_KI:  return rb1.ki;
      REG_KD:  return rb1.kd;
      REG_SP:  return rb1.sp;
      default: return rb1.pv;
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, k0, p0;
    coef_t v;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check(rb1 == '0, "reset clears register block 1");
    for (int rep = 0; rep < 20; rep++) begin
      for (int r = 0; r <= 4; r++) begin
        v = coef_t'($urandom);
        k0 = n_kpd; p0 = n_pv;
        write(reg_idx_e'(r), 1'b1, {16'($urandom), v}, cyc);
        check(cyc == 1, $sformatf("write ack after 1 cycle (got %0d)", cyc));
        check(get(reg_idx_e'(r)) == v, $sformatf("register %0d holds %0d", r, v));
        @(negedge clk);
        check(!wr_ack, "ack lasts one cycle");
        check((n_kpd - k0) == ((r == 0 || r == 2) ? 1 : 0), "upd_kpd after Kp/Kd write only");
        check((n_pv - p0) == ((r == 4) ? 1 : 0), "upd_pv after PV write only");
      end
    end
    // Writes are held while the calculation runs.
    busy = 1'b1;
    fork
      begin
        write(REG_SP, 1'b1, 32'h0000_1234, cyc);
      end
      begin
        repeat (8) @(negedge clk);
        check(rb1.sp != 16'h1234 || cyc != 0, "SP not written while busy");
        busy = 1'b0;
      end
    join
    check(cyc >= 8, $sformatf("held write waits for busy to fall (waited %0d)", cyc));
    check(rb1.sp == 16'h1234, "held write completes afterwards");
    // Read-only offset: acknowledged at once even while busy, changes nothing.
    busy = 1'b1;
    v = rb1.kp;
    write(REG_UN, 1'b1, 32'hdead_beef, cyc);
    check(cyc == 1, "write to read-only offset acknowledged");
    check(rb1.kp == v && rb1.sp == 16'h1234, "write to read-only offset ignored");
    busy = 1'b0;
    // Outside the window: no acknowledge.
    write(REG_KP, 1'b0, 32'h0000_5555, cyc);
    check(cyc == 50 && rb1.kp == v, "address miss never acknowledged");
    // Reset clears.
    @(negedge clk); rst = 1'b1; @(negedge clk); rst = 1'b0;
    check(rb1 == '0, "reset clears again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

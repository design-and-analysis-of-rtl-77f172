// tb_pid_addr_check: self-checking test of the register-window address decode.
// Uses a non-zero base address and checks hit, register index, valid and write permission
// for every offset in the window and for addresses just outside it and far away.
module tb_pid_addr_check;
  import pid_pkg::*;
  localparam logic [15:0] BASE = 16'h1240;
  logic [15:0] addr;
  logic        hit, valid, wr_ok;
  reg_idx_e    idx;
  int checks = 0, failures = 0;

  pid_addr_check #(.BASE_ADDR(BASE)) dut (.addr(addr), .hit(hit), .idx(idx), .valid(valid),
                                          .wr_ok(wr_ok));

  task automatic check_addr(input logic [15:0] ad);
    logic       e_hit, e_valid, e_wr;
    logic [3:0] e_idx;
    addr = ad;
    #1;
    e_hit   = (ad >= BASE) && (ad < BASE + 16'd64);
    e_idx   = 4'((ad - BASE) >> 2);
    e_valid = e_hit && (e_idx <= 4'd10);
    e_wr    = e_hit && (e_idx <= 4'd4);
    checks++;
    if (hit !== e_hit || valid !== e_valid || wr_ok !== e_wr || (e_hit && idx !== e_idx)) begin
      failures++;
      if (failures < 10)
        $display("FAIL addr=%h: hit=%b idx=%0d valid=%b wr_ok=%b", ad, hit, idx, valid, wr_ok);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 64; o++) check_addr(BASE + 16'(o));
    check_addr(BASE - 16'd1);
    check_addr(BASE + 16'd64);
    check_addr(16'h0000);
    check_addr(16'hffff);
    for (int i = 0; i < 500; i++) check_addr(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

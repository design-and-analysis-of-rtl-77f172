// tb_pid_wb_read: self-checking test of the read multiplexer, acknowledge and u(n) output.
// Loads random values into both register blocks and reads every offset of the window,
// checking the (sign- or zero-extended) data, that the acknowledge comes one cycle after the
// strobe and lasts one cycle, that a miss is never acknowledged, that the write acknowledge
// passes to o_wb_ack, and that o_un / o_valid follow u(n) and its valid flag one cycle later.
module tb_pid_wb_read;
  import pid_pkg::*;
  localparam int unsigned DW = 32;
  logic          clk = 1'b0, rst = 1'b1;
  logic          rd = 1'b0, hit = 1'b0, valid = 1'b0, un_valid = 1'b0, wr_ack = 1'b0;
  reg_idx_e      idx = REG_KP;
  regblk1_t      rb1 = '0;
  regblk2_t      rb2 = '0;
  logic          o_wb_ack, o_valid;
  logic [DW-1:0] o_wb_data;
  acc_t          o_un;
  int checks = 0, failures = 0;

  pid_wb_read #(.DW(DW)) dut (.clk(clk), .rst(rst), .rd(rd), .hit(hit), .idx(idx),
                              .valid(valid), .rb1(rb1), .rb2(rb2), .un_valid(un_valid),
                              .wr_ack(wr_ack), .o_wb_ack(o_wb_ack), .o_wb_data(o_wb_data),
                              .o_un(o_un), .o_valid(o_valid));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [DW-1:0] expect_data(input int r);
    unique case (r)
      0:  return DW'(longint'(rb1.kp));
      1:  return DW'(longint'(rb1.ki));
      2:  return DW'(longint'(rb1.kd));
      3:  return DW'(longint'(rb1.sp));
      4:  return DW'(longint'(rb1.pv));
      5:  return DW'(longint'(rb2.kpd));
      6:  return DW'(longint'(rb2.err0));
      7:  return DW'(longint'(rb2.err1));
      8:  return DW'(rb2.un);
      9:  return DW'(rb2.sigma);
      10: return {{(DW-5){1'b0}}, rb2.of};
      default: return '0;
    endcase
  endfunction

  task automatic read(input int r, input logic in_win, output logic [DW-1:0] d,
                      output int cycles);
    @(negedge clk);
    rd = 1'b1; hit = in_win; idx = reg_idx_e'(r); valid = in_win && (r < 11);
    cycles = 0;
    do begin
      @(negedge clk);
      cycles++;
    end while (!o_wb_ack && cycles < 20);
    d = o_wb_data;
    // keep the strobe one more cycle: a held strobe must not be acknowledged twice
    @(negedge clk);
    check(!o_wb_ack, "acknowledge lasts one cycle");
    rd = 1'b0; hit = 1'b0; valid = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] d;
    int cyc;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int rep = 0; rep < 30; rep++) begin
      rb1 = regblk1_t'({$urandom, $urandom, $urandom});
      rb2 = regblk2_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      for (int r = 0; r < 16; r++) begin
        read(r, 1'b1, d, cyc);
        check(cyc == 1, $sformatf("read ack after 1 cycle (got %0d)", cyc));
        check(d == expect_data(r), $sformatf("offset %0d reads %h want %h", r, d,
                                             expect_data(r)));
      end
    end
    read(0, 1'b0, d, cyc);
    check(cyc == 20, "miss is not acknowledged");
    // write acknowledge passes through
    @(negedge clk); wr_ack = 1'b1; #1;
    check(o_wb_ack, "write acknowledge reaches o_wb_ack");
    @(negedge clk); wr_ack = 1'b0; #1;
    check(!o_wb_ack, "no acknowledge without a transfer");
    // u(n) output drive
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      rb2.un = acc_t'($urandom); un_valid = 1'($urandom);
      @(negedge clk);
      check(o_un == rb2.un && o_valid == un_valid, "o_un / o_valid follow one cycle later");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pid_top_dw64: the PID controller with a 64-bit Wishbone data bus.
// Programs the gains, writes a few process values and checks u(n), sigma and the 16-bit
// registers as read over the wide bus (sign-extended to 64 bits), against the controller
// equations worked out here.
module tb_pid_top_dw64;
  logic        clk = 1'b0, rst = 1'b1;
  logic        cyc = 1'b0, stb = 1'b0, we = 1'b0;
  logic [15:0] adr = '0;
  logic [63:0] wdat = '0, rdat;
  logic        ack, o_valid;
  logic [31:0] o_un;
  int checks = 0, failures = 0;

  pid_top #(.DW(64), .BASE_ADDR(16'h0100)) dut (
    .i_clk(clk), .i_rst(rst), .i_wb_cyc(cyc), .i_wb_stb(stb), .i_wb_we(we), .i_wb_addr(adr),
    .i_wb_data(wdat), .o_wb_ack(ack), .o_wb_data(rdat), .o_un(o_un), .o_valid(o_valid));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic access(input logic w, input int idx, input logic [63:0] d,
                        output logic [63:0] q);
    int n = 0;
    @(negedge clk);
    cyc = 1'b1; stb = 1'b1; we = w; adr = 16'h0100 + 16'(idx * 4); wdat = d;
    do begin @(negedge clk); n++; end while (!ack && n < 40);
    q = rdat;
    cyc = 1'b0; stb = 1'b0; we = 1'b0;
    check(n < 40, "access acknowledged");
    // wait until the controller is idle and u(n) valid again
    if (w && idx == 4) repeat (10) @(negedge clk);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] q;
    automatic longint sigma = 0, e0 = 0, e1 = 0, un;
    automatic longint kp = -300, ki = 45, kd = 1000, sp = -2000;
    automatic longint pvs [4] = '{-100, 5000, -2000, 7};
    repeat (3) @(negedge clk);
    rst = 1'b0;
    access(1, 0, 64'(kp), q);
    access(1, 1, 64'(ki), q);
    access(1, 2, 64'(kd), q);
    access(1, 3, 64'(sp), q);
    foreach (pvs[i]) begin
      access(1, 4, 64'(pvs[i]), q);
      e1 = e0; e0 = sp - pvs[i];
      sigma += ki * e0;
      un = (kp + kd) * e0 + sigma - kd * e1;
      check(o_valid && longint'(signed'(o_un)) == un, $sformatf("o_un %0d want %0d",
                                                             signed'(o_un), un));
      access(0, 8, '0, q);
      check(longint'(q) == un, $sformatf("u(n) reads %h want %0d", q, un));
      access(0, 9, '0, q);
      check(longint'(q) == sigma, $sformatf("sigma reads %h want %0d", q, sigma));
      access(0, 6, '0, q);
      check(longint'(q) == e0, $sformatf("e(n) reads %h want %0d", q, e0));
    end
    access(0, 0, '0, q);
    check(longint'(q) == kp, "negative Kp sign-extended to 64 bits");
    access(0, 5, '0, q);
    check(longint'(q) == kp + kd, "Kpd");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_han_carlson_adder: self-checking test of the 32-bit Han-Carlson adder.
// Compares sum, carry out and signed overflow with a 33-bit behavioural sum over corner
// cases (all-ones, sign boundaries, carry through every position) and random operands.
module tb_han_carlson_adder;
  localparam int unsigned W = 32;
  logic [W-1:0] a, b, sum;
  logic         cin, cout, ovf;
  int checks = 0, failures = 0;

  han_carlson_adder #(.W(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .ovf(ovf));

  task automatic check_one(input logic [W-1:0] x, input logic [W-1:0] y, input logic c);
    logic [W:0] ref_s;
    logic       ref_o;
    a = x; b = y; cin = c;
    #1;
    ref_s = {1'b0, x} + {1'b0, y} + (W+1)'(c);
    ref_o = (x[W-1] == y[W-1]) && (ref_s[W-1] != x[W-1]);
    checks++;
    if (sum !== ref_s[W-1:0] || cout !== ref_s[W] || ovf !== ref_o) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h cin=%b: sum=%h cout=%b ovf=%b, want %h %b %b",
                 x, y, c, sum, cout, ovf, ref_s[W-1:0], ref_s[W], ref_o);
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
    check_one('1, '0, 1'b1);
    check_one('1, '1, 1'b1);
    check_one(32'h7fff_ffff, 32'h0000_0001, 1'b0);
    check_one(32'h8000_0000, 32'h8000_0000, 1'b0);
    check_one(32'h8000_0000, 32'hffff_ffff, 1'b0);
    for (int i = 0; i < W; i++) begin
      check_one(W'(1) << i, (W'(1) << i) - 1, 1'b1);       // ripple through low bits
      check_one(~(W'(0)) >> i, W'(1), 1'b0);
    end
    for (int i = 0; i < 5000; i++) check_one($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

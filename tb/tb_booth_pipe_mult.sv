// tb_booth_pipe_mult: self-checking test of the two-stage pipelined Booth multiplier.
// Streams one operand pair per cycle (with gaps), and checks that every product comes out
// exactly two clock edges after its operands, with out_valid, and equals the signed product.
// Corner cases include -32768 * -32768 and multiplication by 0, 1 and -1.
module tb_booth_pipe_mult;
  localparam int unsigned W = 16;
  localparam int unsigned LAT = 2;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, out_valid;
  logic signed [W-1:0]   md = '0, mr = '0;
  logic signed [2*W-1:0] product;
  int checks = 0, failures = 0;

  booth_pipe_mult #(.W(W)) dut (.clk(clk), .rst(rst), .in_valid(in_valid), .md(md), .mr(mr),
                                .out_valid(out_valid), .product(product));

  always #5 clk = ~clk;

  // Expected results: index k was issued k+1 negedges ago; index LAT-1 is due now.
  logic                  exp_v [0:LAT-1];
  logic signed [2*W-1:0] exp_p [0:LAT-1];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [W-1:0] pick(input int k);
    unique case (k % 8)
      0: return -16'sd32768;
      1: return 16'sd32767;
      2: return 16'sd0;
      3: return 16'sd1;
      4: return -16'sd1;
      default: return W'($urandom);
    endcase
  endfunction

  initial begin
    for (int i = 0; i < LAT; i++) begin exp_v[i] = 1'b0; exp_p[i] = '0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // check the product due now (issued LAT cycles ago)
      checks++;
      if (out_valid !== exp_v[LAT-1] || (exp_v[LAT-1] && product !== exp_p[LAT-1])) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d out_valid=%b product=%0d, want %b %0d",
                   n, out_valid, product, exp_v[LAT-1], exp_p[LAT-1]);
      end
      // next operands
      in_valid = (n % 7) != 6;
      md = (n < 64) ? pick(n) : W'($urandom);
      mr = (n < 64) ? pick(n / 8) : W'($urandom);
      for (int i = LAT-1; i > 0; i--) begin exp_v[i] = exp_v[i-1]; exp_p[i] = exp_p[i-1]; end
      exp_v[0] = in_valid;
      exp_p[0] = (2*W)'(md) * (2*W)'(mr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

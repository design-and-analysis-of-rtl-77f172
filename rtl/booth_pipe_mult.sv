// booth_pipe_mult: pipelined radix-2 Booth multiplier, W x W signed -> 2W signed.
//
// Booth recoding looks at each multiplier bit together with the bit below it (a 0 below bit 0):
// 00 and 11 add nothing, 01 adds the multiplicand shifted to that position and 10 subtracts it.
// The W recoded partial products are summed in two pipeline stages, each behind a latch, as
// in the latch / stage 1 / latch / stage 2 chain of the design: the input latch captures the
// operands, stage 1 adds the partial products of the low half of the multiplier, the second
// latch holds that partial sum with the operands, and stage 2 adds the high half.
//
// Interface: md (multiplicand), mr (multiplier) and in_valid are captured on every rising
// clock edge; product and out_valid come out of stage 2 combinationally. Latency: operands
// presented in cycle t give the product in cycle t+2 (two clock edges); one new multiplication
// can start every cycle. rst is synchronous and clears the valid bits. The two-stage split
// follows the latch / stage / latch / stage pipeline of the design description; where the
// stage boundary falls is this design's choice.
module booth_pipe_mult #(
  parameter int unsigned W = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic signed [W-1:0]   md,
  input  logic signed [W-1:0]   mr,
  output logic                  out_valid,
  output logic signed [2*W-1:0] product
);

  localparam int unsigned H = W / 2;   // Booth digits handled by stage 1

  // Booth partial product of digit i: +/- md << i, or 0.
  function automatic logic signed [2*W-1:0] booth_pp(input logic signed [W-1:0] m,
                                                      input logic [W:0] r_ext,
                                                      input int unsigned i);
    logic signed [2*W-1:0] m_ext;
    m_ext = (2*W)'(m);
    unique case ({r_ext[i+1], r_ext[i]})
      2'b01:   return m_ext <<< i;
      2'b10:   return -(m_ext <<< i);
      default: return '0;
    endcase
  endfunction

  // Input latch
  logic                  v1;
  logic signed [W-1:0]   md1, mr1;
  always_ff @(posedge clk) begin
    if (rst) v1 <= 1'b0;
    else     v1 <= in_valid;
    md1 <= md;
    mr1 <= mr;
  end

  // Stage 1: low-half Booth digits
  logic signed [2*W-1:0] s1;
  always_comb begin
    s1 = '0;
    for (int unsigned i = 0; i < H; i++) s1 += booth_pp(md1, {mr1, 1'b0}, i);
  end

  // Second latch
  logic                  v2;
  logic signed [W-1:0]   md2, mr2;
  logic signed [2*W-1:0] s1_q;
  always_ff @(posedge clk) begin
    if (rst) v2 <= 1'b0;
    else     v2 <= v1;
    md2  <= md1;
    mr2  <= mr1;
    s1_q <= s1;
  end

  // Stage 2: high-half Booth digits
  always_comb begin
    product = s1_q;
    for (int unsigned i = H; i < W; i++) product += booth_pp(md2, {mr2, 1'b0}, i);
  end
  assign out_valid = v2;

endmodule

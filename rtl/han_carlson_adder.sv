// han_carlson_adder: W-bit Han-Carlson parallel-prefix adder with carry in.
//
// The Han-Carlson structure mixes Kogge-Stone and Brent-Kung: the odd bit positions run a
// Kogge-Stone prefix tree (log2(W) levels, each combining (g,p) pairs that lie 1, 2, 4 ...
// positions apart), and one extra level at the end fills in the even positions from their odd
// neighbour. That halves the prefix cells of a Kogge-Stone adder at the cost of one level.
// The carry in is folded into the generate bit of position 0.
//
// Interface: a, b, cin in; sum, cout and ovf (signed two's-complement overflow) out.
// Purely combinational. The adder type follows the design description; the carry in and the
// overflow output are this design's own additions, used for subtraction and the overflow flags.
module han_carlson_adder #(
  parameter int unsigned W = 32   // power of two, at least 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout,
  output logic         ovf
);

  localparam int unsigned L = $clog2(W);

  logic [W-1:0] g0, p0;   // bitwise generate / propagate
  logic [W:0]   c;        // carry into each bit, c[W] is the carry out

  always_comb begin
    g0 = a & b;
    p0 = a ^ b;
    g0[0] = (a[0] & b[0]) | (p0[0] & cin);
  end

  // Level k (1..L) of the odd-position Kogge-Stone tree.
  for (genvar k = 0; k <= L; k++) begin : lvl
    logic [W-1:0] g, p;
    if (k == 0) begin : l0
      assign g = g0;
      assign p = p0;
    end else begin : lk
      localparam int unsigned D = 1 << (k - 1);
      for (genvar i = 0; i < W; i++) begin : bitpos
        if ((i % 2 == 1) && (i >= D)) begin : pfx
          assign g[i] = lvl[k-1].g[i] | (lvl[k-1].p[i] & lvl[k-1].g[i-D]);
          assign p[i] = lvl[k-1].p[i] & lvl[k-1].p[i-D];
        end else begin : pass
          assign g[i] = lvl[k-1].g[i];
          assign p[i] = lvl[k-1].p[i];
        end
      end
    end
  end

  // Final level: even positions take the group generate of the odd position below them.
  logic [W-1:0] gf;
  for (genvar i = 0; i < W; i++) begin : fin
    if ((i % 2 == 0) && (i >= 2)) begin : pfx
      assign gf[i] = lvl[L].g[i] | (lvl[L].p[i] & lvl[L].g[i-1]);
    end else begin : pass
      assign gf[i] = lvl[L].g[i];
    end
  end

  assign c   = {gf, cin};
  assign sum = p0 ^ c[W-1:0];
  assign cout = c[W];
  assign ovf  = c[W] ^ c[W-1];

endmodule

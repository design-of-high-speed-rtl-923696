// han_carlson_adder: W-bit parallel-prefix adder with Han-Carlson topology.
//
// Pre-processing forms g_i = a_i & b_i and p_i = a_i ^ b_i; the carry-in is
// folded into bit 0 as g_0 | (p_0 & cin), so every prefix G[i:0] is the carry
// c_i out of bit i. The prefix operator is
//   (g, p) o (g', p') = (g | p & g', p & p').
// Prefix tree (log2(W) + 1 levels):
//   level 1          odd bits combine with their even neighbour (span 2);
//   levels 2..L      Kogge-Stone on the odd bits only, distance 2^(l-1);
//   level L+1        each even bit i > 0 combines with the odd bit i-1.
// Post-processing: s_i = p_i ^ c_i-1 with c_-1 = cin. This follows the
// Han-Carlson structure (Kogge-Stone on odd positions plus one extra level).
//
// Interface: a, b, cin in; sum, cout out. Combinational.
module han_carlson_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned L = $clog2(W);

  // gl[l], pl[l]: group generate / propagate after prefix level l.
  wire [W-1:0] gl [L+2];
  wire [W-1:0] pl [L+1];

  logic [W-1:0] p0;
  assign p0 = a ^ b;

  // Level 0: pre-processing, carry-in folded into bit 0.
  assign gl[0] = (a & b) | {{(W-1){1'b0}}, p0[0] & cin};
  assign pl[0] = p0;

  // Level 1: odd bits take their even neighbour.
  for (genvar i = 0; i < W; i++) begin : g_l1
    if (i % 2 == 1) begin : g_odd
      assign gl[1][i] = gl[0][i] | (pl[0][i] & gl[0][i-1]);
      assign pl[1][i] = pl[0][i] & pl[0][i-1];
    end else begin : g_even
      assign gl[1][i] = gl[0][i];
      assign pl[1][i] = pl[0][i];
    end
  end

  // Levels 2..L: Kogge-Stone among the odd bits.
  for (genvar l = 2; l <= L; l++) begin : g_lvl
    localparam int unsigned D = 1 << (l - 1);
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i % 2 == 1 && i >= D) begin : g_op
        assign gl[l][i] = gl[l-1][i] | (pl[l-1][i] & gl[l-1][i-D]);
        assign pl[l][i] = pl[l-1][i] & pl[l-1][i-D];
      end else begin : g_pass
        assign gl[l][i] = gl[l-1][i];
        assign pl[l][i] = pl[l-1][i];
      end
    end
  end

  // Level L+1: even bits take the finished odd bit below them.
  localparam int unsigned LF = L + 1;
  for (genvar i = 0; i < W; i++) begin : g_lf
    if (i % 2 == 0 && i > 0) begin : g_op
      assign gl[LF][i] = gl[LF-1][i] | (pl[LF-1][i] & gl[LF-1][i-1]);
    end else begin : g_pass
      assign gl[LF][i] = gl[LF-1][i];
    end
  end

  initial begin
    assert (W >= 4) else $error("han_carlson_adder: W must be at least 4");
  end

  // Post-processing.
  assign sum  = p0 ^ {gl[LF][W-2:0], cin};
  assign cout = gl[LF][W-1];

endmodule

// nr4sd_multiplier: pre-encoded NR4SD multiplier, Z = X * B.
//
// X is an N-bit two's complement multiplicand. B arrives already recoded
// (b_enc, N+1 bits, layout in nr4sd_pkg), so no Booth encoder sits in the
// datapath. The product is formed in three stages:
//   1. digit signals: nr4sd_sig_gen rebuilds one+/one-/two from the two stored
//      bits of each NR4SD digit j < k-1; the top digit's {s,two,one} are used
//      as stored;
//   2. partial products: nr4sd_ppg for the NR4SD digits and mb_ppg for the
//      Modified Booth top digit, each an (N+1)-bit vector plus a carry;
//   3. addition: row j is the vector with its sign bit inverted, shifted left
//      by 2j; one more row, the correction term COR, holds the constant that
//      undoes the sign-bit inversions plus the carries cin_j at bit 2j. The
//      k+1 rows are summed by pp_adder_tree, a tree of Han-Carlson adders.
// Sign-bit inversion with a correction term follows the pre-encoded NR4SD
// multiplier; placing the carries in COR and using an HCA tree instead of a
// carry-save tree are the choices of this implementation (the HCA for the
// partial product addition is the proposed change).
//
// Interface: x, b_enc in; z (2N bits, exact two's complement product) out.
// Purely combinational, no clock or latency.
module nr4sd_multiplier
  import nr4sd_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter nr4sd_form_e FORM = NR4SD_MINUS
) (
  input  logic [N-1:0]   x,
  input  logic [N:0]     b_enc,
  output logic [2*N-1:0] z
);

  localparam int unsigned K    = N / 2;
  localparam int unsigned ROWS = K + 1;
  localparam logic [2*N-1:0] COR_CONST = cor_const(N)[2*N-1:0];

  logic [N:0]     pp  [K];
  logic [K-1:0]   cin;
  logic [2*N-1:0] rows [ROWS];

  // NR4SD digits 0 .. k-2.
  for (genvar j = 0; j < K - 1; j++) begin : g_nr
    nr4sd_sig_t sig;
    nr4sd_sig_gen #(.FORM(FORM)) u_sig (
      .n_hi (b_enc[2*j+1]),
      .n_lo (b_enc[2*j]),
      .sig  (sig)
    );
    nr4sd_ppg #(.N(N), .FORM(FORM)) u_ppg (
      .x   (x),
      .sig (sig),
      .pp  (pp[j]),
      .cin (cin[j])
    );
  end

  // Most significant digit, Modified Booth form.
  mb_ppg #(.N(N)) u_mb_ppg (
    .x   (x),
    .one (b_enc[N-2]),
    .two (b_enc[N-1]),
    .s   (b_enc[N]),
    .pp  (pp[K-1]),
    .cin (cin[K-1])
  );

  // Weighted rows with inverted sign bit.
  for (genvar j = 0; j < K; j++) begin : g_row
    logic [2*N-1:0] ext;
    assign ext     = {{(N-1){1'b0}}, ~pp[j][N], pp[j][N-1:0]};
    assign rows[j] = ext << (2 * j);
  end

  // Correction term: constant plus the carries of the partial products.
  always_comb begin
    rows[K] = COR_CONST;
    for (int j = 0; j < K; j++) rows[K][2*j] = cin[j];
  end

  pp_adder_tree #(.ROWS(ROWS), .W(2 * N)) u_tree (
    .rows (rows),
    .sum  (z)
  );

  initial begin
    assert (N >= 4 && N % 2 == 0)
      else $error("nr4sd_multiplier: N must be even and at least 4");
  end

endmodule

// nr4sd_encoder: off-line recoding of a two's complement coefficient into the
// pre-encoded NR4SD word that the multiplier reads from its coefficient ROM.
//
// The recoding is a ripple chain over the k = N/2 radix-4 digits, with c_0 = 0.
// For NR4SD_MINUS each digit j < k-1 is formed by a half adder (HA) on b_2j and
// c_2j, giving c_2j+1 = b_2j & c_2j and n+_2j = b_2j ^ c_2j, followed by a
// modified half adder (HA*) on b_2j+1 and c_2j+1 obeying
// 2*c_2j+2 - n-_2j+1 = b_2j+1 + c_2j+1, i.e. c_2j+2 = b_2j+1 | c_2j+1 and
// n-_2j+1 = b_2j+1 ^ c_2j+1. The digit is -2*n-_2j+1 + n+_2j in {-2,-1,0,+1}.
// NR4SD_PLUS swaps the two cells (HA* on the even bit, HA on the odd bit) and
// gives the digit 2*n+_2j+1 - n-_2j in {-1,0,+1,+2}.
// The most significant digit is Modified Booth encoded from b_N-1, b_N-2 and
// the incoming carry c_N-2: value -2*b_N-1 + b_N-2 + c_N-2, stored as
// {s, two, one}. The sign bit s is cleared for the zero digit (b_N-1 = b_N-2 =
// c_N-2 = 1), so that a zero digit produces neither partial product nor carry;
// that clearing is this design's own choice.
//
// Interface: b (N bits, two's complement) in, enc (N+1 bits, layout in
// nr4sd_pkg) out. Purely combinational. In the design it is evaluated on
// constant coefficients only, so synthesis folds it into ROM contents.
module nr4sd_encoder
  import nr4sd_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter nr4sd_form_e FORM = NR4SD_MINUS
) (
  input  logic [N-1:0] b,
  output logic [N:0]   enc
);

  localparam int unsigned K = N / 2;

  // c[2j] is the carry into digit j, c[2j+1] the carry between its two cells.
  logic [N-2:0] c;

  assign c[0] = 1'b0;

  for (genvar j = 0; j < K - 1; j++) begin : g_digit
    if (FORM == NR4SD_MINUS) begin : g_minus
      // HA on the even bit, HA* on the odd bit
      assign c[2*j+1]    = b[2*j] & c[2*j];
      assign enc[2*j]    = b[2*j] ^ c[2*j];        // n+_2j
      assign c[2*j+2]    = b[2*j+1] | c[2*j+1];
      assign enc[2*j+1]  = b[2*j+1] ^ c[2*j+1];    // n-_2j+1
    end else begin : g_plus
      // HA* on the even bit, HA on the odd bit
      assign c[2*j+1]    = b[2*j] | c[2*j];
      assign enc[2*j]    = b[2*j] ^ c[2*j];        // n-_2j
      assign c[2*j+2]    = b[2*j+1] & c[2*j+1];
      assign enc[2*j+1]  = b[2*j+1] ^ c[2*j+1];    // n+_2j+1
    end
  end

  // Most significant digit, Modified Booth form.
  logic msb_hi, msb_lo, msb_c;
  assign msb_hi = b[N-1];
  assign msb_lo = b[N-2];
  assign msb_c  = c[N-2];

  assign enc[N-2] = msb_lo ^ msb_c;                                   // one
  assign enc[N-1] = (msb_hi & ~msb_lo & ~msb_c) | (~msb_hi & msb_lo & msb_c); // two
  assign enc[N]   = msb_hi & ~(msb_lo & msb_c);                        // s

  initial begin
    assert (N >= 4 && N % 2 == 0)
      else $error("nr4sd_encoder: N must be even and at least 4");
  end

endmodule

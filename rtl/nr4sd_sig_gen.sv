// nr4sd_sig_gen: selection signals of one pre-encoded NR4SD digit.
//
// The ROM holds only two bits per digit; this small decoder rebuilds the
// one-hot signals that steer the partial product generator.
//   NR4SD_MINUS (n_hi = n-_2j+1, n_lo = n+_2j, digit -2*n_hi + n_lo):
//     one+ = ~n_hi & n_lo, one- = n_hi & n_lo, two- = n_hi & ~n_lo,
//     cin  = two- | one-
//   NR4SD_PLUS  (n_hi = n+_2j+1, n_lo = n-_2j, digit 2*n_hi - n_lo):
//     one+ = n_hi & n_lo, one- = ~n_hi & n_lo, two+ = n_hi & ~n_lo,
//     cin  = one-
// These equations follow the NR4SD encoding tables. Combinational.
module nr4sd_sig_gen
  import nr4sd_pkg::*;
#(
  parameter nr4sd_form_e FORM = NR4SD_MINUS
) (
  input  logic       n_hi,
  input  logic       n_lo,
  output nr4sd_sig_t sig
);

  always_comb begin
    if (FORM == NR4SD_MINUS) begin
      sig.one_p = ~n_hi &  n_lo;
      sig.one_m =  n_hi &  n_lo;
      sig.two   =  n_hi & ~n_lo;
      sig.cin   =  n_hi;          // two- | one-
    end else begin
      sig.one_p =  n_hi &  n_lo;
      sig.one_m = ~n_hi &  n_lo;
      sig.two   =  n_hi & ~n_lo;
      sig.cin   = ~n_hi &  n_lo;  // one-
    end
  end

endmodule

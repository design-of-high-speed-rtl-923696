// nr4sd_tb_pkg: reference arithmetic for the testbenches, written from the
// digit definitions and independent of the RTL.
//
// decode_digit / decode_word turn a pre-encoded word back into its integer
// value; digit_msb returns the Modified Booth top digit. All values are
// plain integers so the checks compare numbers, not bit patterns.
package nr4sd_tb_pkg;

  // Value of NR4SD digit j (j < k-1) held in enc[2j+1:2j].
  // form 0 (NR4SD-): -2*hi + lo ; form 1 (NR4SD+): 2*hi - lo.
  function automatic int decode_digit(input logic [63:0] enc, input int j, input bit form);
    int hi, lo;
    hi = int'(enc[2*j+1]);
    lo = int'(enc[2*j]);
    return form ? (2 * hi - lo) : (-2 * hi + lo);
  endfunction

  // Value of the Modified Booth top digit from {s,two,one} at enc[n:n-2].
  function automatic int digit_msb(input logic [63:0] enc, input int n);
    int mag;
    mag = enc[n-1] ? 2 : (enc[n-2] ? 1 : 0);
    return enc[n] ? -mag : mag;
  endfunction

  // True when the top digit's three bits are a legal combination.
  function automatic bit msb_legal(input logic [63:0] enc, input int n);
    if (enc[n-1] && enc[n-2]) return 1'b0;         // one and two together
    if (enc[n] && !enc[n-1] && !enc[n-2]) return 1'b0; // negative zero
    return 1'b1;
  endfunction

  function automatic longint decode_word(input logic [63:0] enc, input int n, input bit form);
    longint v, w;
    v = 0;
    w = 1;
    for (int j = 0; j < n / 2 - 1; j++) begin
      v += w * longint'(decode_digit(enc, j, form));
      w *= 4;
    end
    v += w * longint'(digit_msb(enc, n));
    return v;
  endfunction

endpackage

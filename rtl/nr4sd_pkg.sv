// nr4sd_pkg: types and constants shared by the pre-encoded NR4SD multiplier.
//
// A coefficient B of N bits (N = 2k, two's complement) is recoded into k radix-4
// digits. Digits 0..k-2 are non-redundant signed digits (NR4SD) and take two
// stored bits each; digit k-1 is a Modified Booth (MB) digit and takes three.
// The pre-encoded word therefore has N+1 bits, laid out as
//   enc[2j+1:2j] = {n_2j+1, n_2j}   for j = 0 .. k-2
//   enc[N:N-2]   = {s, two, one}    for the most significant digit
// Two digit sets are supported, chosen by nr4sd_form_e:
//   NR4SD_MINUS  digits {-2,-1,0,+1}, stored bits {n-_2j+1, n+_2j}
//   NR4SD_PLUS   digits {-1,0,+1,+2}, stored bits {n+_2j+1, n-_2j}
// The word layout and the choice of NR4SD_MINUS as the default are this
// design's own; the digit sets and stored bits follow the NR4SD definition.
package nr4sd_pkg;

  typedef enum logic {
    NR4SD_MINUS = 1'b0,
    NR4SD_PLUS  = 1'b1
  } nr4sd_form_e;

  // Selection signals of one NR4SD digit. `two` means -2 for NR4SD_MINUS and
  // +2 for NR4SD_PLUS. `cin` is the +1 that completes a negative partial
  // product formed as a ones' complement.
  typedef struct packed {
    logic one_p;
    logic one_m;
    logic two;
    logic cin;
  } nr4sd_sig_t;

  // Correction term for the sign-bit inversion used on every partial product:
  // each (N+1)-bit row has its sign bit inverted, which adds 2^N * 4^j to row
  // j; the constant below subtracts all of these modulo 2^(2N).
  function automatic logic [127:0] cor_const(input int unsigned n);
    logic [127:0] acc;
    acc = '0;
    for (int unsigned j = 0; j < n / 2; j++) acc += (128'd1 << (n + 2 * j));
    return (~acc + 128'd1) & ((128'd1 << (2 * n)) - 128'd1);
  endfunction

endpackage

// nr4sd_ppg: partial product generator for one pre-encoded NR4SD digit.
//
// Produces PP_j = d_j * X as an (N+1)-bit two's complement value split into a
// bit vector pp and a carry cin, with PP_j = pp + cin. Bit i of pp is
//   NR4SD_MINUS: (one+ & x_i) | (one- & ~x_i) | (two- & ~x_i-1)
//   NR4SD_PLUS : (one+ & x_i) | (one- & ~x_i) | (two+ &  x_i-1)
// with x_N = x_N-1 (sign extension) and x_-1 = 0. Negative digits give the
// ones' complement of |d_j|*X; cin (from nr4sd_sig_gen) adds the missing 1.
// The selection equations follow the NR4SD partial product generators; the
// bit vector / carry interface is this design's choice. Combinational.
module nr4sd_ppg
  import nr4sd_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter nr4sd_form_e FORM = NR4SD_MINUS
) (
  input  logic [N-1:0] x,
  input  nr4sd_sig_t   sig,
  output logic [N:0]   pp,
  output logic         cin
);

  logic [N:0] xe;      // X sign-extended to N+1 bits
  logic [N:0] xs;      // X shifted left by one (x_i-1), N+1 bits

  assign xe = {x[N-1], x};
  assign xs = {x, 1'b0};

  always_comb begin
    if (FORM == NR4SD_MINUS)
      pp = ({(N+1){sig.one_p}} & xe) | ({(N+1){sig.one_m}} & ~xe) | ({(N+1){sig.two}} & ~xs);
    else
      pp = ({(N+1){sig.one_p}} & xe) | ({(N+1){sig.one_m}} & ~xe) | ({(N+1){sig.two}} &  xs);
  end

  assign cin = sig.cin;

endmodule

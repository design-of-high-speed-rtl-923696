// mb_ppg: partial product generator for the most significant digit, which is
// kept in Modified Booth form with value in {-2,-1,0,+1,+2}.
//
// Bit i of the (N+1)-bit vector is (one & (x_i ^ s)) | (two & (x_i-1 ^ s)),
// with x_N = x_N-1 and x_-1 = 0, and the carry is s, so PP = pp + cin equals
// digit * X. The stored s is zero for a zero digit (see nr4sd_encoder), so a
// zero digit gives pp = 0 and no carry. Combinational.
module mb_ppg #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  input  logic         one,
  input  logic         two,
  input  logic         s,
  output logic [N:0]   pp,
  output logic         cin
);

  logic [N:0] xe;
  logic [N:0] xs;

  assign xe = {x[N-1], x};
  assign xs = {x, 1'b0};

  assign pp  = ({(N+1){one}} & (xe ^ {(N+1){s}})) | ({(N+1){two}} & (xs ^ {(N+1){s}}));
  assign cin = s;

endmodule

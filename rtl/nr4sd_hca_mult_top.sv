// nr4sd_hca_mult_top: pre-encoded NR4SD multiplier with Han-Carlson partial
// product addition, fed from a ROM of pre-encoded coefficients.
//
// This is the arrangement of a fixed-coefficient DSP datapath: the
// coefficients are recoded off-line into NR4SD form (N+1 bits each) and kept
// in coeff_rom; a sample X is multiplied by the selected coefficient in one
// combinational pass through nr4sd_multiplier. The depth and contents of the
// ROM are parameters of this design; the coefficient memory followed by the
// pre-encoded multiplier follows the proposed architecture.
//
// Interface: addr (coefficient index), x (N-bit two's complement sample) in;
// z = x * COEFFS[addr] (2N bits, two's complement) out. Combinational, no
// clock; a surrounding design registers inputs and outputs as it needs.
module nr4sd_hca_mult_top
  import nr4sd_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter nr4sd_form_e FORM  = NR4SD_MINUS,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter logic signed [N-1:0] COEFFS [DEPTH] = '{
    8'sd0,   8'sd1,   -8'sd1,  8'sd2,
    -8'sd2,  8'sd3,   -8'sd3,  8'sd127,
    -8'sd128, 8'sd85, -8'sd86, 8'sd37,
    -8'sd45, 8'sd100, -8'sd99, 8'sd64
  }
) (
  input  logic [AW-1:0]  addr,
  input  logic [N-1:0]   x,
  output logic [2*N-1:0] z
);

  logic [N:0] b_enc;

  coeff_rom #(.N(N), .FORM(FORM), .DEPTH(DEPTH), .AW(AW), .COEFFS(COEFFS)) u_rom (
    .addr (addr),
    .enc  (b_enc)
  );

  nr4sd_multiplier #(.N(N), .FORM(FORM)) u_mult (
    .x     (x),
    .b_enc (b_enc),
    .z     (z)
  );

endmodule

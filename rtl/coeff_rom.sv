// coeff_rom: read-only memory of pre-encoded coefficients.
//
// The coefficients are given in two's complement by the COEFFS parameter and
// recoded off-line: one nr4sd_encoder per entry is evaluated on a constant, so
// after synthesis only the encoded (N+1)-bit words remain, as a ROM. Storing
// N+1 bits per coefficient (two per NR4SD digit plus three for the Modified
// Booth top digit) follows the pre-encoded NR4SD scheme; the depth, the default
// coefficient set and the asynchronous read are this design's own choices.
//
// Interface: addr selects an entry, enc is its encoded word. The read is
// combinational (no clock, no latency).
module coeff_rom
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
  input  logic [AW-1:0] addr,
  output logic [N:0]    enc
);

  logic [N:0] rom [DEPTH];

  for (genvar e = 0; e < DEPTH; e++) begin : g_entry
    nr4sd_encoder #(.N(N), .FORM(FORM)) u_enc (
      .b   (COEFFS[e]),
      .enc (rom[e])
    );
  end

  always_comb begin
    enc = '0;
    if (32'(addr) < DEPTH) enc = rom[addr];
  end

endmodule

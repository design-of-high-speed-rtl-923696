// tb_nr4sd_sig_gen: compares the digit signal decoder with the NR4SD encoding
// tables for all four stored bit pairs of both digit sets. The expected rows
// are written out here as the digit value each pair stands for.
module tb_nr4sd_sig_gen;
  import nr4sd_pkg::*;

  int checks = 0;
  int failures = 0;

  logic n_hi, n_lo;
  nr4sd_sig_t sig_m, sig_p;

  nr4sd_sig_gen #(.FORM(NR4SD_MINUS)) u_m (.n_hi(n_hi), .n_lo(n_lo), .sig(sig_m));
  nr4sd_sig_gen #(.FORM(NR4SD_PLUS))  u_p (.n_hi(n_hi), .n_lo(n_lo), .sig(sig_p));

  // {one_p, one_m, two, cin} expected for pair {n_hi, n_lo} = 0..3
  // NR4SD-: 00 -> 0, 01 -> +1, 10 -> -2, 11 -> -1
  localparam logic [3:0] EXP_M [4] = '{4'b0000, 4'b1000, 4'b0011, 4'b0101};
  // NR4SD+: 00 -> 0, 01 -> -1, 10 -> +2, 11 -> +1
  localparam logic [3:0] EXP_P [4] = '{4'b0000, 4'b0101, 4'b0010, 4'b1000};

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {n_hi, n_lo} = 2'(v);
      #1;
      checks++;
      if (sig_m != EXP_M[v]) begin
        failures++;
        $display("FAIL NR4SD- pair %b: got %b expect %b", 2'(v), sig_m, EXP_M[v]);
      end
      checks++;
      if (sig_p != EXP_P[v]) begin
        failures++;
        $display("FAIL NR4SD+ pair %b: got %b expect %b", 2'(v), sig_p, EXP_P[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

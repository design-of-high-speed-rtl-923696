// tb_nr4sd_ppg: for every 8-bit multiplicand and every digit of both NR4SD
// digit sets, the partial product pp (as a signed N+1 bit number) plus cin
// must equal digit * X.
module tb_nr4sd_ppg;
  import nr4sd_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0] x;
  nr4sd_sig_t sig_m, sig_p;
  logic [8:0] pp_m, pp_p;
  logic       cin_m, cin_p;

  nr4sd_ppg #(.FORM(NR4SD_MINUS)) u_m (.x(x), .sig(sig_m), .pp(pp_m), .cin(cin_m));
  nr4sd_ppg #(.FORM(NR4SD_PLUS))  u_p (.x(x), .sig(sig_p), .pp(pp_p), .cin(cin_p));

  // Selection signals {one_p, one_m, two, cin} for a digit value.
  function automatic nr4sd_sig_t sel(input int d, input bit form);
    case (d)
      1:  return 4'b1000;
      -1: return 4'b0101;
      2:  return form ? 4'b0010 : 4'b0000;
      -2: return form ? 4'b0000 : 4'b0011;
      default: return 4'b0000;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = -128; xv < 128; xv++) begin
      for (int k = 0; k < 4; k++) begin
        int dm, dp;
        dm = k - 2;   // -2, -1, 0, +1
        dp = k - 1;   // -1, 0, +1, +2
        x = 8'(xv);
        sig_m = sel(dm, 1'b0);
        sig_p = sel(dp, 1'b1);
        #1;
        checks++;
        if (int'($signed(pp_m)) + int'(cin_m) != dm * xv) begin
          failures++;
          $display("FAIL NR4SD- x=%0d d=%0d pp=%h cin=%b", xv, dm, pp_m, cin_m);
        end
        checks++;
        if (int'($signed(pp_p)) + int'(cin_p) != dp * xv) begin
          failures++;
          $display("FAIL NR4SD+ x=%0d d=%0d pp=%h cin=%b", xv, dp, pp_p, cin_p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

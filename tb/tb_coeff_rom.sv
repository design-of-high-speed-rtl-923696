// tb_coeff_rom: reads every entry of the pre-encoded coefficient ROM, in both
// digit sets, decodes it with the reference in nr4sd_tb_pkg and compares it
// with the coefficient list kept here. A second instance with its own short
// list and depth checks that the contents follow the COEFFS parameter.
module tb_coeff_rom;
  import nr4sd_pkg::*;
  import nr4sd_tb_pkg::*;

  int checks = 0;
  int failures = 0;

  localparam int REF [16] = '{0, 1, -1, 2, -2, 3, -3, 127, -128, 85, -86, 37, -45, 100, -99, 64};
  localparam logic signed [7:0] SMALL [5] = '{-8'sd7, 8'sd9, -8'sd128, 8'sd126, 8'sd11};

  logic [3:0] addr;
  logic [2:0] addr5;
  logic [8:0] enc_m, enc_p, enc5;

  coeff_rom #(.FORM(NR4SD_MINUS)) u_m (.addr(addr), .enc(enc_m));
  coeff_rom #(.FORM(NR4SD_PLUS))  u_p (.addr(addr), .enc(enc_p));
  coeff_rom #(.FORM(NR4SD_PLUS), .DEPTH(5), .COEFFS(SMALL)) u_s (.addr(addr5), .enc(enc5));

  task automatic check(input logic [8:0] enc, input bit form, input int expect_v, input int a);
    longint got;
    got = decode_word(64'(enc), 8, form);
    checks++;
    if (got != longint'(expect_v) || !msb_legal(64'(enc), 8)) begin
      failures++;
      $display("FAIL addr=%0d form=%0d expect=%0d got=%0d", a, form, expect_v, got);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr5 = '0;
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a);
      #1;
      check(enc_m, 1'b0, REF[a], a);
      check(enc_p, 1'b1, REF[a], a);
    end
    for (int a = 0; a < 5; a++) begin
      addr5 = 3'(a);
      #1;
      check(enc5, 1'b1, int'(SMALL[a]), a);
    end
    // Addresses past the last entry read as zero.
    addr5 = 3'd6;
    #1;
    checks++;
    if (enc5 != '0) begin failures++; $display("FAIL out-of-range read %h", enc5); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nr4sd_encoder: exhaustive check of the off-line NR4SD recoder.
//
// For every 8-bit coefficient, in both digit sets, the encoded word is decoded
// digit by digit (reference in nr4sd_tb_pkg) and must give back the
// coefficient; every lower digit must lie in the digit set and the top digit
// must be a legal Modified Booth code. A 12-bit NR4SD- instance is checked
// exhaustively as well. Each digit value and the carry into the top digit are
// counted and must all occur.
module tb_nr4sd_encoder;
  import nr4sd_pkg::*;
  import nr4sd_tb_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0]  b8;
  logic [8:0]  enc_m, enc_p;
  logic [11:0] b12;
  logic [12:0] enc12;

  nr4sd_encoder #(.N(8),  .FORM(NR4SD_MINUS)) u_m   (.b(b8),  .enc(enc_m));
  nr4sd_encoder #(.N(8),  .FORM(NR4SD_PLUS))  u_p   (.b(b8),  .enc(enc_p));
  nr4sd_encoder #(.N(12), .FORM(NR4SD_MINUS)) u_m12 (.b(b12), .enc(enc12));

  int seen_m [-2:2];
  int seen_p [-2:2];
  int seen_msb [-2:2];

  task automatic check_word(input logic [63:0] enc, input int n, input bit form,
                            input longint expect_v);
    longint got;
    int d;
    got = decode_word(enc, n, form);
    checks++;
    if (got != expect_v) begin
      failures++;
      $display("FAIL n=%0d form=%0d b=%0d decoded=%0d enc=%h", n, form, expect_v, got, enc);
    end
    for (int j = 0; j < n / 2 - 1; j++) begin
      d = decode_digit(enc, j, form);
      checks++;
      if (form ? (d < -1 || d > 2) : (d < -2 || d > 1)) begin
        failures++;
        $display("FAIL digit %0d = %0d out of set, b=%0d", j, d, expect_v);
      end
      if (n == 8) begin
        if (form) seen_p[d]++; else seen_m[d]++;
      end
    end
    checks++;
    if (!msb_legal(enc, n)) begin
      failures++;
      $display("FAIL illegal top digit code, b=%0d enc=%h", expect_v, enc);
    end
    if (n == 8) seen_msb[digit_msb(enc, n)]++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen_m[i]) begin seen_m[i] = 0; seen_p[i] = 0; seen_msb[i] = 0; end
    for (int v = -128; v < 128; v++) begin
      b8 = 8'(v);
      #1;
      check_word(64'(enc_m), 8, 1'b0, longint'(v));
      check_word(64'(enc_p), 8, 1'b1, longint'(v));
    end
    for (int v = -2048; v < 2048; v++) begin
      b12 = 12'(v);
      #1;
      check_word(64'(enc12), 12, 1'b0, longint'(v));
    end
    // Every digit value of each set and of the top digit must have occurred.
    for (int d = -2; d <= 1; d++) begin
      checks++;
      if (seen_m[d] == 0) begin failures++; $display("FAIL NR4SD- digit %0d never seen", d); end
    end
    for (int d = -1; d <= 2; d++) begin
      checks++;
      if (seen_p[d] == 0) begin failures++; $display("FAIL NR4SD+ digit %0d never seen", d); end
    end
    for (int d = -2; d <= 2; d++) begin
      checks++;
      if (seen_msb[d] == 0) begin failures++; $display("FAIL top digit %0d never seen", d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nr4sd_multiplier: exhaustive check of the 8x8 pre-encoded multiplier in
// both digit sets (all 65,536 operand pairs each), plus 20,000 random pairs on
// a 16x16 NR4SD- instance. The coefficient is recoded by nr4sd_encoder, as it
// would be off-line; the product is compared with integer multiplication.
// Negative partial products (a carry into the correction term) and products
// of the extreme operands are counted and must occur.
module tb_nr4sd_multiplier;
  import nr4sd_pkg::*;

  int checks = 0;
  int failures = 0;
  int neg_pp = 0;
  int extreme = 0;

  logic [7:0]  x8, b8;
  logic [8:0]  enc_m, enc_p;
  logic [15:0] z_m, z_p;
  logic [15:0] x16, b16;
  logic [16:0] enc16;
  logic [31:0] z16;

  nr4sd_encoder    #(.N(8), .FORM(NR4SD_MINUS)) u_em (.b(b8), .enc(enc_m));
  nr4sd_encoder    #(.N(8), .FORM(NR4SD_PLUS))  u_ep (.b(b8), .enc(enc_p));
  nr4sd_multiplier #(.N(8), .FORM(NR4SD_MINUS)) u_mm (.x(x8), .b_enc(enc_m), .z(z_m));
  nr4sd_multiplier #(.N(8), .FORM(NR4SD_PLUS))  u_mp (.x(x8), .b_enc(enc_p), .z(z_p));

  nr4sd_encoder    #(.N(16)) u_e16 (.b(b16), .enc(enc16));
  nr4sd_multiplier #(.N(16)) u_m16 (.x(x16), .b_enc(enc16), .z(z16));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x16 = '0; b16 = '0;
    for (int xv = -128; xv < 128; xv++) begin
      for (int bv = -128; bv < 128; bv++) begin
        int e;
        x8 = 8'(xv);
        b8 = 8'(bv);
        #1;
        e = xv * bv;
        checks++;
        if (int'($signed(z_m)) != e) begin
          failures++;
          if (failures < 10) $display("FAIL NR4SD- %0d * %0d = %0d got %0d", xv, bv, e, $signed(z_m));
        end
        checks++;
        if (int'($signed(z_p)) != e) begin
          failures++;
          if (failures < 10) $display("FAIL NR4SD+ %0d * %0d = %0d got %0d", xv, bv, e, $signed(z_p));
        end
        if (enc_m[1] || enc_m[3] || enc_m[5]) neg_pp++;
        if ((xv == -128 || xv == 127) && (bv == -128 || bv == 127)) extreme++;
      end
    end
    for (int n = 0; n < 20000; n++) begin
      longint e;
      x16 = 16'($urandom);
      b16 = 16'($urandom);
      if (n < 4) begin
        x16 = (n[0]) ? 16'h8000 : 16'h7FFF;
        b16 = (n[1]) ? 16'h8000 : 16'h7FFF;
      end
      #1;
      e = longint'($signed(x16)) * longint'($signed(b16));
      checks++;
      if (longint'($signed(z16)) != e) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 %0d * %0d = %0d got %0d", $signed(x16), $signed(b16), e, $signed(z16));
      end
    end
    checks++;
    if (neg_pp == 0 || extreme != 4) begin
      failures++;
      $display("FAIL coverage: negative PPs %0d, extreme products %0d", neg_pp, extreme);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nr4sd_hca_mult_top_plus: end-to-end test of the whole design with the
// NR4SD+ digit set {-1,0,+1,+2}; otherwise the default parameters.
//
// Every ROM entry is multiplied by every 8-bit sample (4,096 products) and
// the product is compared with integer multiplication of the coefficient
// list kept here. Independently of the RTL, the testbench recodes each
// coefficient with integer arithmetic and counts, over all products, how
// often each mechanism of the design is used: each NR4SD digit value, each
// top-digit value, a carry into the top digit, a top digit that is zero
// although b_N-1 = 1 (sign cleared), and a negative partial product whose +1
// travels through the correction term. A mechanism never used counts as a
// failure. The design is combinational: each product is sampled one time
// step after the inputs change.
module tb_nr4sd_hca_mult_top_plus;

  localparam int N = 8;
  localparam int K = N / 2;
  localparam bit FORM_PLUS = 1'b1;
  localparam int COEF [16] = '{0, 1, -1, 2, -2, 3, -3, 127, -128, 85, -86, 37, -45, 100, -99, 64};

  int checks = 0;
  int failures = 0;

  int nr_digit [-2:2];
  int top_digit [-2:2];
  int carry_into_top = 0;
  int sign_cleared = 0;
  int neg_pp = 0;

  logic [3:0]     addr;
  logic [N-1:0]   x;
  logic [2*N-1:0] z;

  nr4sd_hca_mult_top #(.FORM(nr4sd_pkg::NR4SD_PLUS)) dut (.addr(addr), .x(x), .z(z));

  // Integer recoding of a coefficient: lower digits in the non-redundant set,
  // top digit what remains. Updates the mechanism counters.
  task automatic count_mechanisms(input int bv);
    int v, m, d, top, any_neg;
    v = bv;
    any_neg = 0;
    for (int j = 0; j < K - 1; j++) begin
      m = v & 3;
      if (FORM_PLUS) d = (m == 3) ? -1 : m;
      else           d = (m >= 2) ? m - 4 : m;
      v = (v - d) / 4;
      nr_digit[d]++;
      if (d < 0) any_neg = 1;
    end
    top = v;
    top_digit[top]++;
    // top = -2*b_N-1 + b_N-2 + c_N-2
    if (top - (-2 * ((bv >> (N - 1)) & 1) + ((bv >> (N - 2)) & 1)) == 1) carry_into_top++;
    if (top == 0 && ((bv >> (N - 1)) & 1) == 1) sign_cleared++;
    if (top < 0) any_neg = 1;
    if (any_neg != 0) neg_pp++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (nr_digit[i]) begin nr_digit[i] = 0; top_digit[i] = 0; end
    for (int a = 0; a < 16; a++) begin
      for (int xv = -(1 << (N - 1)); xv < (1 << (N - 1)); xv++) begin
        addr = 4'(a);
        x    = N'(xv);
        #1;
        checks++;
        if (int'($signed(z)) != xv * COEF[a]) begin
          failures++;
          if (failures < 10) $display("FAIL addr=%0d: %0d * %0d = %0d, got %0d",
                                      a, xv, COEF[a], xv * COEF[a], $signed(z));
        end
        count_mechanisms(COEF[a]);
      end
    end
    $display("NR4SD digits  -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d",
             nr_digit[-2], nr_digit[-1], nr_digit[0], nr_digit[1], nr_digit[2]);
    $display("top digits    -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d",
             top_digit[-2], top_digit[-1], top_digit[0], top_digit[1], top_digit[2]);
    $display("carry into top digit:%0d  sign cleared:%0d  negative PPs:%0d",
             carry_into_top, sign_cleared, neg_pp);
    for (int d = -2; d <= 2; d++) begin
      if (FORM_PLUS ? (d >= -1) : (d <= 1)) begin
        checks++;
        if (nr_digit[d] == 0) begin failures++; $display("FAIL NR4SD digit %0d never used", d); end
      end
      checks++;
      if (top_digit[d] == 0) begin failures++; $display("FAIL top digit %0d never used", d); end
    end
    checks++;
    if (carry_into_top == 0 || sign_cleared == 0 || neg_pp == 0) begin
      failures++;
      $display("FAIL a mechanism was never used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

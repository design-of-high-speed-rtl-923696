// tb_mb_ppg: for every 8-bit multiplicand and every Modified Booth digit
// -2..+2, the partial product pp (signed, N+1 bits) plus cin must equal
// digit * X. A 6-bit instance is checked the same way.
module tb_mb_ppg;

  int checks = 0;
  int failures = 0;

  logic [7:0] x;
  logic [5:0] x6;
  logic one, two, s;
  logic [8:0] pp;
  logic [6:0] pp6;
  logic cin, cin6;

  mb_ppg #(.N(8)) u_8 (.x(x),  .one(one), .two(two), .s(s), .pp(pp),  .cin(cin));
  mb_ppg #(.N(6)) u_6 (.x(x6), .one(one), .two(two), .s(s), .pp(pp6), .cin(cin6));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = -128; xv < 128; xv++) begin
      for (int d = -2; d <= 2; d++) begin
        x   = 8'(xv);
        x6  = 6'(xv);
        one = (d == 1 || d == -1);
        two = (d == 2 || d == -2);
        s   = (d < 0);
        #1;
        checks++;
        if (int'($signed(pp)) + int'(cin) != d * xv) begin
          failures++;
          $display("FAIL x=%0d d=%0d pp=%h cin=%b", xv, d, pp, cin);
        end
        if (xv >= -32 && xv < 32) begin
          checks++;
          if (int'($signed(pp6)) + int'(cin6) != d * xv) begin
            failures++;
            $display("FAIL N=6 x=%0d d=%0d pp=%h cin=%b", xv, d, pp6, cin6);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

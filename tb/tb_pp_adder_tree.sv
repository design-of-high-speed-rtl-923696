// tb_pp_adder_tree: sums of 5 rows of 16 bits (the 8-bit multiplier's shape)
// and of 3 rows of 10 bits are compared with integer sums modulo 2^W on
// random and all-ones operands.
module tb_pp_adder_tree;

  int checks = 0;
  int failures = 0;

  logic [15:0] r5 [5];
  logic [15:0] s5;
  logic [9:0]  r3 [3];
  logic [9:0]  s3;

  pp_adder_tree #(.ROWS(5), .W(16)) u_5 (.rows(r5), .sum(s5));
  pp_adder_tree #(.ROWS(3), .W(10)) u_3 (.rows(r3), .sum(s3));

  task automatic check;
    logic [15:0] e5;
    logic [9:0]  e3;
    e5 = '0;
    e3 = '0;
    foreach (r5[i]) e5 += r5[i];
    foreach (r3[i]) e3 += r3[i];
    checks++;
    if (s5 != e5) begin failures++; $display("FAIL 5 rows: got %h expect %h", s5, e5); end
    checks++;
    if (s3 != e3) begin failures++; $display("FAIL 3 rows: got %h expect %h", s3, e3); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (r5[i]) r5[i] = 16'hFFFF;
    foreach (r3[i]) r3[i] = 10'h3FF;
    #1;
    check();
    for (int n = 0; n < 20000; n++) begin
      foreach (r5[i]) r5[i] = 16'($urandom);
      foreach (r3[i]) r3[i] = 10'($urandom);
      #1;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

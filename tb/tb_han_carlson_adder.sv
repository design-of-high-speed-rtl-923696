// tb_han_carlson_adder: the 16-bit adder is checked on long carry chains and
// 50,000 random operand pairs with both carry-in values; an 8-bit instance
// is checked exhaustively and a 13-bit one (width not a power of two) at
// random. Sum and carry-out are compared with integer addition. The number of
// additions whose carry ran through the whole word is counted and must be
// non-zero.
module tb_han_carlson_adder;

  int checks = 0;
  int failures = 0;
  int full_chain = 0;

  logic [15:0] a16, b16, s16;
  logic [7:0]  a8, b8, s8;
  logic [12:0] a13, b13, s13;
  logic        cin, co16, co8, co13;

  han_carlson_adder #(.W(16)) u_16 (.a(a16), .b(b16), .cin(cin), .sum(s16), .cout(co16));
  han_carlson_adder #(.W(8))  u_8  (.a(a8),  .b(b8),  .cin(cin), .sum(s8),  .cout(co8));
  han_carlson_adder #(.W(13)) u_13 (.a(a13), .b(b13), .cin(cin), .sum(s13), .cout(co13));

  task automatic check16;
    logic [16:0] e;
    e = 17'(a16) + 17'(b16) + 17'(cin);
    checks++;
    if ({co16, s16} != e) begin
      failures++;
      $display("FAIL W=16 %h + %h + %b = %h, got %h", a16, b16, cin, e, {co16, s16});
    end
    if ((a16 ^ b16) == 16'hFFFF && cin) full_chain++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0; a13 = '0; b13 = '0;
    // Directed: carry rippling through every position.
    for (int i = 0; i < 16; i++) begin
      a16 = 16'hFFFF >> i; b16 = 16'd0; cin = 1'b1; #1; check16();
      a16 = 16'h5555;      b16 = 16'hAAAA; cin = 1'b1; #1; check16();
      a16 = 16'(1 << i);   b16 = 16'hFFFF; cin = 1'b0; #1; check16();
    end
    // Random.
    for (int n = 0; n < 50000; n++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); cin = 1'($urandom);
      a13 = 13'($urandom); b13 = 13'($urandom);
      #1;
      check16();
      checks++;
      if ({co13, s13} != 14'(a13) + 14'(b13) + 14'(cin)) begin
        failures++;
        $display("FAIL W=13 %h + %h + %b got %h", a13, b13, cin, {co13, s13});
      end
    end
    // Exhaustive 8-bit.
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(i); b8 = 8'(j); cin = 1'(c);
          #1;
          checks++;
          if ({co8, s8} != 9'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL W=8 %0d + %0d + %0d got %0d", i, j, c, {co8, s8});
          end
        end
      end
    end
    checks++;
    if (full_chain == 0) begin failures++; $display("FAIL full carry chain never exercised"); end
    $display("full-length carry chains: %0d", full_chain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_add_n: checks the ripple-carry adder at 8 and 11 bits against integer addition,
// on random operands plus the all-ones carry-propagation corner.
module tb_add_n;
  int checks = 0, failures = 0;
  logic [7:0]  a8, b8, s8;
  logic [10:0] a11, b11, s11;
  logic        ci8, co8, ci11, co11;

  add_n #(.N(8))  u8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  add_n #(.N(11)) u11 (.a(a11), .b(b11), .cin(ci11), .sum(s11), .cout(co11));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int unsigned e8, e11;
      a8 = 8'($urandom); b8 = 8'($urandom); ci8 = 1'($urandom);
      a11 = 11'($urandom); b11 = 11'($urandom); ci11 = 1'($urandom);
      if (n == 0) begin a8 = 8'hff; b8 = 8'h00; ci8 = 1; a11 = 11'h7ff; b11 = 11'h7ff; ci11 = 1; end
      #1;
      e8  = int'(a8) + int'(b8) + int'(ci8);
      e11 = int'(a11) + int'(b11) + int'(ci11);
      checks++;
      if ({co8, s8} != 9'(e8)) begin
        failures++;
        $display("FAIL 8-bit %0d+%0d+%0d got %0d", a8, b8, ci8, {co8, s8});
      end
      checks++;
      if ({co11, s11} != 12'(e11)) begin
        failures++;
        $display("FAIL 11-bit %0d+%0d+%0d got %0d", a11, b11, ci11, {co11, s11});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

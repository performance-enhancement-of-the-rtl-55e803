// tb_rca -- self-checking test of the ripple-carry adder at both widths the
// multipliers use. The 4-bit instance (the default width) is tested exhaustively (all a, b, cin);
// the 8-bit instance likewise (2^17 cases). The reference is the integer sum.
module tb_rca;
  logic [3:0] a4, b4, s4;
  logic [7:0] a8, b8, s8;
  logic       cin4, cout4, cin8, cout8;
  int checks = 0, failures = 0;

  rca dut4 (.a(a4), .b(b4), .cin(cin4), .s(s4), .cout(cout4));
  rca #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin(cin8), .s(s8), .cout(cout8));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 9); i++) begin
      {cin4, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({cout4, s4} !== 5'(a4) + 5'(b4) + 5'(cin4)) begin
        failures++;
        $display("FAIL4 %0d + %0d + %0d -> %0d", a4, b4, cin4, {cout4, s4});
      end
    end
    for (int i = 0; i < (1 << 17); i++) begin
      {cin8, a8, b8} = 17'(i);
      #1;
      checks++;
      if ({cout8, s8} !== 9'(a8) + 9'(b8) + 9'(cin8)) begin
        failures++;
        if (failures < 10) $display("FAIL8 %0d + %0d + %0d -> %0d", a8, b8, cin8, {cout8, s8});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

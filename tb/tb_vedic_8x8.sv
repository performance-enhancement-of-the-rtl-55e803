// tb_vedic_8x8 -- end-to-end self-checking test of the 8x8 Vedic multiplier.
//
// Runs the top at its only configuration over all 65,536 operand pairs and
// compares the 16-bit product with the integer product; the carry out must
// stay 0. It counts how often each carry of the top-level adder network
// (ca1 of the crosswise adder, ca2 of the middle adder) is raised and folded
// in by the half adder, and the same inside one 4x4 sub-multiplier, and fails
// if any of them never is. The half adder's carry must stay 0: the middle sum
// q1 + q2 + q0[7:4] is at most 225 + 225 + 14 < 512, so ca1 and ca2 are never
// set together.
module tb_vedic_8x8;
  logic [7:0]  m, n;
  logic [15:0] f;
  logic        ca3;
  int checks = 0, failures = 0;
  int n_ca1 = 0, n_ca2 = 0, n_hs = 0;
  int n_sub_ca1 = 0, n_sub_ca2 = 0, n_sub_hs = 0;

  vedic_8x8 dut (.m, .n, .f, .ca3);

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 16); i++) begin
      {m, n} = 16'(i);
      #1;
      checks += 2;
      if (f !== 16'(m) * 16'(n)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d -> %0d", m, n, f);
      end
      if (ca3 !== 1'b0) begin
        failures++;
        if (failures < 10) $display("FAIL carry out set for %0d * %0d", m, n);
      end
      if (dut.ca1) n_ca1++;
      if (dut.ca2) n_ca2++;
      if (dut.hs)  n_hs++;
      checks++;
      if (dut.hc !== 1'b0 || dut.u_mul_hh.hc !== 1'b0) begin
        failures++;
        if (failures < 10) $display("FAIL half-adder carry set for %0d * %0d", m, n);
      end
      if (dut.u_mul_hh.ca1) n_sub_ca1++;
      if (dut.u_mul_hh.ca2) n_sub_ca2++;
      if (dut.u_mul_hh.hs)  n_sub_hs++;
    end
    $display("top carries: ca1=%0d ca2=%0d half-adder sum=%0d", n_ca1, n_ca2, n_hs);
    $display("4x4 carries: ca1=%0d ca2=%0d half-adder sum=%0d", n_sub_ca1, n_sub_ca2, n_sub_hs);
    checks += 6;
    if (n_ca1 == 0)     failures++;
    if (n_ca2 == 0)     failures++;
    if (n_hs == 0)      failures++;
    if (n_sub_ca1 == 0) failures++;
    if (n_sub_ca2 == 0) failures++;
    if (n_sub_hs == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

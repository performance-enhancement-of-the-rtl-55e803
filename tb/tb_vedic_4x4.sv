// tb_vedic_4x4 -- exhaustive self-checking test of the 4x4 Vedic multiplier.
//
// For all 256 operand pairs the product is checked twice: against the integer
// product, and against a bit-by-bit evaluation of the vertically-and-crosswise
// column sums (f0 = m0n0; c1f1 = m1n0 + m0n1; ...; f7f6 = c5 + m3n3), which is
// the textbook statement of the method. The carry out must stay 0. The test
// also counts how often each carry of the adder network (ca1, ca2) reaches
// the half adder, and fails if one of them never does. The half adder's own
// carry must stay 0: ca1 and ca2 are never set together, since the middle sum
// q1 + q2 + q0[3:2] is at most 9 + 9 + 2 = 20 < 32.
module tb_vedic_4x4;
  logic [3:0] m, n;
  logic [7:0] f;
  logic       ca3;
  int checks = 0, failures = 0;
  int n_ca1 = 0, n_ca2 = 0, n_hs = 0;

  vedic_4x4 dut (.m, .n, .f, .ca3);

  // Column-sum (Urdhva-Tiryagbhyam) reference
  function automatic logic [7:0] column_product(logic [3:0] x, logic [3:0] y);
    logic [7:0] r;
    int carry, sum;
    r = '0;
    carry = 0;
    for (int col = 0; col < 7; col++) begin
      sum = carry;
      for (int i = 0; i < 4; i++)
        if (col - i >= 0 && col - i < 4) sum += int'(x[i] & y[col-i]);
      r[col] = sum[0];
      carry  = sum >> 1;
    end
    r[7] = carry[0];
    return r;
  endfunction

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {m, n} = 8'(i);
      #1;
      checks += 3;
      if (f !== 8'(m) * 8'(n)) begin
        failures++;
        $display("FAIL %0d * %0d -> %0d", m, n, f);
      end
      if (f !== column_product(m, n)) begin
        failures++;
        $display("FAIL column sums %0d * %0d -> %0d (expected %0d)", m, n, f, column_product(m, n));
      end
      if (ca3 !== 1'b0) begin
        failures++;
        $display("FAIL carry out set for %0d * %0d", m, n);
      end
      if (dut.ca1) n_ca1++;
      if (dut.ca2) n_ca2++;
      if (dut.hs)  n_hs++;
      checks++;
      if (dut.hc !== 1'b0) begin
        failures++;
        $display("FAIL half-adder carry set for %0d * %0d", m, n);
      end
    end
    $display("carry events: ca1=%0d ca2=%0d half-adder sum=%0d", n_ca1, n_ca2, n_hs);
    checks += 3;
    if (n_ca1 == 0) failures++;
    if (n_ca2 == 0) failures++;
    if (n_hs == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

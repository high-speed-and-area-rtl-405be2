// tb_hscg_carry_in_block: self-checking test of the HSCG carry-in block.
//
// All sixteen combinations of a, b, cin and cpr. Expected: sum is the low
// bit of a + b + cin (the sum follows cin only) and carry = g + p * cpr with
// g = a AND b, p = a OR b (the carry follows cpr only). With cin = cpr this
// is an ordinary full adder. Combinational: each vector is checked 1 ns
// after it is applied.
module tb_hscg_carry_in_block;
  int checks = 0, failures = 0;
  logic a, b, cin, cpr, sum, carry;

  hscg_carry_in_block dut (.a, .b, .cin, .cpr, .sum, .carry);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {cpr, cin, a, b} = 4'(v);
      #1;
      checks++;
      if (sum !== (a ^ b ^ cin) || carry !== ((a && b) || ((a || b) && cpr))) begin
        failures++;
        $display("a=%b b=%b cin=%b cpr=%b: sum=%b carry=%b", a, b, cin, cpr, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_csla_carry_out_block: self-checking test of the CSLA carry-out block.
//
// All eight combinations of a, b and cin. Expected: sum = a + b + cin
// (low bit), carry = its carry, ca_pre = a AND b whatever cin is.
// Combinational: each vector is checked 1 ns after it is applied.
module tb_csla_carry_out_block;
  int checks = 0, failures = 0;
  logic a, b, cin, sum, carry, ca_pre;

  csla_carry_out_block dut (.a, .b, .cin, .sum, .carry, .ca_pre);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {cin, a, b} = 3'(v);
      #1;
      checks++;
      if ({carry, sum} !== 2'(a + b + cin) || ca_pre !== (a && b)) begin
        failures++;
        $display("a=%b b=%b cin=%b: sum=%b carry=%b ca_pre=%b", a, b, cin, sum, carry, ca_pre);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

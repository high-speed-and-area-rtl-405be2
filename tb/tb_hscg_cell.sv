// tb_hscg_cell: self-checking test of the HSCG cell (HSCG carry-out block).
//
// Applies the eight rows of the HSCG truth table of the design
// (CIN, A, B -> SUM, CARRY, CPRE) and compares with the table as written.
// The same rows follow from SUM = A XOR B, CARRY = A AND B for CIN = 0 and
// SUM = NOT(A XOR B), CARRY = A OR B for CIN = 1, CPRE = A AND B.
// Combinational: each row is checked 1 ns after it is applied.
module tb_hscg_cell;
  int checks = 0, failures = 0;
  logic a, b, cin, sum, carry, cpre;

  hscg_cell dut (.a, .b, .cin, .sum, .carry, .cpre);

  // {cin, a, b, sum, carry, cpre}
  localparam logic [5:0] TABLE3 [8] = '{
    6'b000_000, 6'b001_100, 6'b010_100, 6'b011_011,
    6'b100_100, 6'b101_010, 6'b110_010, 6'b111_111
  };

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (TABLE3[r]) begin
      {cin, a, b} = TABLE3[r][5:3];
      #1;
      checks++;
      if ({sum, carry, cpre} !== TABLE3[r][2:0]) begin
        failures++;
        $display("row %0d: cin=%b a=%b b=%b got %b%b%b want %b", r, cin, a, b,
                 sum, carry, cpre, TABLE3[r][2:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

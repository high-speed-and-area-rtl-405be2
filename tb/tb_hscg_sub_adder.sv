// tb_hscg_sub_adder: self-checking test of the W-bit HSCG sub adder (chain of HSCG cells).
//
// Applies the six rows of the 3-bit truth table of the design (the HSCG sub
// adder must compute the same function as the CSLA one), then
// every input combination of a 3-bit and of a 4-bit instance, and random
// vectors on a 7-bit instance. Expected values come from integer addition.
// Combinational: each vector is applied and checked 1 ns later.
module tb_hscg_sub_adder;
  int checks = 0, failures = 0;

  logic [2:0] a3, b3, s3;  logic ci3, co3;
  logic [3:0] a4, b4, s4;  logic ci4, co4;
  logic [6:0] a7, b7, s7;  logic ci7, co7;

  hscg_sub_adder            dut3 (.a(a3), .b(b3), .cin(ci3), .sum(s3), .cout(co3));
  hscg_sub_adder #(.W(4))   dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));
  hscg_sub_adder #(.W(7))   dut7 (.a(a7), .b(b7), .cin(ci7), .sum(s7), .cout(co7));

  // {cin, a[2:0], b[2:0], s[2:0], cout} from the 3-bit truth table
  localparam logic [10:0] TABLE1 [6] = '{
    11'b0_001_100_101_0, 11'b0_000_110_110_0, 11'b0_111_001_000_1,
    11'b1_100_010_111_0, 11'b1_010_101_000_1, 11'b1_010_110_001_1
  };

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (TABLE1[r]) begin
      {ci3, a3, b3} = TABLE1[r][10:4];
      #1;
      checks++;
      if ({s3, co3} !== TABLE1[r][3:0]) begin
        failures++;
        $display("table row %0d: got s=%b co=%b want %b", r, s3, co3, TABLE1[r][3:0]);
      end
    end
    for (int v = 0; v < 128; v++) begin
      {ci3, a3, b3} = 7'(v);
      #1;
      checks++;
      if ({co3, s3} !== 4'(a3 + b3 + ci3)) begin
        failures++;
        $display("W=3 %b+%b+%b: got %b%b", a3, b3, ci3, co3, s3);
      end
    end
    for (int v = 0; v < 512; v++) begin
      {ci4, a4, b4} = 9'(v);
      #1;
      checks++;
      if ({co4, s4} !== 5'(a4 + b4 + ci4)) begin
        failures++;
        $display("W=4 %b+%b+%b: got %b%b", a4, b4, ci4, co4, s4);
      end
    end
    for (int v = 0; v < 2000; v++) begin
      a7 = 7'($urandom); b7 = 7'($urandom); ci7 = 1'($urandom);
      #1;
      checks++;
      if ({co7, s7} !== 8'(a7 + b7 + ci7)) begin
        failures++;
        $display("W=7 %b+%b+%b: got %b%b", a7, b7, ci7, co7, s7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

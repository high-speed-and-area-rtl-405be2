// tb_aca_top: end-to-end test of both accuracy configurable adders at their
// default size (8 bits, two 4-bit segments).
//
// Every a, b and cin is applied in accurate mode and in approximate mode,
// with the mode toggling from one vector to the next. For each vector both
// adders are compared with integer models (exact sum in accurate mode,
// carry-predicted sum of aca_ref_pkg::approx_add in approximate mode) and
// with each other. The two worked examples of the design are checked too.
// Mechanisms counted, each of which must occur: accurate mode, approximate
// mode, a mode switch, a carry crossing the segment boundary, a predicted
// carry that was right while a carry crossed, and a predicted carry that was
// wrong (approximate result differs from the exact sum). Combinational:
// each vector is checked 1 ns after it is applied.
module tb_aca_top;
  import aca_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_acc = 0, n_approx = 0, n_switch = 0, n_cross = 0, n_pred_ok = 0, n_pred_bad = 0;

  logic [7:0] a, b, sum_csla, sum_hscg;
  logic       cin, acc_mode, cout_csla, cout_hscg, last_mode;

  aca_top dut (.a, .b, .cin, .acc_mode, .sum_csla, .cout_csla, .sum_hscg, .cout_hscg);

  task automatic expect_eq(string tag, logic [8:0] got, logic [8:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20)
        $display("%s mode=%0d a=%h b=%h cin=%0d: got %h want %h", tag, acc_mode, a, b, cin, got, want);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] exact, want;
    logic       c4;

    // Worked examples in accurate mode
    a = 8'b1001_0101; b = 8'b0110_0010; cin = 1'b0; acc_mode = 1'b1;
    #1;
    expect_eq("example1 csla", {cout_csla, sum_csla}, 9'b0_1111_0111);
    expect_eq("example1 hscg", {cout_hscg, sum_hscg}, 9'b0_1111_0111);
    a = 8'b1011_1010; b = 8'b1001_0001; cin = 1'b1;
    #1;
    expect_eq("example2 csla", {cout_csla, sum_csla}, 9'd332 & 9'h1ff);
    expect_eq("example2 hscg", {cout_hscg, sum_hscg}, 9'd332 & 9'h1ff);
    last_mode = acc_mode;

    for (int v = 0; v < (1 << 17); v++) begin
      for (int m = 0; m < 2; m++) begin
        {cin, a, b} = 17'(v);
        acc_mode    = m[0];
        #1;
        exact = 9'(exact_add(64'(a), 64'(b), cin, 8));
        want  = acc_mode ? exact : 9'(approx_add(64'(a), 64'(b), cin, 8, 4));
        expect_eq("csla", {cout_csla, sum_csla}, want);
        expect_eq("hscg", {cout_hscg, sum_hscg}, want);
        expect_eq("csla vs hscg", {cout_csla, sum_csla}, {cout_hscg, sum_hscg});

        // carry into bit 4 of the exact sum
        c4 = 1'(({1'b0, a[3:0]} + {1'b0, b[3:0]} + 5'(cin)) >> 4);
        if (acc_mode) n_acc++; else n_approx++;
        if (acc_mode != last_mode) n_switch++;
        last_mode = acc_mode;
        if (c4) n_cross++;
        if (!acc_mode && c4 && want == exact) n_pred_ok++;
        if (!acc_mode && want != exact) n_pred_bad++;
      end
    end

    $display("accurate=%0d approximate=%0d mode switches=%0d boundary carries=%0d",
             n_acc, n_approx, n_switch, n_cross);
    $display("predicted carry right with a boundary carry=%0d, wrong=%0d", n_pred_ok, n_pred_bad);
    checks++;
    if (n_acc == 0 || n_approx == 0 || n_switch == 0 || n_cross == 0 ||
        n_pred_ok == 0 || n_pred_bad == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

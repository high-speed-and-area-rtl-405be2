// tb_aca_csla: self-checking test of the CSLA-based accuracy configurable
// adder.
//
// Instances: the default 8-bit adder (two 4-bit segments), 12 bits in three
// 4-bit segments, 12 bits in four 3-bit segments and 16 bits in two 8-bit
// segments. The 8-bit adder sees every a, b, cin in both modes; the others
// see random vectors. Accurate mode must give a + b + cin, approximate mode
// the carry-predicted sum of aca_ref_pkg::approx_add. The two worked
// examples of the design (0x95 + 0x62 and 0xBA + 0x91 + 1) are checked
// against integer addition. Combinational: each vector is checked 1 ns after
// it is applied.
module tb_aca_csla;
  import aca_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_mispredict = 0;

  logic [7:0]  a8, b8, s8;     logic c8, m8, co8;
  logic [11:0] a12, b12, s12;  logic c12, m12, co12;
  logic [11:0] a3s, b3s, s3s;  logic c3s, m3s, co3s;
  logic [15:0] a16, b16, s16;  logic c16, m16, co16;

  aca_csla                    dut8  (.a(a8),  .b(b8),  .cin(c8),  .acc_mode(m8),  .sum(s8),  .cout(co8));
  aca_csla #(.N(12), .L(4))   dut12 (.a(a12), .b(b12), .cin(c12), .acc_mode(m12), .sum(s12), .cout(co12));
  aca_csla #(.N(12), .L(3))   dut3s (.a(a3s), .b(b3s), .cin(c3s), .acc_mode(m3s), .sum(s3s), .cout(co3s));
  aca_csla #(.N(16), .L(8))   dut16 (.a(a16), .b(b16), .cin(c16), .acc_mode(m16), .sum(s16), .cout(co16));

  function automatic void check(string tag, longint unsigned got, longint unsigned a,
                                longint unsigned b, bit cin, bit mode, int unsigned n,
                                int unsigned l);
    longint unsigned want = mode ? exact_add(a, b, cin, n) : approx_add(a, b, cin, n, l);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20)
        $display("%s mode=%0d a=%h b=%h cin=%0d: got %h want %h", tag, mode, a, b, cin, got, want);
    end
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked examples, accurate mode, against plain addition
    a8 = 8'b1001_0101; b8 = 8'b0110_0010; c8 = 1'b0; m8 = 1'b1;
    #1;
    checks++;
    if ({co8, s8} !== 9'b0_1111_0111) begin
      failures++;
      $display("example 1: got %b %b", co8, s8);
    end
    a8 = 8'b1011_1010; b8 = 8'b1001_0001; c8 = 1'b1; m8 = 1'b1;
    #1;
    checks++;
    if ({co8, s8} !== 9'(186 + 145 + 1)) begin
      failures++;
      $display("example 2: got %b %b", co8, s8);
    end

    // Exhaustive 8-bit, both modes
    for (int v = 0; v < (1 << 18); v++) begin
      {m8, c8, a8, b8} = 18'(v);
      #1;
      check("N8L4", 64'({co8, s8}), 64'(a8), 64'(b8), c8, m8, 8, 4);
      if (!m8 && mispredicts(64'(a8), 64'(b8), c8, 8, 4)) n_mispredict++;
    end

    // Random, other configurations
    for (int v = 0; v < 20000; v++) begin
      a12 = 12'($urandom); b12 = 12'($urandom); c12 = 1'($urandom); m12 = 1'($urandom);
      a3s = 12'($urandom); b3s = 12'($urandom); c3s = 1'($urandom); m3s = 1'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom); c16 = 1'($urandom); m16 = 1'($urandom);
      #1;
      check("N12L4", 64'({co12, s12}), 64'(a12), 64'(b12), c12, m12, 12, 4);
      check("N12L3", 64'({co3s, s3s}), 64'(a3s), 64'(b3s), c3s, m3s, 12, 3);
      check("N16L8", 64'({co16, s16}), 64'(a16), 64'(b16), c16, m16, 16, 8);
    end

    // Approximate mode loses the carry into bit 4 exactly when bit 3
    // propagates (2 of the 4 a3/b3 pairs) and a[2:0] + b[2:0] + cin >= 8
    // (64 of the 128 cases, by the symmetry s -> 15 - s). Over the 2^8
    // upper-bit patterns that is 2 * 64 * 256 = 32768 vectors.
    checks++;
    if (n_mispredict != 32768) begin
      failures++;
      $display("lost-carry count %0d, want 32768", n_mispredict);
    end
    $display("approximate-mode vectors with a lost carry: %0d", n_mispredict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

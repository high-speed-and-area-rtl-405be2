// hscg_sub_adder: W-bit sub adder of the HSCG-based accuracy configurable
// adder ("sub adder new CSLA").
//
// A chain of W hscg_cell instances: each cell has already formed the sum and
// carry for both possible carry ins, and the carry of the cell below only
// drives its two select lines. The carry therefore travels through one mux
// per bit. The design names this sub adder and describes its cell; chaining
// the cells this way is this implementation's reading of how the sub adder
// is built from them.
//
// Interface: a, b (W bits), cin -> sum (W bits), cout. Combinational, no
// clock.
module hscg_sub_adder #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0]   c;     // c[i] is the carry into bit i
  logic [W-1:0] cpre;  // per-bit generate, not needed inside a sub adder

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    hscg_cell u_cell (
      .a(a[i]), .b(b[i]), .cin(c[i]),
      .sum(sum[i]), .carry(c[i+1]), .cpre(cpre[i])
    );
  end

  assign cout = c[W];
endmodule

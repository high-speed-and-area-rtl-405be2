// aca_hscg: accuracy configurable adder built from half-sum carry generation
// (HSCG) based square root carry select cells; of the two versions this is
// the faster one in the design's comparison.
//
// The N-bit adder is cut into K = N/L segments of L bits. Inside a segment
// the carry ripples as usual. At each boundary between segment j and j+1:
//  - the carry-out block at the top bit i of segment j gives the accurate
//    carry ac and the predicted carry cpre = g_i = a_i AND b_i;
//  - carry_predict_mux passes ac (acc_mode = 1) or cpre (acc_mode = 0) on
//    as the result carry rec;
//  - the carry-in block at bit i+1 (bottom bit of segment j+1) takes rec as
//    the select of both its sum and its carry mux, so in approximate mode
//    c_(i+1) = g_(i+1) + p_(i+1) * g_i and the carry chain is cut.
// The bits between the carry-in and carry-out blocks form a sub adder; the
// first segment has no carry-in block and the last no carry-out block. Cells:
// hscg_sub_adder (a chain of HSCG cells), hscg_cell as
// the carry-out block and hscg_carry_in_block (XOR, AND, OR, NOT and two
// muxes each).
//
// Accurate mode gives the exact sum. Approximate mode gives the exact sum
// unless some boundary bit i propagates (a_i XOR b_i = 1) while a carry
// arrives into it; then the segment above misses that carry.
//
// The defaults N = 8, L = 4 give the drawn layout: sub adder [2:0],
// carry-out block [3], prediction mux, carry-in block [4], sub adder [7:5].
// Generalising to any N divisible by L (L >= 3, at least two segments) and
// driving both selects of the carry-in block from rec are this
// implementation's choices. One mode input serves every boundary.
//
// Interface: a, b (N bits), cin, acc_mode -> sum (N bits), cout.
// Combinational, no clock.
module aca_hscg #(
  parameter int unsigned N = 8,
  parameter int unsigned L = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  input  logic         acc_mode,
  output logic [N-1:0] sum,
  output logic         cout
);
  localparam int unsigned K = N / L;

  if (L < 3 || N % L != 0 || K < 2) begin : g_bad_params
    $error("aca_hscg: N must be a multiple of L, L >= 3 and N >= 2*L");
  end

  // Per boundary j (between segment j and j+1), j = 0 .. K-2
  logic [K-2:0] ac;    // accurate carry out of the top bit of segment j
  logic [K-2:0] cpre;  // predicted carry of that bit
  logic [K-2:0] rec;   // result carry into segment j+1

  for (genvar j = 0; j < K; j++) begin : g_seg
    localparam int unsigned LO    = j * L;
    localparam int unsigned HI    = j * L + L - 1;
    localparam bit          FIRST = (j == 0);
    localparam bit          LAST  = (j == K - 1);
    localparam int unsigned SLO   = FIRST ? LO : LO + 1;  // sub adder bits
    localparam int unsigned SHI   = LAST ? HI : HI - 1;
    localparam int unsigned SW    = SHI - SLO + 1;

    logic sub_cin, sub_cout;

    if (FIRST) begin : g_no_cin_blk
      assign sub_cin = cin;
    end else begin : g_cin_blk
      hscg_carry_in_block u_carry_in (
        .a(a[LO]), .b(b[LO]), .cin(rec[j-1]), .cpr(rec[j-1]),
        .sum(sum[LO]), .carry(sub_cin)
      );
    end

    hscg_sub_adder #(.W(SW)) u_sub (
      .a(a[SHI:SLO]), .b(b[SHI:SLO]), .cin(sub_cin),
      .sum(sum[SHI:SLO]), .cout(sub_cout)
    );

    if (LAST) begin : g_no_cout_blk
      assign cout = sub_cout;
    end else begin : g_cout_blk
      hscg_cell u_carry_out (
        .a(a[HI]), .b(b[HI]), .cin(sub_cout),
        .sum(sum[HI]), .carry(ac[j]), .cpre(cpre[j])
      );
      carry_predict_mux u_pred (
        .cpre(cpre[j]), .ac(ac[j]), .acc_mode(acc_mode), .rec(rec[j])
      );
    end
  end
endmodule

// carry_predict_mux: the carry prediction mux between two segments of the
// accuracy configurable adder.
//
// Input 0 is the predicted carry cpre (the generate signal a AND b of the
// lower segment's most significant bit), input 1 the accurate carry ac out
// of that bit. The output rec ("result carry") is handed to the carry-in
// block of the next segment. The mux and the meaning of its two inputs
// follow the design description; naming the select acc_mode (1 = accurate)
// is this implementation's choice, made to match the 0/1 labels of the mux.
//
// In approximate mode rec does not depend on the carry chain below, which
// cuts the critical path at the segment boundary; the result is wrong only
// when the lower segment's MSB propagates (a XOR b) and a carry reaches it.
//
// Interface: cpre, ac, acc_mode -> rec. Combinational, no clock.
module carry_predict_mux (
  input  logic cpre,
  input  logic ac,
  input  logic acc_mode,
  output logic rec
);
  always_comb rec = acc_mode ? ac : cpre;
endmodule

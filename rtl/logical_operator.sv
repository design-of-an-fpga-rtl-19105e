// logical_operator: switch-pair trigger signals from the basic square waves.
//
// X1 marks the positive (X1 = 1) and negative (X1 = 0) half of the supply.
// The output-frequency wave, X2 in cyclo-inverter mode and X3 in
// cyclo-converter mode, marks the wanted output polarity. The four pairs
// are then the four AND terms of the two:
//   S1a,S4a = X1 & Xo     S2a,S3a = X1 & ~Xo
//   S2b,S3b = ~X1 & Xo    S1b,S4b = ~X1 & ~Xo
// so in each supply half one "a" pair or one "b" pair conducts and the load
// sees the polarity Xo asks for. Exactly one pair is on at any time.
//
// Interface: x1, x2, x3, mode in; trig (spmc_pkg::trig_t) out. Purely
// combinational. The switching terms are those of the published controller;
// the run-time mode input selecting between them is this design's way of
// holding both converter operations in one circuit.
module logical_operator
  import spmc_pkg::*;
(
  input  logic  x1,
  input  logic  x2,
  input  logic  x3,
  input  mode_t mode,
  output trig_t trig
);

  logic xo;  // wave at the output frequency

  always_comb begin
    xo = (mode == MODE_CYCLO_INVERTER) ? x2 : x3;
    trig.s14a =  x1 &  xo;
    trig.s23a =  x1 & ~xo;
    trig.s23b = ~x1 &  xo;
    trig.s14b = ~x1 & ~xo;
  end

endmodule

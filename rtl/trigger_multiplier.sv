// trigger_multiplier: delta modulated trigger signals for the eight gates.
//
// Each of the four switch-pair trigger signals is multiplied by the delta
// modulated pulse; for one-bit signals the product is an AND. Each product
// then drives both IGBTs of its pair: S1a and S4a, S2a and S3a, S2b and S3b,
// S1b and S4b. Since at most one pair is triggered at a time, no two gates
// of different pairs are ever on together.
//
// Interface: trig (spmc_pkg::trig_t) and dm in, gates (spmc_pkg::gates_t)
// out. Purely combinational. The multiplication follows the published
// controller; the fan-out to eight gate lines follows its switch pairing.
module trigger_multiplier
  import spmc_pkg::*;
(
  input  trig_t  trig,
  input  logic   dm,
  output gates_t gates
);

  trig_t t;

  always_comb begin
    t.s14a = trig.s14a & dm;
    t.s23a = trig.s23a & dm;
    t.s23b = trig.s23b & dm;
    t.s14b = trig.s14b & dm;

    gates.s1a = t.s14a;
    gates.s4a = t.s14a;
    gates.s2a = t.s23a;
    gates.s3a = t.s23a;
    gates.s2b = t.s23b;
    gates.s3b = t.s23b;
    gates.s1b = t.s14b;
    gates.s4b = t.s14b;
  end

endmodule

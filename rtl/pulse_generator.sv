// pulse_generator: the three basic square waves of the trigger controller.
//
// X1 runs at the supply frequency (50 Hz), X2 at Nr times it (the
// cyclo-inverter output frequency) and X3 at 1/Nr of it (the cyclo-converter
// output frequency). Each comes from its own clock counter that flips its
// output every N clocks, f = f_clk / (2N), with N = X1_HALF for X1,
// X1_HALF/Nr for X2 and X1_HALF*Nr for X3. All three start high after reset
// and, since their half periods divide one another, their edges stay
// aligned: every X1 edge is also an X2 edge, and every X3 edge is an X1 edge.
//
// Interface: clk, synchronous active-low rst_n; outputs x1, x2, x3, each a
// register. The counting scheme follows the published controller; the
// shared reset that keeps the three waves phase-aligned is this design's.
module pulse_generator #(
  parameter int unsigned X1_HALF = spmc_pkg::X1_HALF_CLKS,  // clocks per X1 half period
  parameter int unsigned NR      = spmc_pkg::NR_DEFAULT     // frequency ratio Nr
) (
  input  logic clk,
  input  logic rst_n,
  output logic x1,
  output logic x2,
  output logic x3
);

  initial begin
    assert (NR >= 1 && X1_HALF % NR == 0)
      else $error("pulse_generator: X1_HALF must be a multiple of NR");
  end

  square_wave_gen #(.HALF(X1_HALF))      u_x1 (.clk, .rst_n, .wave(x1));
  square_wave_gen #(.HALF(X1_HALF / NR)) u_x2 (.clk, .rst_n, .wave(x2));
  square_wave_gen #(.HALF(X1_HALF * NR)) u_x3 (.clk, .rst_n, .wave(x3));

endmodule

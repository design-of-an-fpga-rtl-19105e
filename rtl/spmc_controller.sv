// spmc_controller: delta modulated trigger controller for a single-phase
// matrix converter.
//
// The pulse generator makes X1 (supply frequency), X2 (Nr times it) and X3
// (1/Nr of it). The logical operator turns X1 and the wave of the selected
// output frequency into four mutually exclusive switch-pair triggers. The
// delta modulator compares a stepped sine reference with a triangular
// carrier and gives one pulse train, and the multiplier ANDs it into each
// trigger and fans the four results out to the eight IGBT gates. The gate
// lines go to the isolation and driver stage of the power circuit.
//
// Interface: clk (50 MHz), synchronous active-low rst_n, mode
// (cyclo-inverter or cyclo-converter), carrier_peak (2^n - 1 for unity
// modulation index, lower for a wider pulse); outputs gates, plus x1, x2,
// x3, carrier, v_ref, dm, carrier_step, carrier_up and ref_addr for
// observation. The gate outputs are combinational from registers and follow
// a mode change at once; the basic waves change one clock after their
// counters complete, dm one clock after a carrier step. The block structure
// follows the published controller; the run-time mode and peak inputs and
// the observation outputs are this design's choices.
module spmc_controller
  import spmc_pkg::*;
#(
  parameter int unsigned X1_HALF    = X1_HALF_CLKS,  // clocks per half period of X1
  parameter int unsigned NR         = NR_DEFAULT,    // frequency ratio Nr
  parameter int unsigned N_BITS     = CARRIER_BITS,  // carrier counter width n
  parameter int unsigned STEP_DIV   = CARRIER_DIV,   // clocks per carrier step
  parameter int unsigned SAMPLES    = SINE_SAMPLES,  // sine samples per half cycle
  parameter int unsigned SAMPLE_DIV = SINE_DIV       // clocks per sine sample
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mode_t             mode,
  input  logic [N_BITS-1:0] carrier_peak,
  output gates_t            gates,
  output logic              x1,
  output logic              x2,
  output logic              x3,
  output logic [N_BITS-1:0] carrier,
  output logic [N_BITS-1:0] v_ref,
  output logic              dm,
  output logic              carrier_step,
  output logic              carrier_up,
  output logic [$clog2(SAMPLES)-1:0] ref_addr
);

  trig_t trig;

  pulse_generator #(.X1_HALF(X1_HALF), .NR(NR)) u_pulse (
    .clk, .rst_n, .x1, .x2, .x3
  );

  logical_operator u_logic (
    .x1, .x2, .x3, .mode, .trig
  );

  delta_modulator #(
    .N_BITS(N_BITS), .STEP_DIV(STEP_DIV), .SAMPLES(SAMPLES), .SAMPLE_DIV(SAMPLE_DIV)
  ) u_dm (
    .clk, .rst_n, .carrier_peak, .dm, .carrier, .v_ref,
    .step(carrier_step), .up(carrier_up), .addr(ref_addr)
  );

  trigger_multiplier u_mult (
    .trig, .dm, .gates
  );

  // Safety rule of the bridge: gates of different switch pairs never overlap.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({gates.s1a, gates.s2a, gates.s2b, gates.s1b}))
    else $error("spmc_controller: two switch pairs triggered together");

endmodule

// delta_modulator: carrier, sine reference and pulse comparator together.
//
// The triangular carrier (carrier_gen), the stepped sine reference from the
// look-up table (sine_reference) and the comparator that samples their
// difference on every carrier step (dm_pulse_gen) form the modulator whose
// single output, dm, gates every switch-pair trigger. The carrier peak is an
// input: with the sine table scaled to 2^n - 1, the modulation index is
// (2^n - 1) / peak, so lowering the peak drives the pulse wider.
//
// Interface: clk, synchronous active-low rst_n, carrier_peak; outputs dm,
// plus carrier, v_ref, step, up (carrier direction) and addr (sine
// memory counter) for observation. dm changes on carrier steps
// only, one clock after the step pulse.
module delta_modulator #(
  parameter int unsigned N_BITS     = spmc_pkg::CARRIER_BITS,  // carrier / ROM width
  parameter int unsigned STEP_DIV   = spmc_pkg::CARRIER_DIV,   // clocks per carrier step
  parameter int unsigned SAMPLES    = spmc_pkg::SINE_SAMPLES,  // sine samples per half cycle
  parameter int unsigned SAMPLE_DIV = spmc_pkg::SINE_DIV       // clocks per sine sample
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_BITS-1:0] carrier_peak,
  output logic              dm,
  output logic [N_BITS-1:0] carrier,
  output logic [N_BITS-1:0] v_ref,
  output logic              step,
  output logic              up,
  output logic [$clog2(SAMPLES)-1:0] addr
);

  carrier_gen #(.N_BITS(N_BITS), .STEP_DIV(STEP_DIV)) u_carrier (
    .clk, .rst_n, .peak(carrier_peak), .carrier, .up, .step
  );

  sine_reference #(.DATA_BITS(N_BITS), .SAMPLES(SAMPLES), .SAMPLE_DIV(SAMPLE_DIV)) u_sine (
    .clk, .rst_n, .v_ref, .addr
  );

  dm_pulse_gen #(.N_BITS(N_BITS)) u_cmp (
    .clk, .rst_n, .sample(step), .v_ref, .carrier, .dm
  );

endmodule

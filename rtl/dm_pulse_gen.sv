// dm_pulse_gen: delta modulated pulse from reference-versus-carrier compare.
//
// The comparator is high while the sine reference lies above the triangular
// carrier. Its result is sampled into a register on every carrier step (the
// sampling instants f_c of the modulator), so the pulse changes only on
// carrier steps. Where the reference is near its crest the pulse is high
// for most of each carrier period, near zero it is low for most of it.
//
// Interface: clk, synchronous active-low rst_n, sample (one-clock pulse),
// v_ref, carrier; output dm, a register updated on the clock edge that ends
// each sample pulse. The compare-and-sample principle is the published
// controller's; the strict "greater than" and the reset value 0 are this
// design's choices.
module dm_pulse_gen #(
  parameter int unsigned N_BITS = spmc_pkg::CARRIER_BITS  // width of both operands
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sample,
  input  logic [N_BITS-1:0] v_ref,
  input  logic [N_BITS-1:0] carrier,
  output logic              dm
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dm <= 1'b0;
    end else if (sample) begin
      dm <= (v_ref > carrier);
    end
  end

endmodule

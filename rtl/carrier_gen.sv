// carrier_gen: digital triangular carrier from an n-bit up/down counter.
//
// A direction flag, temp, selects counting up (temp = 1) or down (temp = 0).
// Counting up, the flag clears when the count reaches the peak; counting
// down, it sets again when the count reaches zero. With the peak at 2^n - 1
// the count runs 0, 1, ..., 15, 14, ..., 1, 0, 1, ... for n = 4: one carrier
// period is 2*(2^n - 1) steps, f_c = f_step / (2*(2^n - 1)).
//
// The counter advances once every STEP_DIV clocks. The step pulse it
// advances on is brought out (step) so that the comparator can sample on the
// same carrier steps. With the default 833 clocks per step and peak 15 the
// carrier runs at 50 MHz / (833 * 30) = 2000.8 Hz.
//
// The peak is a run-time input. Lowering it shortens the triangle, which is
// how the modulation index is changed against a fixed sine table. If the
// peak is lowered below the count while counting up, the counter turns
// round at once; a peak of 0 holds the carrier at 0.
//
// Interface: clk, synchronous active-low rst_n, peak; outputs carrier (the
// count), up (the direction flag) and step (one-clock pulse on each step;
// carrier and up change on the clock edge that ends that pulse). The
// counter and flag follow the published controller; the step divider and
// the run-time peak input are this design's choices.
module carrier_gen #(
  parameter int unsigned N_BITS   = spmc_pkg::CARRIER_BITS,  // counter width n
  parameter int unsigned STEP_DIV = spmc_pkg::CARRIER_DIV    // clocks per carrier step, >= 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_BITS-1:0] peak,
  output logic [N_BITS-1:0] carrier,
  output logic              up,
  output logic              step
);

  localparam int unsigned DW = (STEP_DIV > 1) ? $clog2(STEP_DIV) : 1;

  logic [DW-1:0] div_count;

  // Step divider: one pulse every STEP_DIV clocks.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div_count <= '0;
    end else if (div_count == DW'(STEP_DIV - 1)) begin
      div_count <= '0;
    end else begin
      div_count <= div_count + 1'b1;
    end
  end

  assign step = (div_count == DW'(STEP_DIV - 1));

  // Up/down counter with direction flag.
  logic [N_BITS:0] next_up;
  assign next_up = {1'b0, carrier} + 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      carrier <= '0;
      up      <= 1'b1;
    end else if (step) begin
      if (up) begin
        if (carrier < peak) carrier <= carrier + 1'b1;
        else if (carrier != '0) carrier <= carrier - 1'b1;
        if (next_up >= {1'b0, peak}) up <= 1'b0;
      end else begin
        if (carrier != '0) carrier <= carrier - 1'b1;
        if (carrier <= N_BITS'(1)) up <= 1'b1;
      end
    end
  end

endmodule

// square_wave_gen: fixed-frequency square wave from a clock counter.
//
// A counter counts HALF clocks; when it has counted them it returns to zero
// and the output flips, so the output period is 2*HALF clocks and its
// frequency f_clk / (2*HALF). A flag register remembers which half is
// running. After reset the output is high, so the first HALF clocks are the
// high half; at 500000 clocks per half and 50 MHz this is the 50 Hz wave.
//
// Interface: clk, synchronous active-low rst_n, output wave. The output is a
// register and changes on the clock edge that completes a half period.
module square_wave_gen #(
  parameter int unsigned HALF = 500_000  // clocks per half period, >= 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic wave
);

  localparam int unsigned CW = (HALF > 1) ? $clog2(HALF) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count <= '0;
      wave  <= 1'b1;
    end else if (count == CW'(HALF - 1)) begin
      count <= '0;
      wave  <= ~wave;
    end else begin
      count <= count + 1'b1;
    end
  end

endmodule

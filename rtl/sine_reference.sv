// sine_reference: stepped sinusoidal reference from a look-up-table ROM.
//
// A ROM holds SAMPLES values of one half cycle of a sine wave, scaled to the
// full range of the carrier counter (0 .. 2^DATA_BITS - 1). A binary memory
// counter addresses it and advances once every SAMPLE_DIV clocks, wrapping
// after the last sample, so one half cycle is read out every
// SAMPLES * SAMPLE_DIV clocks: 32 * 15625 clocks = 10 ms at 50 MHz, which
// keeps the reference in step with the half cycles of the 50 Hz supply.
//
// ROM contents are computed at elaboration. Sample i sits at the middle of
// its interval, at angle pi*(2i+1)/(2*SAMPLES), and its value is
//   round(AMP * 16p / (5b^2 - 4p)),  a = 2i+1, b = 2*SAMPLES, p = a*(b-a),
// Bhaskara's rational approximation of AMP*sin(pi*a/b), accurate to 0.2% of
// full scale, which is far below one LSB of a 4-bit table.
//
// Interface: clk, synchronous active-low rst_n; outputs v_ref (the ROM word,
// registered) and addr (the memory counter). v_ref shows ROM[addr] one
// clock after addr changes. The ROM-plus-counter structure follows the
// published controller; the sample count and step rate are this design's.
module sine_reference #(
  parameter int unsigned DATA_BITS  = spmc_pkg::CARRIER_BITS,  // ROM word width
  parameter int unsigned SAMPLES    = spmc_pkg::SINE_SAMPLES,  // samples per half cycle, >= 2
  parameter int unsigned SAMPLE_DIV = spmc_pkg::SINE_DIV       // clocks per sample, >= 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  output logic [DATA_BITS-1:0]       v_ref,
  output logic [$clog2(SAMPLES)-1:0] addr
);

  localparam int unsigned AW  = $clog2(SAMPLES);
  localparam int unsigned DW  = (SAMPLE_DIV > 1) ? $clog2(SAMPLE_DIV) : 1;
  localparam longint      AMP = (longint'(1) << DATA_BITS) - 1;

  typedef logic [DATA_BITS-1:0] rom_t [SAMPLES];

  function automatic rom_t sine_table();
    rom_t   t;
    longint a, b, p, num, den;
    b = 2 * longint'(SAMPLES);
    for (int i = 0; i < SAMPLES; i++) begin
      a   = 2 * longint'(i) + 1;
      p   = a * (b - a);
      num = AMP * 16 * p;
      den = 5 * b * b - 4 * p;
      t[i] = DATA_BITS'((2 * num + den) / (2 * den));
    end
    return t;
  endfunction

  localparam rom_t ROM = sine_table();

  logic [DW-1:0] div_count;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div_count <= '0;
      addr      <= '0;
    end else if (div_count == DW'(SAMPLE_DIV - 1)) begin
      div_count <= '0;
      addr      <= (addr == AW'(SAMPLES - 1)) ? '0 : addr + 1'b1;
    end else begin
      div_count <= div_count + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    v_ref <= ROM[addr];
  end

endmodule

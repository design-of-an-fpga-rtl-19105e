// spmc_pkg: types and default constants shared by the delta-modulated
// single-phase matrix converter (SPMC) trigger controller.
//
// The converter bridge has four bidirectional switches S1..S4, each built
// from two IGBTs, "a" and "b", that conduct in opposite directions. The
// controller groups them into four switch pairs that are always fired
// together (S1a/S4a, S2a/S3a, S2b/S3b, S1b/S4b) and drives the eight gates.
//
// Default numbers: 50 MHz board clock, 500000 clocks per half period of the
// 50 Hz supply-synchronous signal X1, a frequency ratio Nr of 5 (250 Hz
// cyclo-inverter output, 10 Hz cyclo-converter output), a 4-bit triangular
// carrier at about 2 kHz and a sine reference half cycle every 10 ms. The
// carrier step divider and the number of sine samples per half cycle are
// this design's own choices; the rest follows the published controller.
package spmc_pkg;

  // Converter operating mode: which Table-of-switching-terms half is used.
  typedef enum logic {
    MODE_CYCLO_INVERTER  = 1'b0,  // output frequency 50*Nr Hz, uses X1 and X2
    MODE_CYCLO_CONVERTER = 1'b1   // output frequency 50/Nr Hz, uses X1 and X3
  } mode_t;

  // The four switch-pair trigger signals from the logical operator.
  typedef struct packed {
    logic s14a;  // S1a and S4a: positive supply half, positive output
    logic s23a;  // S2a and S3a: positive supply half, negative output
    logic s23b;  // S2b and S3b: negative supply half, positive output
    logic s14b;  // S1b and S4b: negative supply half, negative output
  } trig_t;

  // One gate signal per IGBT of the bridge.
  typedef struct packed {
    logic s1a;
    logic s1b;
    logic s2a;
    logic s2b;
    logic s3a;
    logic s3b;
    logic s4a;
    logic s4b;
  } gates_t;

  // Default constants.
  localparam int unsigned CLK_HZ        = 50_000_000; // board clock
  localparam int unsigned X1_HALF_CLKS  = 500_000;    // f = CLK_HZ / (2*N) = 50 Hz
  localparam int unsigned NR_DEFAULT    = 5;          // frequency ratio Nr
  localparam int unsigned CARRIER_BITS  = 4;          // up/down counter width n
  localparam int unsigned CARRIER_HZ    = 2_000;      // carrier frequency f_c
  // Clocks per carrier step: one carrier period is 2*(2^n - 1) steps,
  // so 50e6 / (2000 * 30) = 833 (f_c = 2000.8 Hz).
  localparam int unsigned CARRIER_DIV   = CLK_HZ / (CARRIER_HZ * 2 * ((1 << CARRIER_BITS) - 1));
  localparam int unsigned SINE_SAMPLES  = 32;         // ROM samples per sine half cycle
  localparam int unsigned SINE_DIV      = X1_HALF_CLKS / SINE_SAMPLES; // 15625 clocks per sample: 10 ms half cycle

endpackage

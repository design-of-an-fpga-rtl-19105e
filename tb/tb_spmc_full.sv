// tb_spmc_full: the trigger controller at its default sizes (50 MHz clock,
// X1 50 Hz, Nr = 5, 2 kHz 4-bit carrier, 32-sample sine half cycle every
// 10 ms). Every clock, all eight gate lines, the basic waves, carrier,
// reference and pulse are compared with the closed-form model.
//   Run 1: cyclo-converter mode (10 Hz output) for one full X3 period of
//          100 ms, then cyclo-inverter mode (250 Hz output) for one X1
//          period of 20 ms, then back for 10 ms.
//   Run 2: after a reset, carrier peak 12 in cyclo-inverter mode for 20 ms.
// Counted mechanisms, each of which must occur: both mode switches, every
// gate firing, carrier turning at top and bottom, sine memory counter
// wrapping, pulse rising and falling, and the lowered carrier peak.
module tb_spmc_full;
  import spmc_pkg::*;
  import spmc_ref_pkg::*;

  localparam int X1H  = X1_HALF_CLKS;
  localparam int NR   = NR_DEFAULT;
  localparam int DIV  = CARRIER_DIV;
  localparam int S    = SINE_SAMPLES;
  localparam int SDIV = SINE_DIV;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  mode_t      mode;
  logic [3:0] peak;
  gates_t     gates;
  logic       x1, x2, x3, dm, cstep, cup;
  logic [3:0] carrier, v_ref;
  logic [4:0] ref_addr;

  spmc_controller dut (
    .clk, .rst_n, .mode, .carrier_peak(peak), .gates, .x1, .x2, .x3,
    .carrier, .v_ref, .dm, .carrier_step(cstep), .carrier_up(cup), .ref_addr
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int gate_fires [8];
  int mode_switches = 0;
  int carrier_tops = 0, carrier_bottoms = 0;
  int ref_wraps = 0;
  int dm_rises = 0, dm_falls = 0;
  int low_peak_cycles = 0;

  // Run the controller for n clocks from edge count m, checking every clock.
  task automatic run(inout int m, input int n, input int pk);
    logic [7:0] prev_g;
    logic       prev_dm;
    logic [3:0] prev_car;
    logic [4:0] prev_addr;
    prev_g = gates; prev_dm = dm; prev_car = carrier; prev_addr = ref_addr;
    for (int i = 0; i < n; i++) begin
      bit ex1, ex2, ex3, edm;
      logic [3:0] t;
      logic [7:0] eg;
      @(posedge clk);
      #1 m++;
      ex1 = sq_wave(m, X1H);
      ex2 = sq_wave(m, X1H / NR);
      ex3 = sq_wave(m, X1H * NR);
      edm = dm_at(m, pk, DIV, S, SDIV, 4);
      t   = table1(mode == MODE_CYCLO_INVERTER, ex1, ex2, ex3) & {4{edm}};
      // gates order: s1a s1b s2a s2b s3a s3b s4a s4b; t = {14a, 23a, 23b, 14b}
      eg  = {t[3], t[0], t[2], t[1], t[2], t[1], t[3], t[0]};
      check({x1, x2, x3} == {ex1, ex2, ex3}, "basic waves");
      check(int'(carrier) == carrier_at(m, pk, DIV), "carrier");
      check(int'(v_ref) == vref_at(m, S, SDIV, 4), "reference");
      check(dm == edm, "delta modulated pulse");
      check(gates == eg, "gate lines");
      for (int g = 0; g < 8; g++) if (gates[g] && !prev_g[g]) gate_fires[g]++;
      if (dm && !prev_dm) dm_rises++;
      if (!dm && prev_dm) dm_falls++;
      if (carrier == 4'(pk) && prev_car != 4'(pk)) carrier_tops++;
      if (carrier == 0 && prev_car != 0) carrier_bottoms++;
      if (ref_addr == 0 && prev_addr == 5'(S - 1)) ref_wraps++;
      if (pk < 15) low_peak_cycles++;
      prev_g = gates; prev_dm = dm; prev_car = carrier; prev_addr = ref_addr;
    end
  endtask

  initial begin
    int m;
    for (int g = 0; g < 8; g++) gate_fires[g] = 0;
    mode = MODE_CYCLO_CONVERTER;
    peak = 4'd15;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    m = 0;
    // Run 1: converter for one X3 period, inverter for one X1 period, back.
    run(m, 2 * X1H * NR, 15);
    mode = MODE_CYCLO_INVERTER;
    mode_switches++;
    run(m, 2 * X1H, 15);
    mode = MODE_CYCLO_CONVERTER;
    mode_switches++;
    run(m, X1H, 15);
    // Run 2: lower carrier peak after a reset.
    @(negedge clk);
    rst_n = 1'b0;
    mode  = MODE_CYCLO_INVERTER;
    peak  = 4'd12;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    m = 0;
    run(m, 2 * X1H, 12);

    check(mode_switches == 2, "mode switched both ways");
    for (int g = 0; g < 8; g++) check(gate_fires[g] > 0, $sformatf("gate %0d fired", g));
    check(carrier_tops > 0 && carrier_bottoms > 0, "carrier turned at both ends");
    check(ref_wraps > 0, "sine memory counter wrapped");
    check(dm_rises > 0 && dm_falls > 0, "pulse rose and fell");
    check(low_peak_cycles > 0, "lowered carrier peak exercised");
    $display("mechanisms: mode_switches=%0d gate_fires=%p carrier_tops=%0d carrier_bottoms=%0d ref_wraps=%0d dm_rises=%0d dm_falls=%0d low_peak_cycles=%0d",
             mode_switches, gate_fires, carrier_tops, carrier_bottoms, ref_wraps, dm_rises, dm_falls, low_peak_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

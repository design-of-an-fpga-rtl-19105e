// tb_delta_modulator: checks carrier, sine reference and pulse together.
// A small instance (2 clocks per carrier step, 32 sine samples of 30 clocks)
// is compared on every clock with the closed-form model over two sine half
// cycles, first with carrier peak 15 (modulation index 1) and then, after a
// reset, with peak 10. The pulse must be high longer with the lower peak,
// and high longer near the sine crest than near its zero crossings.
module tb_delta_modulator;
  import spmc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  localparam int DIV  = 2;
  localparam int S    = 32;
  localparam int SDIV = 30;

  logic [3:0] peak;
  logic       dm, step, up;
  logic [3:0] carrier, v_ref;
  logic [4:0] addr;

  delta_modulator #(.N_BITS(4), .STEP_DIV(DIV), .SAMPLES(S), .SAMPLE_DIV(SDIV)) dut (
    .clk, .rst_n, .carrier_peak(peak), .dm, .carrier, .v_ref, .step, .up, .addr
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int high_total [2];
  int high_crest [2];
  int high_edge  [2];

  initial begin
    int peaks [2];
    peaks[0] = 15;
    peaks[1] = 10;
    for (int run = 0; run < 2; run++) begin
      int m;
      rst_n = 1'b0;
      peak  = 4'(peaks[run]);
      high_total[run] = 0;
      high_crest[run] = 0;
      high_edge[run]  = 0;
      repeat (3) @(posedge clk);
      #1 rst_n = 1'b1;
      m = 0;
      while (m < 2 * S * SDIV) begin
        int a;
        @(posedge clk);
        #1 m++;
        check(int'(carrier) == carrier_at(m, peaks[run], DIV), "carrier");
        check(int'(v_ref) == vref_at(m, S, SDIV, 4), "reference");
        check(dm == dm_at(m, peaks[run], DIV, S, SDIV, 4), "pulse");
        a = int'((m / SDIV) % S);
        if (dm) begin
          high_total[run]++;
          if (a >= 12 && a < 20) high_crest[run]++;
          if (a < 4 || a >= 28) high_edge[run]++;
        end
      end
      check(high_crest[run] > 2 * high_edge[run], "pulse wider near the crest");
    end
    check(high_total[1] > high_total[0], "lower peak gives wider pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

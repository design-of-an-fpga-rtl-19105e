// tb_pulse_generator: checks X1, X2 and X3 of the pulse generator.
// A small instance (20 clocks per X1 half period, Nr = 5) is compared with
// the closed-form square waves on every clock. An instance at the default
// sizes is then run for one full X3 period (5,000,000 clocks) and the
// measured half periods are checked: 500000 clocks for X1 (50 Hz at
// 50 MHz), 100000 for X2 (250 Hz) and 2500000 for X3 (10 Hz).
module tb_pulse_generator;
  import spmc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  localparam int SMALL_HALF = 20;
  localparam int SMALL_NR   = 5;

  logic sx1, sx2, sx3;
  logic dx1, dx2, dx3;

  pulse_generator #(.X1_HALF(SMALL_HALF), .NR(SMALL_NR)) u_small (
    .clk, .rst_n, .x1(sx1), .x2(sx2), .x3(sx3)
  );
  pulse_generator u_default (.clk, .rst_n, .x1(dx1), .x2(dx2), .x3(dx3));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Edge counting on the default instance.
  int m = 0;
  int last_edge [3];
  int     edges [3];
  logic   prev [3];

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(sx1 && sx2 && sx3 && dx1 && dx2 && dx3, "all waves high after reset");
    for (int i = 0; i < 3; i++) begin
      last_edge[i] = 0;
      edges[i] = 0;
    end
    prev[0] = dx1; prev[1] = dx2; prev[2] = dx3;
    while (m < 5_000_001) begin
      @(posedge clk);
      #1 m++;
      if (m <= 4 * SMALL_HALF * SMALL_NR) begin
        check(sx1 == sq_wave(m, SMALL_HALF), "small x1");
        check(sx2 == sq_wave(m, SMALL_HALF / SMALL_NR), "small x2");
        check(sx3 == sq_wave(m, SMALL_HALF * SMALL_NR), "small x3");
      end
      begin
        logic cur [3];
        int exp_half [3];
        cur[0] = dx1; cur[1] = dx2; cur[2] = dx3;
        exp_half[0] = 500_000; exp_half[1] = 100_000; exp_half[2] = 2_500_000;
        for (int i = 0; i < 3; i++) begin
          if (cur[i] != prev[i]) begin
            check(m - last_edge[i] == exp_half[i], $sformatf("default half period of x%0d", i + 1));
            last_edge[i] = m;
            edges[i]++;
          end
          prev[i] = cur[i];
        end
      end
      // At every X1 edge X2 is in step: both equal the closed-form waves.
      if (m % 500_000 == 0) begin
        check(dx1 == sq_wave(m, 500_000) && dx2 == sq_wave(m, 100_000)
              && dx3 == sq_wave(m, 2_500_000), "default waves aligned");
      end
    end
    check(edges[0] == 10, "ten X1 edges in one X3 period");
    check(edges[1] == 50, "fifty X2 edges in one X3 period");
    check(edges[2] == 2,  "two X3 edges in one X3 period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

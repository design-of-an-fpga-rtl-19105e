// tb_carrier_gen: checks the triangular carrier.
// Instance A (3 clocks per step) with peak 15 is compared on every clock
// with the closed-form triangle 0..15..0, its direction flag and its step
// pulse. Its peak is then lowered to 7 at run time (period must become 14
// steps) and to 0 (carrier must settle at 0 and stay). Instance B, at the
// default 833 clocks per step, must show a carrier period of 30 steps =
// 24990 clocks, the 2 kHz carrier at 50 MHz.
module tb_carrier_gen;
  import spmc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  localparam int DIV_A = 3;

  logic [3:0] peak_a;
  logic [3:0] car_a, car_b;
  logic       up_a, up_b, step_a, step_b;

  carrier_gen #(.N_BITS(4), .STEP_DIV(DIV_A)) u_a (
    .clk, .rst_n, .peak(peak_a), .carrier(car_a), .up(up_a), .step(step_a)
  );
  carrier_gen u_b (
    .clk, .rst_n, .peak(4'd15), .carrier(car_b), .up(up_b), .step(step_b)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int zero_a [$];
  int zero_b [$];
  logic [3:0] prev_b;
  int         reversals;

  initial begin
    peak_a = 4'd15;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    m = 0;
    prev_b = car_b;
    reversals = 0;
    check(car_a == 0 && up_a == 1'b1, "reset state");
    // Phase 1: peak 15, exact per-clock comparison, 4 carrier periods.
    while (m < 4 * 30 * DIV_A) begin
      int s;
      check(step_a == (m % DIV_A == DIV_A - 1), "step pulse");
      @(posedge clk);
      #1 m++;
      s = (m / DIV_A) % 30;
      check(int'(car_a) == tri_wave(m / DIV_A, 15), "triangle value");
      check(up_a == (s < 15), "direction flag");
      if (step_a && m % DIV_A == DIV_A - 1 && (car_a == 15 || car_a == 0)) reversals++;
    end
    check(reversals >= 8, "carrier turned at both ends");
    // Phase 2: lower the peak to 7 while running.
    peak_a = 4'd7;
    for (int i = 0; i < 20 * 14 * DIV_A; i++) begin
      logic [3:0] prev_a;
      prev_a = car_a;
      @(posedge clk);
      #1;
      check(car_a <= 15, "range");
      if (prev_a == 1 && car_a == 0) zero_a.push_back(cyc);
    end
    check(zero_a.size() >= 4, "carrier reached 0 with peak 7");
    if (zero_a.size() >= 4) begin
      for (int i = zero_a.size() - 3; i < zero_a.size(); i++)
        check(zero_a[i] - zero_a[i-1] == 14 * DIV_A, "period 14 steps at peak 7");
    end
    // Phase 3: peak 0 holds the carrier at 0.
    peak_a = 4'd0;
    repeat (40 * DIV_A) @(posedge clk);
    for (int i = 0; i < 10 * DIV_A; i++) begin
      @(posedge clk);
      #1 check(car_a == 0, "held at 0 with peak 0");
    end
    // Instance B: default step rate, measure its period.
    while (zero_b.size() < 3) begin
      @(posedge clk);
      #1;
      if (prev_b == 1 && car_b == 0) zero_b.push_back(cyc);
      prev_b = car_b;
    end
    check(zero_b[1] - zero_b[0] == 30 * 833, "default carrier period 24990 clocks");
    check(zero_b[2] - zero_b[1] == 30 * 833, "default carrier period 24990 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_sine_reference: checks the look-up-table sine reference.
// Instance A (4-bit words, 32 samples, 4 clocks per sample) is compared on
// every clock, over two half cycles, with a table computed here with $sin:
// round(15 * sin(pi*(2i+1)/64)). The memory counter must advance every 4
// clocks and wrap after 32 samples. Instance B uses 8-bit words and 64
// samples and must stay within one LSB of the real sine. Instance C at the
// default sizes must wrap every 500000 clocks, a half cycle every 10 ms.
module tb_sine_reference;
  import spmc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  localparam int DIV_A = 4;

  logic [3:0] v_a;
  logic [4:0] addr_a;
  logic [7:0] v_b;
  logic [5:0] addr_b;
  logic [3:0] v_c;
  logic [4:0] addr_c;

  sine_reference #(.DATA_BITS(4), .SAMPLES(32), .SAMPLE_DIV(DIV_A)) u_a (
    .clk, .rst_n, .v_ref(v_a), .addr(addr_a)
  );
  sine_reference #(.DATA_BITS(8), .SAMPLES(64), .SAMPLE_DIV(1)) u_b (
    .clk, .rst_n, .v_ref(v_b), .addr(addr_b)
  );
  sine_reference u_c (.clk, .rst_n, .v_ref(v_c), .addr(addr_c));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (1_200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m;
  int wraps [$];
  int     peak_seen;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    m = 0;
    peak_seen = 0;
    check(addr_a == 0 && addr_b == 0 && addr_c == 0, "counters start at 0");
    while (m < 2 * 32 * DIV_A + 5) begin
      int prev_m;
      @(posedge clk);
      #1 m++;
      prev_m = (m > 0) ? m - 1 : 0;
      check(int'(addr_a) == int'((m / DIV_A) % 32), "address counter A");
      check(int'(v_a) == sine_sample(int'((prev_m / DIV_A) % 32), 32, 4), "sine value A");
      if (v_a == 15) peak_seen++;
      if (m <= 128) begin
        int d;
        d = int'(v_b) - sine_sample(int'(prev_m % 64), 64, 8);
        check(d >= -1 && d <= 1, "sine value B within one LSB");
      end
    end
    check(peak_seen > 0, "crest value 15 reached");
    // Instance C: two wraps of the default memory counter.
    while (wraps.size() < 2) begin
      logic [4:0] prev_addr;
      prev_addr = addr_c;
      @(posedge clk);
      #1 m++;
      if (prev_addr == 31 && addr_c == 0) wraps.push_back(m);
      if (addr_c != prev_addr) check(addr_c == prev_addr + 1'b1 || addr_c == 0, "address C steps by one");
    end
    check(wraps[0] == 500_000, "first half cycle after 10 ms");
    check(wraps[1] - wraps[0] == 500_000, "half cycle every 10 ms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

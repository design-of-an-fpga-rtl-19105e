// tb_dm_pulse_gen: checks the sampled comparator of the delta modulator.
// Random reference and carrier values and random sample pulses are applied
// for 2000 clocks; the output must hold between samples and, after a sample,
// equal "reference above carrier" for the values seen at that sample.
module tb_dm_pulse_gen;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic       sample;
  logic [3:0] v_ref, carrier;
  logic       dm;
  logic       exp_dm;
  int         highs = 0, lows = 0;

  dm_pulse_gen #(.N_BITS(4)) dut (.clk, .rst_n, .sample, .v_ref, .carrier, .dm);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample = 1'b0; v_ref = '0; carrier = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (dm !== 1'b0) begin failures++; $display("FAIL dm not 0 after reset"); end
    exp_dm = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      sample  = ($urandom_range(0, 3) == 0);
      v_ref   = 4'($urandom_range(0, 15));
      carrier = (i % 7 == 0) ? v_ref : 4'($urandom_range(0, 15));
      if (sample) exp_dm = (int'(v_ref) > int'(carrier));
      @(posedge clk);
      #1;
      checks++;
      if (dm !== exp_dm) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d dm=%0d want %0d", i, dm, exp_dm);
      end
      if (dm) highs++; else lows++;
    end
    checks++;
    if (highs == 0 || lows == 0) begin failures++; $display("FAIL dm never toggled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_trigger_multiplier: exhaustive check of the trigger multiplier.
// All 32 combinations of the four switch-pair triggers and the delta
// modulated pulse are applied; each of the eight gate lines must equal its
// pair's trigger AND the pulse.
module tb_trigger_multiplier;
  import spmc_pkg::*;

  int checks = 0;
  int failures = 0;

  trig_t  trig;
  logic   dm;
  gates_t gates;

  trigger_multiplier dut (.trig, .dm, .gates);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [7:0] exp_g;
      logic a14, a23, b23, b14;
      {trig, dm} = v[4:0];
      {a14, a23, b23, b14} = v[4:1];
      #1;
      // Order: s1a s1b s2a s2b s3a s3b s4a s4b
      exp_g = {a14 & dm, b14 & dm, a23 & dm, b23 & dm,
               a23 & dm, b23 & dm, a14 & dm, b14 & dm};
      checks++;
      if (gates !== exp_g) begin
        failures++;
        $display("FAIL trig=%b dm=%0d gates=%b want %b", trig, dm, gates, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

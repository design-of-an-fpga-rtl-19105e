// tb_logical_operator: exhaustive check of the Table I switching terms.
// All 16 combinations of X1, X2, X3 and mode are applied; the four trigger
// outputs are compared with the table and checked to be one-hot (exactly
// one switch pair conducts at any time).
module tb_logical_operator;
  import spmc_pkg::*;
  import spmc_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic  x1, x2, x3;
  mode_t mode;
  trig_t trig;

  logical_operator dut (.x1, .x2, .x3, .mode, .trig);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [3:0] exp_t;
      {mode, x1, x2, x3} = v[3:0];
      #1;
      exp_t = table1(mode == MODE_CYCLO_INVERTER, x1, x2, x3);
      checks++;
      if ({trig.s14a, trig.s23a, trig.s23b, trig.s14b} !== exp_t) begin
        failures++;
        $display("FAIL mode=%0d x1=%0d x2=%0d x3=%0d got %b want %b",
                 mode, x1, x2, x3, trig, exp_t);
      end
      checks++;
      if (!$onehot({trig.s14a, trig.s23a, trig.s23b, trig.s14b})) begin
        failures++;
        $display("FAIL not one-hot: %b", trig);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

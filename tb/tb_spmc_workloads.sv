// tb_spmc_workloads: the controller at the output frequencies its hardware
// was tried at, other than the default 250 Hz / 10 Hz pair.
//   NR = 2,   cyclo-converter: 25 Hz output, X3 half period 1,000,000 clocks
//   NR = 50,  cyclo-converter: 1 Hz output, X3 half period 25,000,000 clocks
//   NR = 200, cyclo-inverter: 10 kHz output, X2 half period 2,500 clocks
// All three run at the full 50 MHz clock counts (X1 = 50 Hz, 2 kHz carrier).
// The output-frequency wave of each is timed edge to edge; on every clock
// the eight gate lines must equal the Table I term of the instance's own
// basic waves times its pulse, and each instance must fire all eight gates.
module tb_spmc_workloads;
  import spmc_pkg::*;
  import spmc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  localparam int N = 3;
  localparam int NRS [N] = '{2, 50, 200};

  mode_t      modes [N];
  gates_t     gates [N];
  logic       x1 [N], x2 [N], x3 [N], dm [N];

  for (genvar k = 0; k < N; k++) begin : g_dut
    logic [3:0] carrier, v_ref;
    logic       cstep, cup;
    logic [4:0] ref_addr;
    spmc_controller #(.NR(NRS[k])) dut (
      .clk, .rst_n, .mode(modes[k]), .carrier_peak(4'd15), .gates(gates[k]),
      .x1(x1[k]), .x2(x2[k]), .x3(x3[k]), .carrier, .v_ref, .dm(dm[k]),
      .carrier_step(cstep), .carrier_up(cup), .ref_addr
    );
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (26_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m;
    int last_edge [N];
    int     edges [N];
    logic   prev_o [N];
    logic [7:0] fired [N];
    int want_half [N];
    int     bad [N];
    modes[0] = MODE_CYCLO_CONVERTER;
    modes[1] = MODE_CYCLO_CONVERTER;
    modes[2] = MODE_CYCLO_INVERTER;
    want_half[0] = 1_000_000;
    want_half[1] = 25_000_000;
    want_half[2] = 2_500;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    m = 0;
    for (int k = 0; k < N; k++) begin
      last_edge[k] = 0;
      edges[k] = 0;
      fired[k] = '0;
      bad[k] = 0;
      prev_o[k] = (k == 2) ? x2[k] : x3[k];
    end
    while (m < 25_000_001) begin
      @(posedge clk);
      #1 m++;
      for (int k = 0; k < N; k++) begin
        logic [3:0] t;
        logic [7:0] eg;
        logic       o;
        t  = table1(modes[k] == MODE_CYCLO_INVERTER, x1[k], x2[k], x3[k]) & {4{dm[k]}};
        eg = {t[3], t[0], t[2], t[1], t[2], t[1], t[3], t[0]};
        checks++;
        if (gates[k] != eg) begin bad[k]++; failures++; end
        fired[k] |= gates[k];
        o = (k == 2) ? x2[k] : x3[k];
        if (o != prev_o[k]) begin
          if (edges[k] < 20)
            check(m - last_edge[k] == want_half[k], $sformatf("output half period, NR=%0d", NRS[k]));
          last_edge[k] = m;
          edges[k]++;
        end
        prev_o[k] = o;
      end
    end
    for (int k = 0; k < N; k++) begin
      check(bad[k] == 0, $sformatf("gate lines follow Table I, NR=%0d", NRS[k]));
      check(edges[k] >= 1, $sformatf("output wave toggled, NR=%0d", NRS[k]));
      check(fired[k] == 8'hff || k == 1, $sformatf("all gates fired, NR=%0d", NRS[k]));
    end
    // At 1 Hz only the positive output half has run: the "a"/"b" pairs for
    // positive output (S1a/S4a, S2b/S3b) must both have fired.
    check(fired[1][7] && fired[1][1] && fired[1][4] && fired[1][2], "positive-output gates fired at 1 Hz");
    $display("output edges: 25 Hz %0d, 1 Hz %0d, 10 kHz %0d", edges[0], edges[1], edges[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_ils_workloads: the published test configurations of the four benchmark
// circuits, applied to the scan network with the published pattern counts,
// primary-input counts and flop counts. Pattern data is random and the
// circuit logic is the tester's stand-in, so what is checked is the scan
// network itself plus the clock and stored-bit totals, which must equal the
// published tables (worked out below from F + (1 + F) * V and
// (PI + F * pins) * V):
//  w0 s13207.1 ILS-6, groups+broadcast: 638 flops, 107 segments, 9 groups,
//     62 PIs, 425 groups + 18 broadcast patterns: 2981 + 132 = 3113 clocks,
//     49300 + 1224 = 50524 bits.
//  w1 s15850.1 ILS-6: 534 flops, 89 segments, 11 groups, 77 PIs, 315 + 98
//     patterns: 2211 + 692 = 2903 clocks, 45045 + 8134 = 53179 bits.
//  w2 s38417 ILS-14: 1636 flops, 117 segments, 10 groups, 28 PIs, 601 + 186
//     patterns: 9029 + 2804 = 11833 clocks, 100968 + 7812 = 108780 bits.
//  w3 s38584.1 ILS-128, traditional ILS (broadcast + serial): 1426 flops, 12
//     segments, 38 PIs, 564 broadcast + 100 serial patterns:
//     72884 + 144126 = 217010 clocks, 93624 + 146400 = 240024 bits.
//  w4 s38417 ILS-128, transition faults (broadcast + serial): 1636 flops,
//     13 segments, 28 PIs, 2071 broadcast + 71 serial transition patterns,
//     data (2 * PI + F) * P: 381064 + 120132 = 501196 bits. Clocks with one
//     launch and one capture clock per pattern, F + (2 + F) * P:
//     269358 + 117934 = 387292 (the published count, with one non-shift clock
//     per pattern, is 2142 lower: 267287 + 117863).
//  w5 s38584.1 ILS-12 using groups mode only, built without multiplexers
//     (HAS_BROADCAST = 0): 1426 flops, 119 segments, 8 groups, 38 PIs, 634
//     patterns: 12 + 13 * 634 = 8254 clocks, (38 + 12 * 8) * 634 = 84956 bits.
module tb_ils_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 6;
  logic done [N];
  int   chk  [N];
  int   fail [N];

  ils_workload_run #(.NUM_FF(638), .SEG_LEN(6), .NUM_GROUPS(9), .NUM_PI(62),
    .N_BCAST(18), .N_GRP(425), .EXP_CYCLES(3113), .EXP_BITS(50524))
    w0 (.clk, .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  ils_workload_run #(.NUM_FF(534), .SEG_LEN(6), .NUM_GROUPS(11), .NUM_PI(77),
    .N_BCAST(98), .N_GRP(315), .EXP_CYCLES(2903), .EXP_BITS(53179))
    w1 (.clk, .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  ils_workload_run #(.NUM_FF(1636), .SEG_LEN(14), .NUM_GROUPS(10), .NUM_PI(28),
    .N_BCAST(186), .N_GRP(601), .EXP_CYCLES(11833), .EXP_BITS(108780))
    w2 (.clk, .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  ils_workload_run #(.NUM_FF(1426), .SEG_LEN(128), .NUM_GROUPS(1), .HAS_SERIAL(1'b1),
    .NUM_PI(38), .N_BCAST(564), .N_SER(100), .EXP_CYCLES(217010), .EXP_BITS(240024))
    w3 (.clk, .done(done[3]), .checks(chk[3]), .failures(fail[3]));
  ils_workload_run #(.NUM_FF(1636), .SEG_LEN(128), .NUM_GROUPS(1), .HAS_SERIAL(1'b1),
    .NUM_PI(28), .N_TRANS(2071), .N_SER_TRANS(71), .EXP_CYCLES(387292), .EXP_BITS(501196))
    w4 (.clk, .done(done[4]), .checks(chk[4]), .failures(fail[4]));
  ils_workload_run #(.NUM_FF(1426), .SEG_LEN(12), .NUM_GROUPS(8), .HAS_BROADCAST(1'b0),
    .NUM_PI(38), .N_GRP(634), .EXP_CYCLES(8254), .EXP_BITS(84956))
    w5 (.clk, .done(done[5]), .checks(chk[5]), .failures(fail[5]));

  function automatic bit all_done();
    for (int i = 0; i < N; i++) if (done[i] !== 1'b1) return 1'b0;
    return 1'b1;
  endfunction

  int checks, failures;
  initial begin
    #20;
    while (!all_done()) @(posedge clk);
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin
      $display("workload w%0d: checks=%0d failures=%0d", i, chk[i], fail[i]);
      checks += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    $display("watchdog expired");
    checks = 0; failures = 1;
    for (int i = 0; i < N; i++) begin checks += chk[i]; failures += fail[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

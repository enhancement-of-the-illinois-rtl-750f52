// tb_ils_full: ils_top at its default size, running one complete test of the
// s38584.1 ILS-12 workload: 1426 flops in 119 segments of 12 (the last one
// 10), 8 scan-in groups, 38 primary inputs, 105 broadcast patterns and 509
// groups-mode patterns. The pattern data is random (no ATPG here) and the
// circuit's logic is the ils_tester stand-in; what is checked is the scan
// network: every load, every clock's state and MISR signature, and the
// clock and data-volume totals, which must equal the published figures:
//   broadcast: 12 + 13 * 105 = 1377 clocks, (38 + 12) * 105     =  5250 bits
//   groups   : 12 + 13 * 509 = 6629 clocks, (38 + 12 * 8) * 509 = 68206 bits
//   total      8006 clocks, 73456 bits.
module tb_ils_full;
  import ils_pkg::*;

  localparam int unsigned NUM_FF = 1426, SEG_LEN = 12, NUM_GROUPS = 8;
  localparam int unsigned NUM_CHAINS = num_chains(NUM_FF, SEG_LEN);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                  rst_n, scan_en, misr_clear, scan_out, done;
  ils_mode_e             mode;
  logic [NUM_GROUPS-1:0] scan_in;
  logic [NUM_FF-1:0]     capture_d, ff_q;
  logic [NUM_CHAINS-1:0] signature;
  int checks, failures;
  int n_bcast_shift, n_grp_shift, n_ser_shift, n_capture, n_launch_capture;
  int n_mode_switch, n_misr_update;

  ils_top dut (
    .clk, .rst_n, .mode, .scan_en, .scan_in, .misr_clear,
    .capture_d, .ff_q, .signature, .scan_out
  );

  ils_tester #(
    .NUM_FF(NUM_FF), .SEG_LEN(SEG_LEN), .NUM_GROUPS(NUM_GROUPS),
    .HAS_SERIAL(1'b0), .GROUP_MAP(round_robin_map(NUM_GROUPS)), .NUM_PI(38),
    .N_BCAST(105), .N_GRP(509), .N_TRANS(0), .N_SER(0),
    .EXP_CYCLES(8006), .EXP_BITS(73456)
  ) tester (
    .clk, .rst_n, .mode, .scan_en, .scan_in, .misr_clear, .capture_d,
    .ff_q, .signature, .scan_out, .done, .checks, .failures,
    .n_bcast_shift, .n_grp_shift, .n_ser_shift, .n_capture,
    .n_launch_capture, .n_mode_switch, .n_misr_update
  );

  int mech_fail;
  initial begin
    @(posedge done);
    mech_fail = 0;
    $display("mechanisms: broadcast shifts=%0d groups shifts=%0d captures=%0d mode switches=%0d MISR updates=%0d",
             n_bcast_shift, n_grp_shift, n_capture, n_mode_switch, n_misr_update);
    if (n_bcast_shift == 0) mech_fail++;
    if (n_grp_shift == 0)   mech_fail++;
    if (n_capture != 105 + 509) mech_fail++;
    if (n_misr_update == 0) mech_fail++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 4, failures + mech_fail);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

// tb_ils_top: end-to-end test of the Multiple Group ILS network.
//
// A small configuration with every mechanism present: 14 flops in segments
// of 4 (three full segments and a short last one of 2), three scan-in
// groups mapped as segment 1 -> group 1, segment 2 -> group 2, segments 3
// and 4 -> group 3, segment 4 taken through an inverter (the arrangement of four segments on three pins used as
// the document's illustration), and the three-input multiplexer so serial
// mode exists too. The ils_tester model applies broadcast, groups,
// transition (launch + capture) and serial sessions and checks every clock
// against its own reference. Totals worked out by hand from
// F + (1 + F) * V and (PI + F * pins) * V, PI = 8:
//   broadcast 4 pats: 4 + 5*4 = 24 clocks, (8+4)*4    = 48 bits
//   groups    4 pats: 4 + 5*4 = 24 clocks, (8+4*3)*4  = 80 bits
//   transition 3 pats: 4 + 6*3 = 22 clocks, (16+4)*3  = 60 bits
//   serial    2 pats: 14 + 15*2 = 44 clocks, (8+14)*2 = 44 bits
//   total 114 clocks, 232 bits.
module tb_ils_top;
  import ils_pkg::*;

  localparam int unsigned NUM_FF = 14, SEG_LEN = 4, NUM_GROUPS = 3;
  localparam int unsigned NUM_CHAINS = num_chains(NUM_FF, SEG_LEN);

  function automatic group_map_t fig_map();
    group_map_t m;
    m = '0;
    m[0] = 0; m[1] = 1; m[2] = 2; m[3] = 2;
    return m;
  endfunction
  localparam group_map_t MAP = fig_map();
  localparam logic [MAX_CHAINS-1:0] INV = MAX_CHAINS'(4'b1000);  // segment 4 inverted

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

  ils_top #(
    .NUM_FF(NUM_FF), .SEG_LEN(SEG_LEN), .NUM_GROUPS(NUM_GROUPS),
    .HAS_BROADCAST(1'b1), .HAS_SERIAL(1'b1), .GROUP_MAP(MAP), .INVERT_MAP(INV)
  ) dut (
    .clk, .rst_n, .mode, .scan_en, .scan_in, .misr_clear,
    .capture_d, .ff_q, .signature, .scan_out
  );

  ils_tester #(
    .NUM_FF(NUM_FF), .SEG_LEN(SEG_LEN), .NUM_GROUPS(NUM_GROUPS),
    .HAS_SERIAL(1'b1), .GROUP_MAP(MAP), .INVERT_MAP(INV), .NUM_PI(8),
    .N_BCAST(4), .N_GRP(4), .N_TRANS(3), .N_SER(2),
    .EXP_CYCLES(114), .EXP_BITS(232)
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
    $display("mechanisms: broadcast shifts=%0d groups shifts=%0d serial shifts=%0d captures=%0d launch+capture=%0d mode switches=%0d MISR updates=%0d",
             n_bcast_shift, n_grp_shift, n_ser_shift, n_capture, n_launch_capture,
             n_mode_switch, n_misr_update);
    if (n_bcast_shift == 0)    mech_fail++;
    if (n_grp_shift == 0)      mech_fail++;
    if (n_ser_shift == 0)      mech_fail++;
    if (n_capture == 0)        mech_fail++;
    if (n_launch_capture == 0) mech_fail++;
    if (n_mode_switch < 3)     mech_fail++;
    if (n_misr_update == 0)    mech_fail++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 7, failures + mech_fail);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

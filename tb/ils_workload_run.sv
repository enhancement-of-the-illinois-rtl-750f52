// ils_workload_run: one ils_top configuration driven by an ils_tester,
// packaged so that a testbench can run several published configurations side
// by side. All parameters pass straight through to the two instances; done,
// checks and failures come from the tester.
module ils_workload_run
  import ils_pkg::*;
#(
  parameter int unsigned NUM_FF      = 14,
  parameter int unsigned SEG_LEN     = 4,
  parameter int unsigned NUM_GROUPS  = 1,
  parameter bit          HAS_BROADCAST = 1'b1,
  parameter bit          HAS_SERIAL  = 1'b0,
  parameter int unsigned NUM_PI      = 8,
  parameter int unsigned N_BCAST     = 0,
  parameter int unsigned N_GRP       = 0,
  parameter int unsigned N_TRANS     = 0,
  parameter int unsigned N_SER       = 0,
  parameter int unsigned N_SER_TRANS = 0,
  parameter longint unsigned EXP_CYCLES = 0,
  parameter longint unsigned EXP_BITS   = 0
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned NUM_CHAINS = num_chains(NUM_FF, SEG_LEN);

  logic                  rst_n, scan_en, misr_clear, scan_out;
  ils_mode_e             mode;
  logic [NUM_GROUPS-1:0] scan_in;
  logic [NUM_FF-1:0]     capture_d, ff_q;
  logic [NUM_CHAINS-1:0] signature;
  int n_bcast_shift, n_grp_shift, n_ser_shift, n_capture, n_launch_capture;
  int n_mode_switch, n_misr_update;

  ils_top #(
    .NUM_FF(NUM_FF), .SEG_LEN(SEG_LEN), .NUM_GROUPS(NUM_GROUPS),
    .HAS_BROADCAST(HAS_BROADCAST), .HAS_SERIAL(HAS_SERIAL)
  ) dut (
    .clk, .rst_n, .mode, .scan_en, .scan_in, .misr_clear,
    .capture_d, .ff_q, .signature, .scan_out
  );

  ils_tester #(
    .NUM_FF(NUM_FF), .SEG_LEN(SEG_LEN), .NUM_GROUPS(NUM_GROUPS),
    .HAS_SERIAL(HAS_SERIAL), .NUM_PI(NUM_PI),
    .N_BCAST(N_BCAST), .N_GRP(N_GRP), .N_TRANS(N_TRANS), .N_SER(N_SER),
    .N_SER_TRANS(N_SER_TRANS), .EXP_CYCLES(EXP_CYCLES), .EXP_BITS(EXP_BITS)
  ) tester (
    .clk, .rst_n, .mode, .scan_en, .scan_in, .misr_clear, .capture_d,
    .ff_q, .signature, .scan_out, .done, .checks, .failures,
    .n_bcast_shift, .n_grp_shift, .n_ser_shift, .n_capture,
    .n_launch_capture, .n_mode_switch, .n_misr_update
  );
endmodule

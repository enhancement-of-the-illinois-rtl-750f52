// ils_tester: behavioural tester (ATE) and circuit-under-test model for an
// ils_top instance. Not synthesizable; used only by testbenches.
//
// It plays the role of the tester: it drives reset, mode, scan_en, the
// scan-in pins and misr_clear, and it contains a small stand-in for the
// circuit's combinational logic, which turns the flop state ff_q and the
// primary inputs into the next-state bits capture_d:
//   capture_d[i] = ff_q[i] ^ (ff_q[(i+1) % N] & pi[i % NUM_PI]) ^ ff_q[(7i+3) % N]
// It applies, in this order, test sessions of
//   N_BCAST  stuck-at patterns in broadcast mode,
//   N_GRP    stuck-at patterns in groups mode,
//   N_TRANS  transition patterns in broadcast mode (two capture clocks:
//            launch with the first primary-input vector, capture with the
//            second, as in functional-justification testing),
//   N_SER    stuck-at patterns in serial mode (only if HAS_SERIAL),
//   N_SER_TRANS transition patterns in serial mode (only if HAS_SERIAL).
// Every session clears the MISR on its first shift clock, loads the first
// pattern, then for each pattern captures and shifts the response out while
// the next pattern shifts in.
//
// Checks, all against values it works out itself:
//  * after every load, each flop holds the bit the fold-over of the pattern
//    puts there (position j of every segment gets the j-th bit of the
//    segment's pin stream);
//  * after every clock, ff_q and the MISR signature match a bit-level
//    reference model of the scan network, and before every clock scan_out
//    matches the model;
//  * per session, the clock count equals F + (1 + F) * V (F = shift length:
//    the longest segment, or all flops in serial mode), with 2 + F per
//    pattern for transition patterns, and the stored test data equals
//    (PI + F * pins) * V, with 2 * PI for transition patterns.
// Mechanism counters (shift clocks per mode, captures, launch/capture
// pairs, mode switches, MISR updates) are output; the testbench checks them.
module ils_tester
  import ils_pkg::*;
#(
  parameter int unsigned NUM_FF     = 14,
  parameter int unsigned SEG_LEN    = 4,
  parameter int unsigned NUM_GROUPS = 3,
  parameter bit          HAS_SERIAL = 1'b0,
  parameter group_map_t  GROUP_MAP  = round_robin_map(NUM_GROUPS),
  parameter logic [MAX_CHAINS-1:0] INVERT_MAP = '0,
  parameter int unsigned NUM_PI     = 8,
  parameter int unsigned N_BCAST    = 3,
  parameter int unsigned N_GRP      = 3,
  parameter int unsigned N_TRANS    = 0,
  parameter int unsigned N_SER      = 0,
  parameter int unsigned N_SER_TRANS = 0,
  // Expected totals over all sessions; 0 skips the comparison.
  parameter longint unsigned EXP_CYCLES = 0,
  parameter longint unsigned EXP_BITS   = 0,
  localparam int unsigned NUM_CHAINS = num_chains(NUM_FF, SEG_LEN)
) (
  input  logic                  clk,
  output logic                  rst_n,
  output ils_mode_e             mode,
  output logic                  scan_en,
  output logic [NUM_GROUPS-1:0] scan_in,
  output logic                  misr_clear,
  output logic [NUM_FF-1:0]     capture_d,
  input  logic [NUM_FF-1:0]     ff_q,
  input  logic [NUM_CHAINS-1:0] signature,
  input  logic                  scan_out,
  output logic                  done,
  output int                    checks,
  output int                    failures,
  output int                    n_bcast_shift,
  output int                    n_grp_shift,
  output int                    n_ser_shift,
  output int                    n_capture,
  output int                    n_launch_capture,
  output int                    n_mode_switch,
  output int                    n_misr_update
);

  localparam int unsigned W = NUM_CHAINS;
  localparam logic [W-1:0] TAPS = W'(misr_taps(W));

  logic [NUM_PI-1:0] pi;
  logic [NUM_FF-1:0] ref_ff;
  logic [W-1:0]      ref_sig;
  longint unsigned   total_cycles, total_bits;

  // Stand-in for the circuit's combinational logic. The index tables are
  // filled once at time 0.
  int unsigned nb_a [NUM_FF];
  int unsigned nb_b [NUM_FF];
  int unsigned nb_p [NUM_FF];
  initial
    for (int i = 0; i < int'(NUM_FF); i++) begin
      nb_a[i] = (i + 1) % NUM_FF;
      nb_b[i] = (7 * i + 3) % NUM_FF;
      nb_p[i] = i % NUM_PI;
    end

  function automatic logic [NUM_FF-1:0] cut_next(logic [NUM_FF-1:0] s, logic [NUM_PI-1:0] p);
    logic [NUM_FF-1:0] n;
    for (int i = 0; i < int'(NUM_FF); i++)
      n[i] = s[i] ^ (s[nb_a[i]] & p[nb_p[i]]) ^ s[nb_b[i]];
    return n;
  endfunction

  always_comb capture_d = cut_next(ff_q, pi);

  function automatic int unsigned grp_of(int unsigned c);
    return int'(GROUP_MAP[c]);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Scan-out value of segment c in the reference state.
  function automatic logic ref_tail(int unsigned c);
    return ref_ff[c * SEG_LEN + chain_len(NUM_FF, SEG_LEN, c) - 1];
  endfunction

  // One clock: predict, clock, compare.
  task automatic step();
    logic [NUM_FF-1:0] nff;
    logic [W-1:0]      tails, nsig;
    logic              top;
    #1;  // let the new inputs settle before looking at scan_out
    for (int unsigned c = 0; c < W; c++) tails[c] = ref_tail(c);
    // scan_out before the edge
    if (mode == MODE_SERIAL) check(scan_out == tails[W-1], "scan_out (serial)");
    else                     check(scan_out == ref_sig[W-1], "scan_out (MISR)");
    // flops
    if (scan_en) begin
      // every flop takes its left neighbour, then each segment head is
      // overwritten with what the selected scan input carries
      nff = ref_ff << 1;
      for (int unsigned c = 0; c < W; c++) begin
        if (mode == MODE_SERIAL)      nff[c * SEG_LEN] = (c == 0) ? scan_in[0] : tails[c - 1];
        else if (mode == MODE_GROUPS) nff[c * SEG_LEN] = scan_in[grp_of(c)] ^ INVERT_MAP[c];
        else                          nff[c * SEG_LEN] = scan_in[0];
      end
    end else begin
      nff = cut_next(ref_ff, pi);
    end
    // MISR: shift up, XOR taps if top bit set, XOR segment outputs
    nsig = ref_sig;
    if (misr_clear) nsig = '0;
    else if (scan_en && mode != MODE_SERIAL) begin
      top = ref_sig[W-1];
      for (int unsigned i = W; i-- > 0; ) begin
        nsig[i] = (i == 0 ? 1'b0 : ref_sig[i-1]) ^ tails[i] ^ (top & TAPS[i]);
      end
      if (tails != '0) n_misr_update++;
    end
    if (scan_en) begin
      case (mode)
        MODE_SERIAL: n_ser_shift++;
        MODE_GROUPS: n_grp_shift++;
        default:     n_bcast_shift++;
      endcase
    end else n_capture++;
    @(posedge clk);
    #1;
    ref_ff  = nff;
    ref_sig = nsig;
    total_cycles++;
    check(ff_q == ref_ff, "flop state");
    check(signature == ref_sig, "MISR signature");
  endtask

  // One test session of v patterns in mode m; trans selects two-capture
  // (transition) patterns.
  task automatic session(input ils_mode_e m, input int unsigned v, input bit trans);
    int unsigned     f, npins, stored_pi;
    longint unsigned c0, b0, exp_c, exp_b;
    // pattern: vec[pin][position]
    logic [NUM_FF-1:0] vec [NUM_GROUPS];
    logic [NUM_FF-1:0] expect_ff;
    if (v == 0) return;
    if (mode != m) n_mode_switch++;
    mode = m;
    f = (m == MODE_SERIAL) ? NUM_FF : SEG_LEN;
    npins = (m == MODE_GROUPS) ? NUM_GROUPS : 1;
    stored_pi = trans ? 2 * NUM_PI : NUM_PI;
    c0 = total_cycles;
    b0 = total_bits;
    for (int unsigned k = 0; k <= v; k++) begin
      // next pattern (none after the last one: the final unload shifts zeros)
      for (int unsigned g = 0; g < NUM_GROUPS; g++)
        for (int unsigned p = 0; p < NUM_FF; p++)
          vec[g][p] = (k < v && g < npins) ? 1'($urandom) : 1'b0;
      if (k < v) total_bits += longint'(f) * npins;
      // shift f clocks; the bit for position j goes in at clock f-1-j
      scan_en = 1'b1;
      for (int unsigned t = 0; t < f; t++) begin
        misr_clear = (k == 0 && t == 0);
        for (int unsigned g = 0; g < NUM_GROUPS; g++)
          scan_in[g] = (g < npins) ? vec[g][f - 1 - t] : 1'($urandom);
        step();
      end
      misr_clear = 1'b0;
      if (k == v) break;
      // fold-over check of the loaded pattern
      for (int unsigned p = 0; p < NUM_FF; p++) begin
        if (m == MODE_SERIAL)      expect_ff[p] = vec[0][p];
        else if (m == MODE_GROUPS) expect_ff[p] = vec[grp_of(p / SEG_LEN)][p % SEG_LEN]
                                                   ^ INVERT_MAP[p / SEG_LEN];
        else                       expect_ff[p] = vec[0][p % SEG_LEN];
      end
      check(ff_q == expect_ff, "loaded pattern");
      // capture
      scan_en = 1'b0;
      pi = NUM_PI'({$urandom, $urandom, $urandom});
      step();
      if (trans) begin
        pi = NUM_PI'({$urandom, $urandom, $urandom});
        step();
        n_launch_capture++;
      end
      total_bits += longint'(stored_pi);
    end
    exp_c = longint'(f) + longint'(1 + f + (trans ? 1 : 0)) * v;
    exp_b = longint'(stored_pi + f * npins) * longint'(v);
    check(total_cycles - c0 == exp_c, $sformatf("session cycles %0d, expected %0d",
                                                total_cycles - c0, exp_c));
    check(total_bits - b0 == exp_b, $sformatf("session data bits %0d, expected %0d",
                                              total_bits - b0, exp_b));
    $display("session mode=%s trans=%0d patterns=%0d: %0d clocks, %0d bits",
             m.name(), trans, v, total_cycles - c0, total_bits - b0);
  endtask

  initial begin
    done = 1'b0;
    checks = 0; failures = 0;
    n_bcast_shift = 0; n_grp_shift = 0; n_ser_shift = 0; n_capture = 0;
    n_launch_capture = 0; n_mode_switch = 0; n_misr_update = 0;
    total_cycles = 0; total_bits = 0;
    rst_n = 1'b0;
    mode = MODE_BROADCAST;
    scan_en = 1'b1;
    scan_in = '0;
    misr_clear = 1'b0;
    pi = '0;
    ref_ff = '0;
    ref_sig = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(ff_q == '0 && signature == '0, "reset state");
    session(MODE_BROADCAST, N_BCAST, 1'b0);
    session(MODE_GROUPS,    N_GRP,   1'b0);
    session(MODE_BROADCAST, N_TRANS, 1'b1);
    if (HAS_SERIAL) session(MODE_SERIAL, N_SER, 1'b0);
    if (HAS_SERIAL) session(MODE_SERIAL, N_SER_TRANS, 1'b1);
    if (EXP_CYCLES != 0)
      check(total_cycles == EXP_CYCLES, $sformatf("total clocks %0d, expected %0d",
                                                  total_cycles, EXP_CYCLES));
    if (EXP_BITS != 0)
      check(total_bits == EXP_BITS, $sformatf("total data bits %0d, expected %0d",
                                              total_bits, EXP_BITS));
    $display("total: %0d clocks, %0d stored bits", total_cycles, total_bits);
    done = 1'b1;
  end

endmodule

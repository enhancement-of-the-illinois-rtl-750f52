// ils_top: Multiple Group Illinois Scan (ILS) network for one circuit.
//
// The NUM_FF scan flip-flops of a circuit (serial positions 1..NUM_FF) are
// cut into NUM_CHAINS = ceil(NUM_FF/SEG_LEN) segments: segment c holds
// positions c*SEG_LEN+1 .. c*SEG_LEN+SEG_LEN, the last one what is left. In
// front of every segment an ils_input_mux picks its scan input:
//   broadcast mode: all segments take scan_in[0], so every segment receives
//                   the same data and only the longest segment's length has
//                   to be shifted;
//   groups mode   : segment c takes scan_in[GROUP_MAP[c]], so segments that
//                   need conflicting values in the same bit position can be
//                   put on different pins;
//                   A segment whose INVERT_MAP bit is set receives its
//                   group pin through an inverter, so a segment that is
//                   compatible with a group only in inverted form can join it;
//   serial mode   : (HAS_SERIAL only) the segments form one chain from
//                   scan_in[0] to scan_out, the conventional full scan.
// In broadcast and groups mode the segment outputs are compacted into a MISR
// with one stage per segment while shifting, and the MISR's top bit drives
// scan_out; in serial mode scan_out is the end of the last segment.
//
// Interface: scan_en = 1 shifts, scan_en = 0 captures capture_d (the
// circuit's next-state bits) into the flops; ff_q is the flop state fed to
// the circuit. capture_d and ff_q are indexed by serial position - 1.
// misr_clear zeroes the signature. All registers use clk and rst_n.
// Timing: one bit per clock per pin; loading a pattern takes SEG_LEN shift
// clocks in broadcast or groups mode and NUM_FF clocks in serial mode.
// Applying V patterns with unload overlapped with the next load takes
// SEG_LEN + (1 + SEG_LEN) * V clocks (one capture clock per pattern).
//
// From the document: segmentation, shared scan-in, one pin per group, the
// per-segment multiplexers, the optional third (serial) input, the
// multiplexer-free single-mode variant (HAS_BROADCAST = 0, HAS_SERIAL = 0),
// groups plus a secondary serial mode (HAS_BROADCAST = 0, HAS_SERIAL = 1),
// the optional inverter per segment, and a MISR sized to the number of segments. The default size is the
// s38584.1 ILS-12 configuration (1426 flops, 119 segments, 8 groups). This
// design's own choices: the default group map (round-robin; the real one is
// the result of test generation), the MISR polynomial (MISR_POLY, bit i =
// coefficient of x^i), the inverter acting in groups mode only, and scan_out taken
// from the MISR's top bit.
module ils_top
  import ils_pkg::*;
#(
  parameter int unsigned NUM_FF        = 1426,
  parameter int unsigned SEG_LEN       = 12,
  parameter int unsigned NUM_GROUPS    = 8,
  parameter bit          HAS_BROADCAST = 1'b1,
  parameter bit          HAS_SERIAL    = 1'b0,
  parameter group_map_t  GROUP_MAP     = round_robin_map(NUM_GROUPS),
  parameter logic [MAX_CHAINS-1:0] INVERT_MAP = '0,
  parameter logic [MAX_CHAINS-1:0] MISR_POLY  = misr_taps(num_chains(NUM_FF, SEG_LEN)),
  localparam int unsigned NUM_CHAINS   = num_chains(NUM_FF, SEG_LEN)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  ils_mode_e             mode,
  input  logic                  scan_en,
  input  logic [NUM_GROUPS-1:0] scan_in,
  input  logic                  misr_clear,
  input  logic [NUM_FF-1:0]     capture_d,
  output logic [NUM_FF-1:0]     ff_q,
  output logic [NUM_CHAINS-1:0] signature,
  output logic                  scan_out
);

  // Elaboration checks on the configuration.
  if (NUM_CHAINS > MAX_CHAINS) begin : g_err_chains
    $error("ils_top: %0d segments exceed MAX_CHAINS", NUM_CHAINS);
  end
  if (NUM_GROUPS > (1 << GROUP_W)) begin : g_err_groups
    $error("ils_top: NUM_GROUPS exceeds the group map's range");
  end

  logic [NUM_CHAINS-1:0] seg_in;   // selected scan input of each segment
  logic [NUM_CHAINS-1:0] seg_out;  // scan output of each segment

  for (genvar c = 0; c < NUM_CHAINS; c++) begin : g_seg
    localparam int unsigned LEN  = chain_len(NUM_FF, SEG_LEN, c);
    localparam int unsigned BASE = c * SEG_LEN;
    localparam int unsigned GRP  = int'(GROUP_MAP[c]);
    localparam bit          INV  = INVERT_MAP[c];

    if (GRP >= NUM_GROUPS) begin : g_err_map
      $error("ils_top: segment %0d mapped to group %0d of %0d", c, GRP, NUM_GROUPS);
    end

    // Group input, through an inverter if the segment is used inverted.
    logic group_src;
    assign group_src = scan_in[GRP] ^ INV;

    logic serial_src;
    if (c == 0) begin : g_first
      assign serial_src = scan_in[0];
    end else begin : g_next
      assign serial_src = seg_out[c-1];
    end

    ils_input_mux #(
      .HAS_BROADCAST (HAS_BROADCAST),
      .HAS_SERIAL    (HAS_SERIAL)
    ) u_mux (
      .mode      (mode),
      .bcast_in  (scan_in[0]),
      .group_in  (group_src),
      .serial_in (serial_src),
      .scan_out  (seg_in[c])
    );

    scan_segment #(
      .LEN (LEN)
    ) u_seg (
      .clk      (clk),
      .rst_n    (rst_n),
      .scan_en  (scan_en),
      .scan_in  (seg_in[c]),
      .d        (capture_d[BASE +: LEN]),
      .q        (ff_q[BASE +: LEN]),
      .scan_out (seg_out[c])
    );
  end

  // Serial mode exists only with the three-input multiplexer.
  logic serial_sel;
  assign serial_sel = HAS_SERIAL && (mode == MODE_SERIAL);

  misr #(
    .W    (NUM_CHAINS),
    .POLY (NUM_CHAINS'(MISR_POLY))
  ) u_misr (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (misr_clear),
    .en    (scan_en && !serial_sel),
    .d     (seg_out),
    .sig   (signature)
  );

  assign scan_out = serial_sel ? seg_out[NUM_CHAINS-1] : signature[NUM_CHAINS-1];

  // A mode the configured multiplexers cannot select is a usage error.
  a_mode_exists : assert property (@(posedge clk) disable iff (!rst_n)
      (mode != MODE_SERIAL    || HAS_SERIAL) &&
      (mode != MODE_BROADCAST || HAS_BROADCAST || !scan_en))
    else $error("ils_top: mode %s not available in this configuration", mode.name());

endmodule

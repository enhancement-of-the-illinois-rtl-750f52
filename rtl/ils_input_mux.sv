// ils_input_mux: scan-input multiplexer in front of one ILS segment.
//
// It chooses what is shifted into the segment:
//   MODE_BROADCAST -> bcast_in  (the shared scan-in pin, scan-in 1)
//   MODE_GROUPS    -> group_in  (the scan-in pin of the segment's group)
//   MODE_SERIAL    -> serial_in (scan output of the previous segment)
// Purely combinational. HAS_BROADCAST and HAS_SERIAL say which inputs exist:
// with both set this is the three-input multiplexer the document suggests
// when serial mode must stay available next to broadcast and groups mode;
// with only HAS_BROADCAST it is the two-input multiplexer of Multiple Group
// ILS; with neither it is the bare wire of the single-mode (groups only)
// variant. A mode whose input does not exist falls back to group_in; the
// top level flags that case with an assertion.
module ils_input_mux
  import ils_pkg::*;
#(
  parameter bit HAS_BROADCAST = 1'b1,
  parameter bit HAS_SERIAL    = 1'b0
) (
  input  ils_mode_e mode,
  input  logic      bcast_in,
  input  logic      group_in,
  input  logic      serial_in,
  output logic      scan_out
);

  always_comb begin
    scan_out = group_in;
    if (mode == MODE_BROADCAST && HAS_BROADCAST) scan_out = bcast_in;
    if (mode == MODE_SERIAL    && HAS_SERIAL)    scan_out = serial_in;
  end

endmodule

// scan_segment: one scan chain segment of LEN mux-D scan flip-flops.
//
// With scan_en high the segment is a shift register: scan_in enters position
// 1 (q[0]) and position LEN (q[LEN-1]) drives scan_out. With scan_en low each
// flop captures its functional next-state bit d[i] from the circuit under
// test. q is the flop state seen by that circuit (its pseudo primary inputs).
// One clock per shift or capture; scan_out is the registered last bit, so a
// bit shifted in appears on scan_out LEN clocks later.
//
// The segment as a shift register converted from the circuit's flip-flops
// follows the document; the mux-D cell style and the asynchronous active-low
// reset to zero are this design's choice.
module scan_segment #(
  parameter int unsigned LEN = 12
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           scan_en,
  input  logic           scan_in,
  input  logic [LEN-1:0] d,
  output logic [LEN-1:0] q,
  output logic           scan_out
);

  logic [LEN-1:0] shifted;

  if (LEN == 1) begin : g_one
    assign shifted = scan_in;
  end else begin : g_many
    assign shifted = {q[LEN-2:0], scan_in};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= '0;
    else if (scan_en) q <= shifted;
    else              q <= d;
  end

  assign scan_out = q[LEN-1];

endmodule

// misr: multiple input signature register compacting the scan-out streams.
//
// One stage per scan segment (W = number of segments). It is an internal-XOR
// LFSR: each enabled clock the register shifts one place towards the top
// bit, the top bit is fed back into every stage whose bit in POLY is set,
// and input d[i] (scan output of segment i) is XORed into stage i:
//   sig' = {sig[W-2:0], 0} ^ (sig[W-1] ? POLY : 0) ^ d
// clear loads zero synchronously and has priority over en. The signature is
// available in parallel on sig; its top bit drives the scan-out pin.
//
// A MISR as wide as the number of segments, fed by the segment outputs,
// follows the document. Its structure, polynomial and the clear input are
// this design's choice; the document gives none of them.
module misr #(
  parameter int unsigned         W    = 119,
  parameter logic [W-1:0]        POLY = W'(ils_pkg::misr_taps(W))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] sig
);

  logic [W-1:0] next_sig;

  always_comb begin
    next_sig = (sig << 1) ^ d;
    if (sig[W-1]) next_sig = next_sig ^ POLY;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig <= '0;
    else if (clear) sig <= '0;
    else if (en)    sig <= next_sig;
  end

endmodule

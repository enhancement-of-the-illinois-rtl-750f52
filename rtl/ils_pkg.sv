// ils_pkg: types and helper functions shared by the Illinois Scan (ILS) network.
//
// A scan chain of NUM_FF flip-flops is cut into segments of SEG_LEN flops
// ("ILS-k" with k = SEG_LEN); the last segment takes what is left and may be
// shorter. Each segment can be fed by the broadcast scan-in pin, by the pin
// of the group it belongs to, or by the previous segment (serial mode). The
// group each segment belongs to is fixed at design time by a group map, which
// in the intended flow comes from colouring the incompatibility graph of the
// segments; here it is a parameter.
package ils_pkg;

  // Largest number of segments and groups a group map can describe.
  localparam int unsigned MAX_CHAINS = 256;
  localparam int unsigned GROUP_W    = 8;

  // Scan-input mode of the segment multiplexers.
  //  MODE_BROADCAST: every segment takes scan_in[0] (identical data in all).
  //  MODE_GROUPS   : every segment takes the scan-in pin of its group.
  //  MODE_SERIAL   : segments are concatenated into one conventional chain.
  typedef enum logic [1:0] {
    MODE_BROADCAST = 2'd0,
    MODE_GROUPS    = 2'd1,
    MODE_SERIAL    = 2'd2
  } ils_mode_e;

  // Group number of each segment, entry c for segment c.
  typedef logic [MAX_CHAINS-1:0][GROUP_W-1:0] group_map_t;

  // Number of segments of an ILS-k configuration: ceil(num_ff / seg_len).
  function automatic int unsigned num_chains(int unsigned num_ff, int unsigned seg_len);
    return (num_ff + seg_len - 1) / seg_len;
  endfunction

  // Length of segment c; all are seg_len except possibly the last.
  function automatic int unsigned chain_len(int unsigned num_ff, int unsigned seg_len,
                                            int unsigned c);
    int unsigned rest;
    rest = num_ff - c * seg_len;
    return (rest < seg_len) ? rest : seg_len;
  endfunction

  // Default group map: segment c goes to group c mod num_groups.
  function automatic group_map_t round_robin_map(int unsigned num_groups);
    group_map_t m;
    for (int unsigned c = 0; c < MAX_CHAINS; c++)
      m[c] = GROUP_W'(c % num_groups);
    return m;
  endfunction

  // Feedback taps of a width-w MISR, as the coefficients of x^0..x^(w-1) of
  // its characteristic polynomial. Primitive polynomials are listed for a
  // few widths; any other width gets x^w + x + 1, which is a valid but not
  // necessarily maximal-length feedback.
  function automatic logic [MAX_CHAINS-1:0] misr_taps(int unsigned w);
    logic [MAX_CHAINS-1:0] t;
    t = '0;
    t[0] = 1'b1;
    case (w)
      2:       t[1] = 1'b1;                                        // x^2+x+1
      3:       t[2] = 1'b1;                                        // x^3+x^2+1
      4:       t[3] = 1'b1;                                        // x^4+x^3+1
      5:       t[3] = 1'b1;                                        // x^5+x^3+1
      6:       t[5] = 1'b1;                                        // x^6+x^5+1
      7:       t[6] = 1'b1;                                        // x^7+x^6+1
      8:       begin t[6] = 1'b1; t[5] = 1'b1; t[4] = 1'b1; end    // x^8+x^6+x^5+x^4+1
      16:      begin t[15] = 1'b1; t[13] = 1'b1; t[4] = 1'b1; end  // x^16+x^15+x^13+x^4+1
      119:     t[111] = 1'b1;                                      // x^119+x^111+1
      default: if (w > 1) t[1] = 1'b1;                             // x^w+x+1
    endcase
    return t;
  endfunction

endpackage

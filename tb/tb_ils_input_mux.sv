// tb_ils_input_mux: exhaustive check of the four multiplexer variants
// (three-input, two-input broadcast/groups, serial/groups, and the bare
// wire of the single-mode design) over all modes and input values, against
// a truth table written out per variant.
module tb_ils_input_mux;
  import ils_pkg::*;

  ils_mode_e mode;
  logic b, g, s;
  logic y3, y2, ys, y0;
  int checks = 0, failures = 0;

  ils_input_mux #(.HAS_BROADCAST(1'b1), .HAS_SERIAL(1'b1)) m3 (.mode, .bcast_in(b), .group_in(g), .serial_in(s), .scan_out(y3));
  ils_input_mux #(.HAS_BROADCAST(1'b1), .HAS_SERIAL(1'b0)) m2 (.mode, .bcast_in(b), .group_in(g), .serial_in(s), .scan_out(y2));
  ils_input_mux #(.HAS_BROADCAST(1'b0), .HAS_SERIAL(1'b1)) ms (.mode, .bcast_in(b), .group_in(g), .serial_in(s), .scan_out(ys));
  ils_input_mux #(.HAS_BROADCAST(1'b0), .HAS_SERIAL(1'b0)) m0 (.mode, .bcast_in(b), .group_in(g), .serial_in(s), .scan_out(y0));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s mode=%s b=%b g=%b s=%b", what, mode.name(), b, g, s); end
  endtask

  initial begin
    for (int m = 0; m < 3; m++) begin
      for (int v = 0; v < 8; v++) begin
        mode = ils_mode_e'(m);
        {b, g, s} = 3'(v);
        #1;
        case (m)
          0: begin  // broadcast
            chk(y3 == b, "3-input"); chk(y2 == b, "2-input");
            chk(ys == g, "serial/groups"); chk(y0 == g, "wire");
          end
          1: begin  // groups
            chk(y3 == g, "3-input"); chk(y2 == g, "2-input");
            chk(ys == g, "serial/groups"); chk(y0 == g, "wire");
          end
          default: begin  // serial
            chk(y3 == s, "3-input"); chk(y2 == g, "2-input");
            chk(ys == s, "serial/groups"); chk(y0 == g, "wire");
          end
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

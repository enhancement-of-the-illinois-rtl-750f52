// tb_ils_fig_example: the 12-flop example of a fault that broadcast mode
// cannot test. The required scan pattern, serial positions 1..12, is
//   X 0 1 X 1 1 X X X X 1 1
// which folds onto three 4-flop segments as SC1 = X01X, SC2 = 11XX,
// SC3 = XX11. SC1 needs 0 and SC2 needs 1 in position 2, so no broadcast
// stream can load it: the test tries all 16 streams and expects every one
// to miss. With two groups (SC1 on pin 1, SC2 and SC3 on pin 2) the streams
// 0,0,1,0 (positions 1..4, X filled with 0) and 1,1,1,1 load it, and serial
// mode loads it through the 12-flop chain. Checks compare the specified bits of the loaded state.
module tb_ils_fig_example;
  import ils_pkg::*;

  localparam int unsigned NUM_FF = 12, SEG_LEN = 4, NUM_GROUPS = 2;

  function automatic group_map_t ex_map();
    group_map_t m;
    m = '0;
    m[1] = 1; m[2] = 1;
    return m;
  endfunction

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, scan_en, misr_clear, scan_out;
  ils_mode_e mode;
  logic [NUM_GROUPS-1:0] scan_in;
  logic [NUM_FF-1:0] capture_d, ff_q;
  logic [2:0] signature;
  int checks = 0, failures = 0;

  ils_top #(.NUM_FF(NUM_FF), .SEG_LEN(SEG_LEN), .NUM_GROUPS(NUM_GROUPS),
            .HAS_SERIAL(1'b1), .GROUP_MAP(ex_map())) dut (
    .clk, .rst_n, .mode, .scan_en, .scan_in, .misr_clear,
    .capture_d, .ff_q, .signature, .scan_out);

  // required values, index = serial position - 1; care = specified
  localparam logic [11:0] VAL  = 12'b1100_0011_0100;  // bit i = position i+1
  localparam logic [11:0] CARE = 12'b1100_0011_0110;

  function automatic bit meets(logic [11:0] q);
    return ((q ^ VAL) & CARE) == '0;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // shift f clocks; stream bit for position j is driven at clock f-1-j
  task automatic load(input ils_mode_e m, input logic [11:0] s0, input logic [11:0] s1,
                      input int f);
    mode = m;
    scan_en = 1'b1;
    for (int t = 0; t < f; t++) begin
      scan_in[0] = s0[f - 1 - t];
      scan_in[1] = s1[f - 1 - t];
      @(posedge clk);
      #1;
    end
  endtask

  int hits;
  initial begin
    rst_n = 1'b0; scan_en = 1'b0; misr_clear = 1'b0; scan_in = '0;
    mode = MODE_BROADCAST; capture_d = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    hits = 0;
    for (int v = 0; v < 16; v++) begin
      load(MODE_BROADCAST, 12'(v), 12'(v ^ 5), SEG_LEN);
      // every segment holds the same stream
      chk(ff_q[3:0] == 4'(v) && ff_q[7:4] == 4'(v) && ff_q[11:8] == 4'(v),
          $sformatf("broadcast stream %b copied to all segments", 4'(v)));
      if (meets(ff_q)) hits++;
    end
    chk(hits == 0, "no broadcast stream applies the pattern");
    load(MODE_GROUPS, 12'b0100, 12'b1111, SEG_LEN);
    chk(meets(ff_q), "groups mode applies the pattern");
    chk(ff_q == 12'b1111_1111_0100, "groups mode loaded state");
    load(MODE_SERIAL, VAL, 12'hFFF, NUM_FF);
    chk(ff_q == VAL, "serial mode loads the full pattern");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

// tb_scan_segment: random shift and capture traffic on a 12-flop segment and
// a 1-flop segment, compared every clock with a queue model: a shift pushes
// scan_in at position 1 and drops position LEN, a capture copies d.
// Also checks that a bit shifted in reaches scan_out after exactly LEN
// clocks.
module tb_scan_segment;
  localparam int unsigned LEN = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, scan_en, scan_in;
  logic [LEN-1:0] d, q;
  logic so;
  logic [0:0] d1, q1;
  logic so1;
  int checks = 0, failures = 0;

  scan_segment #(.LEN(LEN)) dut (.clk, .rst_n, .scan_en, .scan_in, .d, .q, .scan_out(so));
  scan_segment #(.LEN(1)) dut1 (.clk, .rst_n, .scan_en, .scan_in, .d(d1), .q(q1), .scan_out(so1));

  bit model [LEN];   // model[0] = position 1
  bit model1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    rst_n = 1'b0; scan_en = 1'b0; scan_in = 1'b0; d = '0; d1 = '0;
    foreach (model[i]) model[i] = 0;
    model1 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    chk(q == '0 && q1 == '0, "reset");
    for (int n = 0; n < 400; n++) begin
      scan_en = ($urandom % 4) != 0;
      scan_in = 1'($urandom);
      d = LEN'($urandom);
      d1 = 1'($urandom);
      chk(so == model[LEN-1] && so1 == model1, "scan_out before edge");
      @(posedge clk);
      #1;
      if (scan_en) begin
        for (int i = LEN - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = scan_in;
        model1 = scan_in;
      end else begin
        for (int i = 0; i < LEN; i++) model[i] = d[i];
        model1 = d1[0];
      end
      for (int i = 0; i < LEN; i++) chk(q[i] == model[i], $sformatf("q[%0d]", i));
      chk(q1[0] == model1, "q of 1-flop segment");
    end
    // latency: a lone 1 in a field of 0s appears on scan_out after LEN clocks
    scan_en = 1'b1;
    scan_in = 1'b0;
    repeat (LEN) @(posedge clk);
    #1 scan_in = 1'b1;
    @(posedge clk);
    #1 scan_in = 1'b0;
    for (int t = 1; t <= LEN; t++) begin
      chk(so == (t == LEN), $sformatf("scan_out after %0d clocks", t));
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

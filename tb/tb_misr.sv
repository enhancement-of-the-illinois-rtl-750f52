// tb_misr: checks the signature register two ways.
//  * A 3-stage MISR with x^3 + x^2 + 1 and zero input must step through all
//    7 non-zero states before repeating (maximal length), and a single input
//    bit must change the signature.
//  * The default 119-stage MISR (x^119 + x^111 + 1) is fed random input
//    with random enable and clear, and compared every clock with a model
//    that computes each stage from the polynomial's coefficient list.
module tb_misr;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic rst_n, clear, en;
  logic [2:0] d3, s3;
  logic [118:0] d, sig, model;

  misr #(.W(3)) u_small (.clk, .rst_n, .clear, .en, .d(d3), .sig(s3));
  misr dut (.clk, .rst_n, .clear, .en, .d, .sig);

  function automatic logic [118:0] model_next(logic [118:0] s, logic [118:0] in);
    logic [118:0] n;
    for (int i = 0; i < 119; i++) begin
      n[i] = (i > 0 ? s[i-1] : 1'b0) ^ in[i];
      if (i == 0 || i == 111) n[i] ^= s[118];
    end
    return n;
  endfunction

  bit seen [8];
  initial begin
    rst_n = 1'b0; clear = 1'b0; en = 1'b0; d3 = '0; d = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    chk(s3 == 0 && sig == 0, "reset");
    // seed the small MISR with 001 then run free
    en = 1'b1; d3 = 3'b001;
    @(posedge clk); #1;
    chk(s3 == 3'b001, "seed");
    d3 = 3'b000;
    foreach (seen[i]) seen[i] = 0;
    for (int t = 0; t < 7; t++) begin
      chk(!seen[s3] && s3 != 0, $sformatf("state %b repeats early", s3));
      seen[s3] = 1;
      @(posedge clk); #1;
    end
    chk(s3 == 3'b001, "period 7");
    // one input bit changes the signature
    d3 = 3'b100;
    @(posedge clk); #1;
    d3 = 3'b000;
    chk(s3 == 3'b110, "input folded in");   // 001 -> 010 ^ 100
    // large MISR against the coefficient model
    model = sig;
    for (int n = 0; n < 600; n++) begin
      en = ($urandom % 5) != 0;
      clear = ($urandom % 97) == 0;
      for (int w = 0; w < 119; w += 32) d[w +: 32] = 32'($urandom);
      @(posedge clk); #1;
      if (clear) model = '0;
      else if (en) model = model_next(model, d);
      chk(sig == model, "119-stage signature");
    end
    clear = 1'b1;
    @(posedge clk); #1;
    chk(sig == '0, "clear");
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

// tb_cb_modmul: self-checking test of the serial modular multiplier.
// Three instances run side by side: the default one (CW = 64, K = 128, where
// compare and subtract share a cycle), one with K = 64 and one with K = 32;
// in all three the cycle count must equal 24*b*b/K exactly (b = CW/2).
// Random operands below a random odd modulus, plus corner cases (zero
// operands, m - 1 squared), are compared with (a*b) % m computed here in
// 128-bit arithmetic; the done latency is checked for every operation.
module tb_cb_modmul;
  localparam int CW = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start;
  logic [CW-1:0] a, b, m;
  logic          busy0, done0, busy1, done1, busy2, done2;
  logic [CW-1:0] r0, r1, r2;

  cb_modmul dut0 (.clk, .rst_n, .start, .a, .b, .m, .busy(busy0), .done(done0), .r(r0));
  cb_modmul #(.CW(CW), .K(32)) dut1 (.clk, .rst_n, .start, .a, .b, .m,
                                    .busy(busy1), .done(done1), .r(r1));
  cb_modmul #(.CW(CW), .K(64)) dut2 (.clk, .rst_n, .start, .a, .b, .m,
                                    .busy(busy2), .done(done2), .r(r2));

  int checks = 0, failures = 0;
  localparam int LAT0 = 24 * (CW/2) * (CW/2) / 128;   // K = 128 = 4b: compare and subtract merged
  localparam int LAT1 = 24 * (CW/2) * (CW/2) / 32;    // K = 32
  localparam int LAT2 = 24 * (CW/2) * (CW/2) / 64;    // K = 64 = 2b: one chunk, two passes

  function automatic logic [CW-1:0] ref_mm(logic [CW-1:0] x, logic [CW-1:0] y, logic [CW-1:0] mm);
    logic [2*CW-1:0] p;
    p = {{CW{1'b0}}, x} * {{CW{1'b0}}, y};
    return CW'(p % {{CW{1'b0}}, mm});
  endfunction

  task automatic run(logic [CW-1:0] ta, logic [CW-1:0] tb_, logic [CW-1:0] tm);
    int cyc = 0, c0 = -1, c1 = -1, c2 = -1;
    logic [CW-1:0] exp_r;
    exp_r = ref_mm(ta, tb_, tm);
    @(negedge clk);
    a = ta; b = tb_; m = tm; start = 1;
    @(negedge clk);
    start = 0;
    a = '0; b = '0; m = '0;   // inputs are sampled on the start edge only
    cyc = 0;
    while ((c0 < 0 || c1 < 0 || c2 < 0) && cyc < 5000) begin
      if (done0 && c0 < 0) c0 = cyc;
      if (done1 && c1 < 0) c1 = cyc;
      if (done2 && c2 < 0) c2 = cyc;
      @(negedge clk);
      cyc++;
    end
    checks += 6;
    if (r2 !== exp_r) begin failures++; $display("FAIL K=64 %h*%h mod %h = %h, expected %h", ta, tb_, tm, r2, exp_r); end
    if (c2 != LAT2) begin failures++; $display("FAIL K=64 latency %0d, expected %0d", c2, LAT2); end
    if (r0 !== exp_r) begin failures++; $display("FAIL K=128 %h*%h mod %h = %h, expected %h", ta, tb_, tm, r0, exp_r); end
    if (r1 !== exp_r) begin failures++; $display("FAIL K=32 %h*%h mod %h = %h, expected %h", ta, tb_, tm, r1, exp_r); end
    if (c0 != LAT0) begin failures++; $display("FAIL K=128 latency %0d, expected %0d", c0, LAT0); end
    if (c1 != LAT1) begin failures++; $display("FAIL K=32 latency %0d, expected %0d", c1, LAT1); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CW-1:0] tm, ta, tb_;
    start = 0; a = 0; b = 0; m = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // n^2 for n = 65521 * 65537
    tm = 64'd4294049777 * 64'd4294049777;
    run(0, 64'd12345, tm);
    run(tm - 1, tm - 1, tm);
    run(64'd1, tm - 1, tm);
    run(64'hFFFF_FFFF_FFFF_FFF0 % tm, 64'h8000_0000_0000_0001 % tm, tm);
    for (int i = 0; i < 40; i++) begin
      tm  = {$urandom, $urandom} | 64'h8000_0000_0000_0001;
      if (i % 4 == 3) tm = tm >> ($urandom % 40);  // smaller moduli too
      tm  = tm | 1;
      ta  = {$urandom, $urandom} % tm;
      tb_ = {$urandom, $urandom} % tm;
      run(ta, tb_, tm);
    end
    checks++;
    if (busy0 || busy1 || busy2) begin failures++; $display("FAIL busy after done"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

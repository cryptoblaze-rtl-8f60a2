// tb_cb_modmul_sizes: the modular multiplier at larger key sizes from the
// design's size sweep: b = 256 with K = 256 and b = 1024 with K = 128
// (ciphertexts of 2b = 512 and 2048 bits).  Random operands below a random
// odd modulus with its top bit set are compared with (a*b) % m worked out
// here in wide arithmetic, and each operation must take exactly
// 2b*ceil(4b/K) + 8b*ceil(2b/K) = 24b^2/K cycles.
module tb_cb_modmul_sizes;
  localparam int CW1 = 512,  K1 = 256, N1 = 6;
  localparam int CW2 = 2048, K2 = 128, N2OPS = 2;
  localparam int LAT1 = 24 * (CW1/2) * (CW1/2) / K1;
  localparam int LAT2 = 24 * (CW2/2) * (CW2/2) / K2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, finished = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [CW2-1:0] rnd(int bits);
    logic [CW2-1:0] r;
    for (int i = 0; i < CW2/32; i++) r[32*i +: 32] = $urandom;
    return r & ((CW2'(1) << bits) - 1);
  endfunction

  // ---- b = 256 ----
  logic            s1 = 0, busy1, done1;
  logic [CW1-1:0]  a1 = 0, b1 = 0, m1 = 0, r1;
  cb_modmul #(.CW(CW1), .K(K1)) u1 (.clk, .rst_n, .start(s1), .a(a1), .b(b1), .m(m1),
                                   .busy(busy1), .done(done1), .r(r1));
  initial begin
    logic [CW1-1:0] m, x, y, e;
    int cyc;
    wait (rst_n);
    for (int k = 0; k < N1; k++) begin
      m = CW1'(rnd(CW1)) | {1'b1, {(CW1-2){1'b0}}, 1'b1};
      x = CW1'(rnd(CW1)) % m; y = CW1'(rnd(CW1)) % m;
      if (k == 0) begin x = m - 1; y = m - 1; end
      e = CW1'(({{CW1{1'b0}}, x} * {{CW1{1'b0}}, y}) % {{CW1{1'b0}}, m});
      @(negedge clk); s1 = 1; a1 = x; b1 = y; m1 = m;
      @(negedge clk); s1 = 0;
      cyc = 0;
      while (!done1 && cyc < 10*LAT1) begin @(negedge clk); cyc++; end
      check(r1 == e, $sformatf("b=256 op %0d result", k));
      check(cyc == LAT1, $sformatf("b=256 latency %0d, expected %0d", cyc, LAT1));
    end
    finished++;
  end

  // ---- b = 1024 ----
  logic            s2 = 0, busy2, done2;
  logic [CW2-1:0]  a2 = 0, b2 = 0, m2 = 0, r2;
  cb_modmul #(.CW(CW2), .K(K2)) u2 (.clk, .rst_n, .start(s2), .a(a2), .b(b2), .m(m2),
                                   .busy(busy2), .done(done2), .r(r2));
  initial begin
    logic [CW2-1:0] m, x, y, e;
    int cyc;
    wait (rst_n);
    for (int k = 0; k < N2OPS; k++) begin
      m = rnd(CW2) | {1'b1, {(CW2-2){1'b0}}, 1'b1};
      x = rnd(CW2) % m; y = rnd(CW2) % m;
      e = CW2'(({{CW2{1'b0}}, x} * {{CW2{1'b0}}, y}) % {{CW2{1'b0}}, m});
      @(negedge clk); s2 = 1; a2 = x; b2 = y; m2 = m;
      @(negedge clk); s2 = 0;
      cyc = 0;
      while (!done2 && cyc < 2*LAT2) begin @(negedge clk); cyc++; end
      check(r2 == e, $sformatf("b=1024 op %0d result", k));
      check(cyc == LAT2, $sformatf("b=1024 latency %0d, expected %0d", cyc, LAT2));
    end
    finished++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (finished == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

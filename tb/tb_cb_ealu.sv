// tb_cb_ealu: checks EADD and ESUB on real Paillier negation pairs (b = 32,
// default K = 128).  Each result must equal the pairwise product mod n^2
// computed here, must decrypt to A+B / A-B (upper half) and to its negation
// (lower half), and must arrive exactly 24b^2/K cycles
// after start.
module tb_cb_ealu;
  import cb_pkg::*;
  import cb_tb_pkg::*;
  localparam int B = 32, K = 128;
  localparam int LAT = 24 * B * B / K;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  ealu_op_e op;
  logic [127:0] era, erb, result;
  logic [63:0]  n2;
  logic busy, done;

  cb_ealu dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(ealu_op_e o, longint signed x, longint signed y);
    logic [127:0] ca, cb;
    logic [63:0] ehi, elo;
    int cyc;
    longint signed want;
    ca = enc_pair(x); cb = enc_pair(y);
    ehi = mulmod(ca[127:64], (o == EALU_SUB) ? cb[63:0] : cb[127:64], N2);
    elo = mulmod(ca[63:0],   (o == EALU_SUB) ? cb[127:64] : cb[63:0], N2);
    want = (o == EALU_SUB) ? x - y : x + y;
    @(negedge clk); op = o; era = ca; erb = cb; n2 = N2; start = 1;
    @(negedge clk); start = 0; era = '0; erb = '0; n2 = '0;
    cyc = 0;
    while (!done && cyc < 10000) begin @(negedge clk); cyc++; end
    check(cyc == LAT, $sformatf("latency %0d, expected %0d", cyc, LAT));
    check(result == {ehi, elo}, $sformatf("op %0d: %h, expected %h", o, result, {ehi, elo}));
    check(decrypt(result[127:64]) == want, $sformatf("op %0d %0d,%0d: decrypts to %0d", o, x, y, decrypt(result[127:64])));
    check(decrypt(result[63:0]) == -want, "lower half is not the negation");
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    op = EALU_ADD; era = 0; erb = 0; n2 = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    run(EALU_ADD, 3, 4);
    run(EALU_SUB, 3, 4);
    run(EALU_SUB, 10, -25);
    run(EALU_ADD, -100, 40);
    run(EALU_SUB, 7, 7);
    for (int i = 0; i < 10; i++)
      run(ealu_op_e'(i % 2), longint'($urandom % 200000) - 100000, longint'($urandom % 200000) - 100000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cb_eclient_if: plays the client on the link.  For random ciphertexts and
// signs it takes the words with random ready gaps, checks their order and
// values, answers with a sign after a random delay, and checks neg/zpos and
// that done comes exactly one cycle after the answer is accepted.
module tb_cb_eclient_if;
  import cb_pkg::*;
  localparam int B = 32, W = 2 * B / 32;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  logic [63:0] ct = 0;
  logic busy, done, neg, zpos;
  logic tx_valid, tx_ready = 0, tx_last, rx_valid = 0, rx_ready;
  logic [31:0] tx_data;
  sign_e rx_sign = SIGN_ZERO;

  cb_eclient_if dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic query(logic [63:0] c, sign_e s);
    logic [63:0] got;
    int nw = 0, guard = 0;
    @(negedge clk); start = 1; ct = c;
    @(negedge clk); start = 0; ct = '0;
    while (nw < W && guard < 200) begin
      tx_ready = ($urandom % 2) == 1;
      @(posedge clk);
      if (tx_valid && tx_ready) begin
        got[32*nw +: 32] = tx_data;
        check(tx_last == (nw == W - 1), "tx_last");
        nw++;
      end
      @(negedge clk);
      guard++;
    end
    tx_ready = 0;
    check(got == c, $sformatf("ciphertext sent %h, expected %h", got, c));
    check(!done && busy, "finished before the answer");
    repeat ($urandom % 5) @(negedge clk);
    check(!done, "done without an answer");
    rx_valid = 1; rx_sign = s;
    @(posedge clk);
    check(rx_ready, "answer not accepted");
    @(negedge clk); rx_valid = 0;
    check(done, "done missing one cycle after the answer");
    check(neg == (s == SIGN_NEG) && zpos == (s != SIGN_NEG), "sign decision");
    @(negedge clk);
    check(!done && !busy, "done longer than one cycle");
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    query(64'h0123_4567_89AB_CDEF, SIGN_NEG);
    query(64'hFEDC_BA98_7654_3210, SIGN_ZERO);
    query(64'h1111_2222_3333_4444, SIGN_POS);
    for (int i = 0; i < 10; i++) query({$urandom, $urandom}, sign_e'($urandom % 3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cb_benchmarks: the three benchmark kinds at sizes whose executed
// instruction counts are of the order reported for this processor
// (about 900 for Fibonacci, 5,700 for factorial, 113,000 for bubble sort):
//   * Fibonacci F(178) mod n, 177 loop iterations;
//   * factorial 50! mod n with the argument encrypted;
//   * bubble sort of 150 random encrypted values in [-1000, 1000].
// Default processor size (b = 32, K = 128).  Plaintexts are integers mod n,
// read as signed; results are decrypted and compared with values computed
// here.  Prints executed instructions, cycles and stall cycles of each run.
module tb_cb_benchmarks;
  import cb_pkg::*;
  import cb_tb_pkg::*;

  localparam int NFIB = 177, NFACT = 50, NSORT = 150;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  logic        halted;
  logic        host_ireq = 0, host_iwe = 0, host_dreq = 0, host_dwe = 0;
  logic [31:0] host_iaddr = 0, host_iwdata = 0, host_irdata;
  logic [31:0] host_daddr = 0, host_dwdata = 0, host_drdata;
  logic        cl_tx_valid, cl_tx_ready, cl_tx_last, cl_rx_valid, cl_rx_ready;
  logic [31:0] cl_tx_data;
  sign_e       cl_rx_sign;
  logic [31:0] instret, cycles, estall;
  int          queries, negatives;

  cb_top dut (.*);
  cb_client_model #(.LATENCY(1)) u_client (
    .clk, .tx_valid(cl_tx_valid), .tx_ready(cl_tx_ready), .tx_data(cl_tx_data),
    .tx_last(cl_tx_last), .rx_valid(cl_rx_valid), .rx_ready(cl_rx_ready),
    .rx_sign(cl_rx_sign), .queries, .negatives
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic imem_write(int addr, logic [31:0] d);
    @(negedge clk); host_ireq = 1; host_iwe = 1; host_iaddr = addr; host_iwdata = d;
    @(negedge clk); host_ireq = 0; host_iwe = 0;
  endtask
  task automatic dmem_write(int addr, logic [31:0] d);
    @(negedge clk); host_dreq = 1; host_dwe = 1; host_daddr = addr; host_dwdata = d;
    @(negedge clk); host_dreq = 0; host_dwe = 0;
  endtask
  task automatic dmem_read(int addr, output logic [31:0] d);
    @(negedge clk); host_dreq = 1; host_dwe = 0; host_daddr = addr;
    @(negedge clk); host_dreq = 0; d = host_drdata;
  endtask
  task automatic ct_write(int addr, logic [127:0] c);
    for (int i = 0; i < 4; i++) dmem_write(addr + 4*i, c[32*i +: 32]);
  endtask
  task automatic value_at(int addr, output longint signed v);
    logic [127:0] c;
    logic [31:0] w;
    for (int i = 0; i < 4; i++) begin dmem_read(addr + 4*i, w); c[32*i +: 32] = w; end
    v = decrypt(c[127:64]);
    check(decrypt(c[63:0]) == -v, $sformatf("pair at %0d is not {Enc(A), Enc(-A)}", addr));
  endtask

  logic [31:0] prog [$];
  task automatic load(int unused);
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (prog[i]) imem_write(4*i, prog[i]);
    ct_write(0, {64'd0, N2});
  endtask
  task automatic go(int max_cycles, string name);
    int c = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!halted && c < max_cycles) begin @(negedge clk); c++; end
    check(halted, {name, " did not halt"});
    $display("%s: %0d instructions, %0d cycles, %0d stall cycles", name, instret, cycles, estall);
  endtask

  // signed reading of a value mod n
  function automatic longint signed smod(longint signed x);
    longint signed r;
    r = x % longint'(N);
    if (r < 0) r += longint'(N);
    return (r > longint'(N / 2)) ? r - longint'(N) : r;
  endfunction

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint signed v, fa, fb, ft, f;
    longint signed arr [NSORT];

    // Fibonacci
    prog = '{ELD(0, 0, 0), N2MOV(0), ADDIK(4, 0, 16), ELD(1, 0, 4),
             ADDIK(4, 0, 32), ELD(2, 0, 4), ADDIK(3, 0, NFIB), ADDIK(1, 1, 0),
             EADD(3, 1, 2), EMOV(1, 2), EMOV(2, 3), ADDIK(3, 3, -1), BNEI(3, -16),
             ADDIK(4, 0, 48), EST(2, 0, 4), HALT()};
    load(0);
    ct_write(16, enc_pair(0));
    ct_write(32, enc_pair(1));
    go(10000000, "Fibonacci");
    fa = 0; fb = 1;
    for (int i = 0; i < NFIB; i++) begin ft = (fa + fb) % longint'(N); fa = fb; fb = ft; end
    value_at(48, v);
    check(v == smod(fb), $sformatf("Fibonacci: %0d, expected %0d", v, smod(fb)));

    // factorial
    prog = '{ELD(0, 0, 0), N2MOV(0), ADDIK(4, 0, 16), ELD(1, 0, 4),
             ADDIK(4, 0, 32), ELD(2, 0, 4), EMOV(3, 2), ADDIK(4, 0, 48), ELD(6, 0, 4),
             ESUB(4, 1, 2), EBRNEG(4, 40), EMOV(5, 6), EMOV(7, 1),
             ESUB(7, 7, 2), EBRNEG(7, 12), EADD(5, 5, 3), BRI(-12),
             EMOV(3, 5), EMOV(1, 4), BRI(-40),
             ADDIK(4, 0, 64), EST(3, 0, 4), HALT()};
    load(0);
    ct_write(16, enc_pair(NFACT));
    ct_write(32, enc_pair(1));
    ct_write(48, enc_pair(0));
    go(50000000, "factorial");
    f = 1;
    for (int i = 2; i <= NFACT; i++) f = longint'(mulmod(64'(f), 64'(i), N));
    value_at(64, v);
    check(v == smod(f), $sformatf("factorial: %0d, expected %0d", v, smod(f)));

    // bubble sort
    prog = '{ELD(0, 0, 0), N2MOV(0), ADDIK(5, 0, 256), ADDIK(6, 0, NSORT - 1),
             ADDIK(7, 0, 0), ADDK(8, 6, 0),
             ELD(1, 5, 7), ADDIK(9, 7, 16), ELD(2, 5, 9), ESUB(3, 2, 1),
             EBRZPOS(3, 12), EST(2, 5, 7), EST(1, 5, 9),
             ADDIK(7, 7, 16), ADDIK(8, 8, -1), BNEI(8, -36),
             ADDIK(6, 6, -1), BNEI(6, -52), HALT()};
    load(0);
    foreach (arr[i]) begin
      arr[i] = longint'($urandom % 2001) - 1000;
      ct_write(256 + 16*i, enc_pair(arr[i]));
    end
    go(100000000, "bubble sort");
    for (int i = 1; i < NSORT; i++)       // insertion sort of the reference
      for (int j = i; j > 0 && arr[j-1] > arr[j]; j--) begin
        v = arr[j]; arr[j] = arr[j-1]; arr[j-1] = v;
      end
    foreach (arr[i]) begin
      value_at(256 + 16*i, v);
      check(v == arr[i], $sformatf("sort: element %0d = %0d, expected %0d", i, v, arr[i]));
    end
    // one query per comparison of the sort; for the factorial one per outer
    // step (NFACT + 1) and i + 1 per inner loop for i = NFACT .. 1
    check(queries == (NSORT * (NSORT - 1)) / 2 + (NFACT + 1) + NFACT * (NFACT + 1) / 2 + NFACT,
          $sformatf("client queries %0d", queries));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

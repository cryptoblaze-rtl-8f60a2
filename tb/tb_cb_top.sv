// tb_cb_top: end-to-end test of the encrypted-data processor at its default
// size (b = 32, K = 128).  The host loads a program and Paillier ciphertexts
// (generated here with a real key), starts the core, waits for it to halt and
// decrypts what it stored.  Three programs of the kinds the design is
// benchmarked with run in turn:
//   * Fibonacci: F(N+1) by repeated EADD, loop counter in plain registers;
//   * factorial: n! with n encrypted, multiplication by repeated EADD, both
//     loops steered by EBRNEG on encrypted counters;
//   * bubble sort of an encrypted array: ESUB, then EBRZPOS and a swap by EST.
// A behavioural client decrypts the ciphertexts the core sends for the
// encrypted branches.  Checked: the decrypted results, that each stored pair
// is {Enc(A), Enc(-A)}, the executed instruction count of the Fibonacci
// program, and that every EADD/ESUB stalls the core for exactly
// 24b^2/K + 1 cycles
// (the eALU's cycles and one write-back cycle).  Each of the eight encrypted
// instructions, the stall, and a taken and a not-taken encrypted branch must
// occur at least once.
module tb_cb_top;
  import cb_pkg::*;
  import cb_tb_pkg::*;

  localparam int B = 32, K = 128;
  localparam int EALU_LAT = 24 * B * B / K;   // K <= 4b

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

  cb_client_model u_client (
    .clk, .tx_valid(cl_tx_valid), .tx_ready(cl_tx_ready), .tx_data(cl_tx_data),
    .tx_last(cl_tx_last), .rx_valid(cl_rx_valid), .rx_ready(cl_rx_ready),
    .rx_sign(cl_rx_sign), .queries, .negatives
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_eadd, n_esub, n_emov, n_n2mov, n_eld, n_est, n_ebrneg, n_ebrzpos;
  int n_br_taken, n_br_not, n_stall, ewait_len, n_lat_bad;
  initial begin
    n_eadd = 0; n_esub = 0; n_emov = 0; n_n2mov = 0; n_eld = 0; n_est = 0;
    n_ebrneg = 0; n_ebrzpos = 0; n_br_taken = 0; n_br_not = 0; n_stall = 0;
    ewait_len = 0; n_lat_bad = 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.st == dut.u_core.S_EWAIT) begin
      ewait_len++;
      n_stall++;
    end
    if (dut.u_core.commit) begin
      logic [31:0] ir;
      ir = dut.u_core.ir;
      if (ir[31:26] == OP_ETYPE) begin
        unique case (ir[3:0])
          4'(EF_EADD):  n_eadd++;
          4'(EF_ESUB):  n_esub++;
          4'(EF_EMOV):  n_emov++;
          4'(EF_N2MOV): n_n2mov++;
          4'(EF_ELD):   n_eld++;
          4'(EF_EST):   n_est++;
          default: ;
        endcase
        if (ir[3:0] == 4'(EF_EADD) || ir[3:0] == 4'(EF_ESUB)) begin
          // the eALU cycles plus the cycle that writes the result back
          if (ewait_len != EALU_LAT + 1) begin
            n_lat_bad++;
            $display("FAIL eALU stall %0d cycles, expected %0d", ewait_len, EALU_LAT + 1);
          end
          ewait_len = 0;
        end
      end
      if (ir[31:26] == OP_EBR) begin
        if (ir[25:21] == EBR_NEG) n_ebrneg++; else n_ebrzpos++;
        if (dut.u_core.c_take) n_br_taken++; else n_br_not++;
      end
    end
  end

  // ---------------- host access ----------------
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
  task automatic ct_read(int addr, output logic [127:0] c);
    logic [31:0] w;
    for (int i = 0; i < 4; i++) begin dmem_read(addr + 4*i, w); c[32*i +: 32] = w; end
  endtask
  // decrypts a stored pair, checks that its halves are negatives of each other
  task automatic pair_value(int addr, output longint signed v);
    logic [127:0] c;
    longint signed lo;
    ct_read(addr, c);
    v  = decrypt(c[127:64]);
    lo = decrypt(c[63:0]);
    check(lo == -v, $sformatf("pair at %0d: halves %0d and %0d", addr, v, lo));
  endtask

  logic [31:0] prog [$];
  task automatic run_prog(int max_cycles);
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (prog[i]) imem_write(4*i, prog[i]);
  endtask
  task automatic go(int max_cycles);
    int c = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!halted && c < max_cycles) begin @(negedge clk); c++; end
    check(halted, "program did not halt");
  endtask
  task automatic load_key();
    ct_write(0, {64'd0, N2});
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint signed v, fa, fb, ft;
    longint signed arr [6] = '{5, -3, 12, 0, -7, 8};
    longint signed sorted [6] = '{-7, -3, 0, 5, 8, 12};
    int nfib;

    // ---------- Fibonacci ----------
    nfib = 20;
    prog = '{ELD(0, 0, 0), N2MOV(0), ADDIK(4, 0, 16), ELD(1, 0, 4),
             ADDIK(4, 0, 32), ELD(2, 0, 4), ADDIK(3, 0, nfib),
             ADDIK(1, 1, 0),
             EADD(3, 1, 2), EMOV(1, 2), EMOV(2, 3), ADDIK(3, 3, -1), BNEI(3, -16),
             ADDIK(4, 0, 48), EST(2, 0, 4), HALT()};
    run_prog(0);
    load_key();
    ct_write(16, enc_pair(0));
    ct_write(32, enc_pair(1));
    go(100000);
    fa = 0; fb = 1;
    for (int i = 0; i < nfib; i++) begin ft = fa + fb; fa = fb; fb = ft; end
    pair_value(48, v);
    check(v == fb, $sformatf("Fibonacci: got %0d, expected %0d", v, fb));
    check(instret == 32'(11 + 5*nfib), $sformatf("Fibonacci instret %0d, expected %0d", instret, 11 + 5*nfib));
    $display("Fibonacci F(%0d) = %0d: %0d instructions, %0d cycles, %0d stall cycles",
             nfib + 1, v, instret, cycles, estall);

    // ---------- factorial ----------
    prog = '{ELD(0, 0, 0), N2MOV(0), ADDIK(4, 0, 16), ELD(1, 0, 4),
             ADDIK(4, 0, 32), ELD(2, 0, 4), EMOV(3, 2), ADDIK(4, 0, 48), ELD(6, 0, 4),
             ESUB(4, 1, 2), EBRNEG(4, 40), EMOV(5, 6), EMOV(7, 1),
             ESUB(7, 7, 2), EBRNEG(7, 12), EADD(5, 5, 3), BRI(-12),
             EMOV(3, 5), EMOV(1, 4), BRI(-40),
             ADDIK(4, 0, 64), EST(3, 0, 4), HALT()};
    run_prog(0);
    load_key();
    ct_write(16, enc_pair(5));
    ct_write(32, enc_pair(1));
    ct_write(48, enc_pair(0));
    go(200000);
    pair_value(64, v);
    check(v == 120, $sformatf("factorial: 5! = %0d", v));
    $display("factorial 5! = %0d: %0d instructions, %0d cycles, %0d client queries",
             v, instret, cycles, queries);

    // ---------- bubble sort ----------
    prog = '{ELD(0, 0, 0), N2MOV(0), ADDIK(5, 0, 256), ADDIK(6, 0, 5),
             ADDIK(7, 0, 0), ADDK(8, 6, 0),
             ELD(1, 5, 7), ADDIK(9, 7, 16), ELD(2, 5, 9), ESUB(3, 2, 1),
             EBRZPOS(3, 12), EST(2, 5, 7), EST(1, 5, 9),
             ADDIK(7, 7, 16), ADDIK(8, 8, -1), BNEI(8, -36),
             ADDIK(6, 6, -1), BNEI(6, -52), HALT()};
    run_prog(0);
    load_key();
    foreach (arr[i]) ct_write(256 + 16*i, enc_pair(arr[i]));
    go(200000);
    foreach (sorted[i]) begin
      pair_value(256 + 16*i, v);
      check(v == sorted[i], $sformatf("sort: element %0d = %0d, expected %0d", i, v, sorted[i]));
    end
    $display("bubble sort of 6: %0d instructions, %0d cycles", instret, cycles);

    // ---------- mechanisms ----------
    $display("EADD %0d ESUB %0d EMOV %0d N2MOV %0d ELD %0d EST %0d EBRNEG %0d EBRZPOS %0d",
             n_eadd, n_esub, n_emov, n_n2mov, n_eld, n_est, n_ebrneg, n_ebrzpos);
    $display("encrypted branches taken %0d, not taken %0d; eALU stall cycles %0d; client queries %0d (%0d negative)",
             n_br_taken, n_br_not, n_stall, queries, negatives);
    check(n_eadd > 0, "no EADD");
    check(n_esub > 0, "no ESUB");
    check(n_emov > 0, "no EMOV");
    check(n_n2mov > 0, "no N2MOV");
    check(n_eld > 0, "no ELD");
    check(n_est > 0, "no EST");
    check(n_ebrneg > 0, "no EBRNEG");
    check(n_ebrzpos > 0, "no EBRZPOS");
    check(n_br_taken > 0, "no taken encrypted branch");
    check(n_br_not > 0, "no untaken encrypted branch");
    check(n_stall > 0, "no eALU stall");
    check(negatives > 0, "no negative sign from the client");
    check(n_lat_bad == 0, "eALU stall length");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cb_top_keysizes: the whole processor at larger keys than the default
// b = 32: b = 64 with K = 256 and b = 128 with K = 512, the minimum-latency
// adder widths for those key sizes.  An eRegister then holds 4b = 256 or 512
// bits (8 or 16 memory words), n^2 has 2b bits, and an EADD/ESUB takes
// 24b^2/K = 384 or 768 cycles.
//
// Keys: n = 4294967291 * 4294967279 (the two largest primes below 2^32) for
// b = 64, and n = (2^64 - 59) * (2^64 - 83) (the two largest below 2^64) for
// b = 128; g = n + 1, lambda = lcm(p-1, q-1), mu = lambda^-1 mod n.  The
// Paillier arithmetic is done here on 256- and 512-bit vectors.  The client of
// each instance sits in this testbench: it takes Enc(A) as 2b/32 words,
// decrypts it and answers with the sign after two cycles, accepting words
// every other cycle.
//
// For each size, part 1 measures one EADD: the same program with and without
// it must differ by 24b^2/K + 1 stall cycles (the eALU latency plus the
// write-back cycle), and the sum must decrypt correctly.  Part 2 runs bubble
// sort of 150 random encrypted values and checks the sorted array, both
// halves of every pair and the number of client queries, n(n-1)/2.
module tb_cb_top_keysizes;
  import cb_pkg::*;
  import cb_tb_pkg::*;
  localparam int NK = 2, NSORT = 150;
  localparam int BV [NK] = '{64, 128};
  localparam int KV [NK] = '{256, 512};

  // ---------------- Paillier reference, up to b = 128 ----------------
  typedef logic [255:0] w_t;
  w_t kp [NK], kq [NK], kn [NK], kn2 [NK], klam [NK], kmu [NK];

  function automatic w_t mulmod_w(w_t x, w_t y, w_t m);
    logic [511:0] t;
    t = {256'd0, x} * {256'd0, y};
    return w_t'(t % {256'd0, m});
  endfunction

  function automatic w_t modexp_w(w_t base, w_t e, w_t m);
    w_t r, bb;
    r  = 1;
    bb = base % m;
    for (int i = 0; i < 256; i++) begin
      if (e[i]) r = mulmod_w(r, bb, m);
      bb = mulmod_w(bb, bb, m);
    end
    return r;
  endfunction

  function automatic w_t gcd_w(w_t a, w_t b_);
    w_t t;
    while (b_ != 0) begin t = a % b_; a = b_; b_ = t; end
    return a;
  endfunction

  function automatic w_t modinv_w(w_t a, w_t m);
    logic signed [259:0] t, nt, r, nr, qq, tmp;
    t = 0; nt = 1; r = 260'(m); nr = 260'(a % m);
    while (nr != 0) begin
      qq = r / nr;
      tmp = t - qq * nt; t = nt; nt = tmp;
      tmp = r - qq * nr; r = nr; nr = tmp;
    end
    if (t < 0) t = t + 260'(m);
    return w_t'(t);
  endfunction

  function automatic w_t enc_w(int k, longint signed msg);
    w_t mm, r, gm;
    longint unsigned am;
    am = (msg < 0) ? longint'(-msg) : longint'(msg);
    mm = (msg < 0) ? kn[k] - w_t'(am) : w_t'(am);
    do r = {128'd0, $urandom, $urandom, $urandom, $urandom} % kn[k];
    while (r == 0 || r % kp[k] == 0 || r % kq[k] == 0);
    gm = (w_t'(1) + mulmod_w(mm, kn[k], kn2[k])) % kn2[k];   // (n+1)^m = 1 + m n mod n^2
    return mulmod_w(gm, modexp_w(r, kn[k], kn2[k]), kn2[k]);
  endfunction

  function automatic longint signed dec_w(int k, w_t c);
    w_t u, l, mm;
    u  = modexp_w(c, klam[k], kn2[k]);
    l  = (u - 1) / kn[k];
    mm = mulmod_w(l, kmu[k], kn[k]);
    return (mm > kn[k] / 2) ? -longint'(kn[k] - mm) : longint'(mm);
  endfunction

  // negation pair {Enc(A), Enc(-A)}, 4b bits, zero-extended to 1024
  function automatic logic [1023:0] pair_w(int k, longint signed a);
    return ({768'd0, enc_w(k, a)} << (2 * BV[k])) | {768'd0, enc_w(k, -a)};
  endfunction

  // ---------------- designs and clients ----------------
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n [NK], start [NK], halted [NK];
  logic        host_ireq [NK], host_iwe [NK], host_dreq [NK], host_dwe [NK];
  logic [31:0] host_iaddr [NK], host_iwdata [NK], host_irdata [NK];
  logic [31:0] host_daddr [NK], host_dwdata [NK], host_drdata [NK];
  logic        cl_tx_valid [NK], cl_tx_ready [NK], cl_tx_last [NK];
  logic        cl_rx_valid [NK], cl_rx_ready [NK];
  logic [31:0] cl_tx_data [NK];
  sign_e       cl_rx_sign [NK];
  logic [31:0] instret [NK], cycles [NK], estall [NK];

  for (genvar g = 0; g < NK; g++) begin : g_dut
    cb_top #(.B(BV[g]), .K(KV[g])) dut (
      .clk, .rst_n(rst_n[g]), .start(start[g]), .halted(halted[g]),
      .host_ireq(host_ireq[g]), .host_iwe(host_iwe[g]), .host_iaddr(host_iaddr[g]),
      .host_iwdata(host_iwdata[g]), .host_irdata(host_irdata[g]),
      .host_dreq(host_dreq[g]), .host_dwe(host_dwe[g]), .host_daddr(host_daddr[g]),
      .host_dwdata(host_dwdata[g]), .host_drdata(host_drdata[g]),
      .cl_tx_valid(cl_tx_valid[g]), .cl_tx_ready(cl_tx_ready[g]),
      .cl_tx_data(cl_tx_data[g]), .cl_tx_last(cl_tx_last[g]),
      .cl_rx_valid(cl_rx_valid[g]), .cl_rx_ready(cl_rx_ready[g]),
      .cl_rx_sign(cl_rx_sign[g]),
      .instret(instret[g]), .cycles(cycles[g]), .estall(estall[g])
    );
  end

  int    queries [NK], cl_wait [NK], cl_nw [NK];
  w_t    cl_ct [NK];
  sign_e cl_pending [NK];
  initial
    for (int k = 0; k < NK; k++) begin
      rst_n[k] = 0; start[k] = 0;
      host_ireq[k] = 0; host_iwe[k] = 0; host_dreq[k] = 0; host_dwe[k] = 0;
      host_iaddr[k] = 0; host_iwdata[k] = 0; host_daddr[k] = 0; host_dwdata[k] = 0;
      cl_tx_ready[k] = 0; cl_rx_valid[k] = 0; cl_rx_sign[k] = SIGN_ZERO;
      queries[k] = 0; cl_wait[k] = 0; cl_nw[k] = 0; cl_ct[k] = '0;
      cl_pending[k] = SIGN_ZERO;
    end

  always @(posedge clk) begin
    longint signed v;
    for (int k = 0; k < NK; k++) begin
      cl_tx_ready[k] <= ~cl_tx_ready[k];
      if (cl_rx_valid[k] && cl_rx_ready[k]) cl_rx_valid[k] <= 0;
      if (cl_wait[k] > 0) begin
        cl_wait[k] = cl_wait[k] - 1;
        if (cl_wait[k] == 0) begin cl_rx_sign[k] <= cl_pending[k]; cl_rx_valid[k] <= 1; end
      end
      if (cl_tx_valid[k] && cl_tx_ready[k]) begin
        cl_ct[k][32*cl_nw[k] +: 32] = cl_tx_data[k];
        cl_nw[k]++;
        if (cl_tx_last[k]) begin
          if (cl_nw[k] != 2 * BV[k] / 32) begin
            failures++; $display("FAIL b = %0d: client got %0d words", BV[k], cl_nw[k]);
          end
          cl_nw[k] = 0;
          v = dec_w(k, cl_ct[k]);
          cl_ct[k] = '0;
          queries[k]++;
          cl_pending[k] = (v < 0) ? SIGN_NEG : (v == 0) ? SIGN_ZERO : SIGN_POS;
          cl_wait[k] = 2;
        end
      end
    end
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic imem_write(int k, int addr, logic [31:0] d);
    @(negedge clk); host_ireq[k] = 1; host_iwe[k] = 1; host_iaddr[k] = addr; host_iwdata[k] = d;
    @(negedge clk); host_ireq[k] = 0; host_iwe[k] = 0;
  endtask
  task automatic dmem_write(int k, int addr, logic [31:0] d);
    @(negedge clk); host_dreq[k] = 1; host_dwe[k] = 1; host_daddr[k] = addr; host_dwdata[k] = d;
    @(negedge clk); host_dreq[k] = 0; host_dwe[k] = 0;
  endtask
  task automatic dmem_read(int k, int addr, output logic [31:0] d);
    @(negedge clk); host_dreq[k] = 1; host_dwe[k] = 0; host_daddr[k] = addr;
    @(negedge clk); host_dreq[k] = 0; d = host_drdata[k];
  endtask
  task automatic ct_write(int k, int addr, logic [1023:0] c);
    for (int i = 0; i < BV[k] / 8; i++) dmem_write(k, addr + 4*i, c[32*i +: 32]);
  endtask
  task automatic value_at(int k, int addr, output longint signed v);
    logic [1023:0] c;
    logic [31:0] w;
    c = '0;
    for (int i = 0; i < BV[k] / 8; i++) begin dmem_read(k, addr + 4*i, w); c[32*i +: 32] = w; end
    v = dec_w(k, w_t'(c >> (2 * BV[k])));
    check(dec_w(k, w_t'(c) & ((w_t'(1) << (2 * BV[k])) - 1)) == -v,
          $sformatf("b = %0d: pair at %0d is not {Enc(A), Enc(-A)}", BV[k], addr));
  endtask

  logic [31:0] prog [$];
  task automatic load(int k);
    rst_n[k] = 0;
    repeat (2) @(negedge clk);
    rst_n[k] = 1;
    foreach (prog[i]) imem_write(k, 4*i, prog[i]);
    ct_write(k, 0, {768'd0, kn2[k]});
  endtask
  task automatic go(int k, int max_cycles, string name);
    int c = 0;
    @(negedge clk); start[k] = 1;
    @(negedge clk); start[k] = 0;
    while (!halted[k] && c < max_cycles) begin @(negedge clk); c++; end
    check(halted[k], $sformatf("b = %0d: %s did not halt", BV[k], name));
    $display("b = %0d, K = %0d, %s: %0d instructions, %0d cycles, %0d stall cycles",
             BV[k], KV[k], name, instret[k], cycles[k], estall[k]);
  endtask

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint signed v, arr [NSORT];
    logic [31:0] st0;
    int sz, lat;
    kp[0] = 256'd4294967291;           kq[0] = 256'd4294967279;
    kp[1] = 256'd18446744073709551557; kq[1] = 256'd18446744073709551533;
    for (int k = 0; k < NK; k++) begin
      kn[k]   = kp[k] * kq[k];
      kn2[k]  = kn[k] * kn[k];
      klam[k] = (kp[k] - 1) * (kq[k] - 1) / gcd_w(kp[k] - 1, kq[k] - 1);
      kmu[k]  = modinv_w(klam[k] % kn[k], kn[k]);
      v = 123456789;
      check(dec_w(k, enc_w(k, v)) == v && dec_w(k, enc_w(k, -v)) == -v,
            $sformatf("b = %0d: reference key round trip", BV[k]));
    end

    for (int k = 0; k < NK; k++) begin
      sz  = BV[k] / 2;                  // bytes of one ciphertext pair (4b/8)
      lat = 24 * BV[k] * BV[k] / KV[k];
      // part 1: one EADD, measured as the difference of two runs
      prog = '{ELD(0, 0, 0), N2MOV(0), ADDIK(4, 0, sz), ELD(1, 0, 4),
               ADDIK(4, 0, 2 * sz), ELD(2, 0, 4), ADDIK(4, 0, 3 * sz), EST(1, 0, 4), HALT()};
      load(k);
      ct_write(k, sz, pair_w(k, 1_000_000_007));
      ct_write(k, 2 * sz, pair_w(k, -2_000_000_011));
      go(k, 10000, "without EADD");
      st0 = estall[k];
      prog = '{ELD(0, 0, 0), N2MOV(0), ADDIK(4, 0, sz), ELD(1, 0, 4),
               ADDIK(4, 0, 2 * sz), ELD(2, 0, 4), ADDIK(4, 0, 3 * sz), EADD(1, 1, 2),
               EST(1, 0, 4), HALT()};
      load(k);
      go(k, 10000, "with EADD");
      check(estall[k] - st0 == lat + 1,
            $sformatf("b = %0d: EADD stalled %0d cycles, expected %0d", BV[k], estall[k] - st0, lat + 1));
      value_at(k, 3 * sz, v);
      check(v == -1_000_000_004, $sformatf("b = %0d: EADD result %0d", BV[k], v));

      // part 2: bubble sort; elements are sz bytes apart from address 256
      prog = '{ELD(0, 0, 0), N2MOV(0), ADDIK(5, 0, 256), ADDIK(6, 0, NSORT - 1),
               ADDIK(7, 0, 0), ADDK(8, 6, 0),
               ELD(1, 5, 7), ADDIK(9, 7, sz), ELD(2, 5, 9), ESUB(3, 2, 1),
               EBRZPOS(3, 12), EST(2, 5, 7), EST(1, 5, 9),
               ADDIK(7, 7, sz), ADDIK(8, 8, -1), BNEI(8, -36),
               ADDIK(6, 6, -1), BNEI(6, -52), HALT()};
      load(k);
      foreach (arr[i]) begin
        arr[i] = longint'($urandom) % 2_000_001 - 1_000_000;
        ct_write(k, 256 + sz * i, pair_w(k, arr[i]));
      end
      queries[k] = 0;
      go(k, 50000000, "bubble sort");
      for (int i = 1; i < NSORT; i++)     // insertion sort of the reference
        for (int j = i; j > 0 && arr[j-1] > arr[j]; j--) begin
          v = arr[j]; arr[j] = arr[j-1]; arr[j-1] = v;
        end
      foreach (arr[i]) begin
        value_at(k, 256 + sz * i, v);
        check(v == arr[i], $sformatf("b = %0d: sort element %0d = %0d, expected %0d",
                                     BV[k], i, v, arr[i]));
      end
      check(queries[k] == NSORT * (NSORT - 1) / 2,
            $sformatf("b = %0d: client queries %0d", BV[k], queries[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

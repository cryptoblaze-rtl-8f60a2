// cb_tb_pkg: testbench helpers for the encrypted-data processor.
//   * A Paillier reference with b = 32: n = 65521 * 65537, g = n + 1,
//     lambda = lcm(p-1, q-1), mu = lambda^-1 mod n.  Enc(m) = g^m r^n mod n^2,
//     Dec(c) = L(c^lambda mod n^2) * mu mod n with L(u) = (u - 1) / n.
//     Plaintexts above n/2 stand for negative numbers.
//   * Negation pairs {Enc(A), Enc(-A)} as the processor stores them.
//   * A small assembler for the instruction encodings of cb_pkg.
package cb_tb_pkg;
  import cb_pkg::*;

  localparam longint unsigned P   = 65521;
  localparam longint unsigned Q   = 65537;
  localparam longint unsigned N   = P * Q;
  localparam logic [63:0]     N2  = N * N;
  localparam longint unsigned LAM = (P - 1) * (Q - 1) / 16;   // gcd(p-1, q-1) = 16

  function automatic logic [63:0] mulmod(logic [63:0] x, logic [63:0] y, logic [63:0] m);
    logic [127:0] t;
    t = {64'd0, x} * {64'd0, y};
    return 64'(t % {64'd0, m});
  endfunction

  function automatic logic [63:0] modexp(logic [63:0] base, logic [63:0] e, logic [63:0] m);
    logic [63:0] r, bb;
    r  = 1;
    bb = base % m;
    for (int i = 0; i < 64; i++) begin
      if (e[i]) r = mulmod(r, bb, m);
      bb = mulmod(bb, bb, m);
    end
    return r;
  endfunction

  function automatic longint unsigned modinv(longint unsigned a, longint unsigned m);
    longint t = 0, nt = 1, r = longint'(m), nr = longint'(a % m), qq, tmp;
    while (nr != 0) begin
      qq = r / nr;
      tmp = t - qq * nt; t = nt; nt = tmp;
      tmp = r - qq * nr; r = nr; nr = tmp;
    end
    if (t < 0) t += longint'(m);
    return longint'(t);
  endfunction

  function automatic logic [63:0] encrypt(longint signed msg);
    longint unsigned mm, r;
    logic [63:0] gm;
    mm = (msg < 0) ? N - longint'((-msg) % longint'(N)) : longint'(msg % longint'(N));
    if (mm == N) mm = 0;
    do r = (longint'({$urandom, $urandom}) & 64'h0000_0000_FFFF_FFFF) % N;
    while (r == 0 || r % P == 0 || r % Q == 0);
    gm = (64'd1 + mulmod(mm, N, N2)) % N2;           // (n+1)^m = 1 + m n mod n^2
    return mulmod(gm, modexp(r, N, N2), N2);
  endfunction

  function automatic longint signed decrypt(logic [63:0] c);
    logic [63:0] u;
    longint unsigned l, mu, mm;
    u  = modexp(c, LAM, N2);
    l  = (u - 1) / N;
    mu = modinv(LAM % N, N);
    mm = 64'(mulmod(l, mu, N));
    return (mm > N / 2) ? longint'(mm) - longint'(N) : longint'(mm);
  endfunction

  // negation pair for b = 32: {Enc(A), Enc(-A)}
  function automatic logic [127:0] enc_pair(longint signed a);
    return {encrypt(a), encrypt(-a)};
  endfunction

  // ---------------- assembler ----------------
  function automatic logic [31:0] t_a(logic [5:0] op, int rd, int ra, int rb, logic [10:0] fn);
    return {op, 5'(rd), 5'(ra), 5'(rb), fn};
  endfunction
  function automatic logic [31:0] t_b(logic [5:0] op, int rd, int ra, int imm);
    return {op, 5'(rd), 5'(ra), 16'(imm)};
  endfunction

  function automatic logic [31:0] ADDK (int d, int a, int b_); return t_a(OP_ADDK,  d, a, b_, 0); endfunction
  function automatic logic [31:0] ADD  (int d, int a, int b_); return t_a(OP_ADD,   d, a, b_, 0); endfunction
  function automatic logic [31:0] ADDC (int d, int a, int b_); return t_a(OP_ADDC,  d, a, b_, 0); endfunction
  function automatic logic [31:0] RSUBK(int d, int a, int b_); return t_a(OP_RSUBK, d, a, b_, 0); endfunction
  function automatic logic [31:0] CMP  (int d, int a, int b_); return t_a(OP_RSUBK, d, a, b_, 1); endfunction
  function automatic logic [31:0] CMPU (int d, int a, int b_); return t_a(OP_RSUBK, d, a, b_, 3); endfunction
  function automatic logic [31:0] MUL  (int d, int a, int b_); return t_a(OP_MUL,   d, a, b_, 0); endfunction
  function automatic logic [31:0] OR_  (int d, int a, int b_); return t_a(OP_OR,    d, a, b_, 0); endfunction
  function automatic logic [31:0] AND_ (int d, int a, int b_); return t_a(OP_AND,   d, a, b_, 0); endfunction
  function automatic logic [31:0] XOR_ (int d, int a, int b_); return t_a(OP_XOR,   d, a, b_, 0); endfunction
  function automatic logic [31:0] SRA  (int d, int a);         return t_a(OP_SHIFT, d, a, 0, 11'h001); endfunction
  function automatic logic [31:0] SRL  (int d, int a);         return t_a(OP_SHIFT, d, a, 0, 11'h041); endfunction
  function automatic logic [31:0] SEXT8(int d, int a);         return t_a(OP_SHIFT, d, a, 0, 11'h060); endfunction
  function automatic logic [31:0] ADDIK(int d, int a, int i);  return t_b(OP_ADDIK, d, a, i); endfunction
  function automatic logic [31:0] RSUBIK(int d, int a, int i); return t_b(OP_RSUBIK, d, a, i); endfunction
  function automatic logic [31:0] ANDI (int d, int a, int i);  return t_b(OP_ANDI,  d, a, i); endfunction
  function automatic logic [31:0] ORI  (int d, int a, int i);  return t_b(OP_ORI,   d, a, i); endfunction
  function automatic logic [31:0] MULI (int d, int a, int i);  return t_b(OP_MULI,  d, a, i); endfunction
  function automatic logic [31:0] IMM  (int i);                return t_b(OP_IMM,   0, 0, i); endfunction
  function automatic logic [31:0] LWI  (int d, int a, int i);  return t_b(OP_LWI,   d, a, i); endfunction
  function automatic logic [31:0] SWI  (int d, int a, int i);  return t_b(OP_SWI,   d, a, i); endfunction
  function automatic logic [31:0] LW   (int d, int a, int b_); return t_a(OP_LW,    d, a, b_, 0); endfunction
  function automatic logic [31:0] SW   (int d, int a, int b_); return t_a(OP_SW,    d, a, b_, 0); endfunction
  function automatic logic [31:0] LBU  (int d, int a, int b_); return t_a(OP_LBU,   d, a, b_, 0); endfunction
  function automatic logic [31:0] LHU  (int d, int a, int b_); return t_a(OP_LHU,   d, a, b_, 0); endfunction
  function automatic logic [31:0] SB   (int d, int a, int b_); return t_a(OP_SB,    d, a, b_, 0); endfunction
  function automatic logic [31:0] SH   (int d, int a, int b_); return t_a(OP_SH,    d, a, b_, 0); endfunction
  function automatic logic [31:0] LBUI (int d, int a, int i);  return t_b(OP_LBUI,  d, a, i); endfunction
  function automatic logic [31:0] LHUI (int d, int a, int i);  return t_b(OP_LHUI,  d, a, i); endfunction
  function automatic logic [31:0] SBI  (int d, int a, int i);  return t_b(OP_SBI,   d, a, i); endfunction
  function automatic logic [31:0] SHI  (int d, int a, int i);  return t_b(OP_SHI,   d, a, i); endfunction
  // unconditional branches: the rA field holds D, A, L
  function automatic logic [31:0] BRI  (int i);                return t_b(OP_BRI, 0, 5'b00000, i); endfunction
  function automatic logic [31:0] BRID (int i);                return t_b(OP_BRI, 0, 5'b10000, i); endfunction
  function automatic logic [31:0] BRLID(int d, int i);         return t_b(OP_BRI, d, 5'b10100, i); endfunction
  function automatic logic [31:0] BRAI (int i);                return t_b(OP_BRI, 0, 5'b01000, i); endfunction
  function automatic logic [31:0] RTSD (int a, int i);         return t_b(OP_RTSD, 5'b10000, a, i); endfunction
  // conditional branches on rA against zero; the rD field holds D and the condition
  function automatic logic [31:0] BEQI (int a, int i);         return t_b(OP_BCCI, 0, a, i); endfunction
  function automatic logic [31:0] BNEI (int a, int i);         return t_b(OP_BCCI, 1, a, i); endfunction
  function automatic logic [31:0] BLTI (int a, int i);         return t_b(OP_BCCI, 2, a, i); endfunction
  function automatic logic [31:0] BGEI (int a, int i);         return t_b(OP_BCCI, 5, a, i); endfunction
  function automatic logic [31:0] BNEID(int a, int i);         return t_b(OP_BCCI, 17, a, i); endfunction
  function automatic logic [31:0] BGT  (int a, int b_);        return t_a(OP_BCC, 4, a, b_, 0); endfunction
  function automatic logic [31:0] HALT ();                     return BRI(0); endfunction
  // encrypted instructions
  function automatic logic [31:0] EADD (int d, int a, int b_); return t_a(OP_ETYPE, d, a, b_, 11'(EF_EADD)); endfunction
  function automatic logic [31:0] ESUB (int d, int a, int b_); return t_a(OP_ETYPE, d, a, b_, 11'(EF_ESUB)); endfunction
  function automatic logic [31:0] EMOV (int d, int a);         return t_a(OP_ETYPE, d, a, 0, 11'(EF_EMOV)); endfunction
  function automatic logic [31:0] N2MOV(int a);                return t_a(OP_ETYPE, 0, a, 0, 11'(EF_N2MOV)); endfunction
  function automatic logic [31:0] ELD  (int d, int a, int b_); return t_a(OP_ETYPE, d, a, b_, 11'(EF_ELD)); endfunction
  function automatic logic [31:0] EST  (int d, int a, int b_); return t_a(OP_ETYPE, d, a, b_, 11'(EF_EST)); endfunction
  function automatic logic [31:0] EBRNEG (int a, int i);       return t_b(OP_EBR, int'(EBR_NEG),  a, i); endfunction
  function automatic logic [31:0] EBRZPOS(int a, int i);       return t_b(OP_EBR, int'(EBR_ZPOS), a, i); endfunction

endpackage

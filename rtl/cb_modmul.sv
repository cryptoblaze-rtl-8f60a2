// cb_modmul: modular multiplier r = (a * b) mod m for Paillier ciphertexts.
//
// This is the "multiplication and division block" of the eALU.  Both steps are
// serial and share one K-bit adder (the eALU's k-bit add/subtract/compare
// unit):
//   * multiplication by addition and shift: for each of the CW bits of a,
//     least significant first, the shifted multiplicand is added into a 2*CW-bit
//     product, one K-bit chunk per cycle (ceil(2*CW/K) cycles per bit);
//   * division by subtraction and shift (restoring, remainder only): for each
//     of the 2*CW product bits, most significant first, the bit is shifted into
//     the partial remainder, the remainder is compared with m (one pass of
//     ceil(CW/K) cycles) and m is subtracted when it fits (a second pass).
// With CW = 2b and K dividing 2b this takes 8b^2/K + 16b^2/K = 24b^2/K cycles,
// the figure the design is characterised by.  When the adder is at least
// 4b = 2*CW bits wide the remainder fits in one pass with room to spare, and
// compare and subtract share a single cycle (MERGE), so K = 4b also takes
// 2b + 4b = 6b = 24b^2/K cycles; wider adders cannot go below 6b.  The count
// does not depend on the data.  The serial schedule and the 24b^2/K total
// follow the document; the exact state machine, the compare-then-subtract
// split and the handshake are this implementation's.
//
// Interface: pulse start for one cycle with a, b and m valid (they are sampled
// on that edge).  busy is high while the unit works; done pulses for one cycle
// when r holds the result, exactly CW*ceil(2CW/K) + 4*CW*ceil(CW/K) cycles
// after the start edge (CW*1 + 2*CW*1 when MERGE).  r holds until the next start.  m must be non-zero and
// a, b should be below m.
module cb_modmul #(
  parameter int unsigned CW = 64,   // ciphertext width 2b (b = 32)
  parameter int unsigned K  = 128   // width of the adder/subtractor
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] a,
  input  logic [CW-1:0] b,
  input  logic [CW-1:0] m,
  output logic          busy,
  output logic          done,
  output logic [CW-1:0] r
);
  localparam int unsigned PW  = 2 * CW;             // product width
  localparam int unsigned MC  = (PW + K - 1) / K;   // product chunks
  localparam int unsigned DC  = (CW + K - 1) / K;   // remainder chunks
  localparam int unsigned PWP = MC * K;             // padded product width
  localparam int unsigned RWP = DC * K;             // padded remainder width
  localparam int unsigned MCW = (MC > 1) ? $clog2(MC) : 1;
  localparam int unsigned DCW = (DC > 1) ? $clog2(DC) : 1;
  localparam int unsigned IW  = $clog2(PW + 1);
  localparam bit          MERGE = (K >= 2 * CW);  // compare and subtract in one cycle

  typedef enum logic [1:0] {S_IDLE, S_MUL, S_CMP, S_SUB} state_e;
  state_e st;

  logic [PWP-1:0] prod;     // product accumulator
  logic [PWP-1:0] bsh;      // multiplicand, shifted left once per bit
  logic [CW-1:0]  mplier;   // multiplier, shifted right once per bit
  logic [RWP-1:0] rem;      // partial remainder (low CW bits used)
  logic [RWP-1:0] modr;     // modulus
  logic           top;      // bit shifted out of the remainder
  logic           ge;       // remainder (with top) >= modulus
  logic           carry;    // carry between chunks
  logic [MCW-1:0] mchunk;
  logic [DCW-1:0] dchunk;
  logic [IW-1:0]  iter;     // bit counter of the current phase
  logic [IW-1:0]  pbit;     // next product bit to shift into the remainder

  // the single K-bit adder
  logic [K-1:0] alu_a, alu_b;
  logic         alu_cin;
  logic [K:0]   alu_sum;

  always_comb begin
    if (st == S_MUL) begin
      alu_a   = prod[mchunk*K +: K];
      alu_b   = mplier[0] ? bsh[mchunk*K +: K] : '0;
    end else begin
      alu_a   = rem[dchunk*K +: K];
      alu_b   = ~modr[dchunk*K +: K];
    end
    alu_cin = carry;
    alu_sum = {1'b0, alu_a} + {1'b0, alu_b} + {{K{1'b0}}, alu_cin};
  end

  // subtract step this cycle, and whether m fits into the remainder
  logic sub_step, ge_eff;
  assign sub_step = (st == S_SUB) || (MERGE && st == S_CMP);
  assign ge_eff   = (MERGE && st == S_CMP) ? (top | alu_sum[K]) : ge;

  // register values with the chunk of this cycle written in
  logic [PWP-1:0] prod_next;
  logic [RWP-1:0] rem_next;
  always_comb begin
    prod_next = prod;
    prod_next[mchunk*K +: K] = alu_sum[K-1:0];
    rem_next = rem;
    if (ge_eff) rem_next[dchunk*K +: K] = alu_sum[K-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      prod   <= '0;
      bsh    <= '0;
      mplier <= '0;
      rem    <= '0;
      modr   <= '0;
      top    <= 1'b0;
      ge     <= 1'b0;
      carry  <= 1'b0;
      mchunk <= '0;
      dchunk <= '0;
      iter   <= '0;
      pbit   <= '0;
      done   <= 1'b0;
      r      <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          prod   <= '0;
          bsh    <= PWP'(b);
          mplier <= a;
          modr   <= RWP'(m);
          carry  <= 1'b0;
          mchunk <= '0;
          iter   <= '0;
          st     <= S_MUL;
        end
        S_MUL: begin
          prod  <= prod_next;
          carry <= alu_sum[K];
          if (mchunk == MCW'(MC - 1)) begin
            mchunk <= '0;
            carry  <= 1'b0;
            bsh    <= bsh << 1;
            mplier <= mplier >> 1;
            if (iter == IW'(CW - 1)) begin
              // product complete: shift its top bit into the remainder
              rem    <= RWP'(prod_next[PW-1]);
              top    <= 1'b0;
              pbit   <= IW'(PW - 2);
              iter   <= '0;
              dchunk <= '0;
              carry  <= 1'b1;
              st     <= S_CMP;
            end else begin
              iter <= iter + 1'b1;
            end
          end else begin
            mchunk <= mchunk + 1'b1;
          end
        end
        S_CMP, S_SUB: begin
          carry <= alu_sum[K];
          if (!sub_step) begin
            // compare pass
            if (dchunk == DCW'(DC - 1)) begin
              ge     <= top | alu_sum[K];
              dchunk <= '0;
              carry  <= 1'b1;
              st     <= S_SUB;
            end else begin
              dchunk <= dchunk + 1'b1;
            end
          end else begin
            // subtract pass (merged with the compare when MERGE)
            rem <= rem_next;
            if (dchunk == DCW'(DC - 1)) begin
              dchunk <= '0;
              carry  <= 1'b1;
              if (iter == IW'(PW - 1)) begin
                r    <= rem_next[CW-1:0];
                done <= 1'b1;
                st   <= S_IDLE;
              end else begin
                rem  <= RWP'({rem_next[CW-2:0], prod[pbit[$clog2(PWP)-1:0]]});
                top  <= rem_next[CW-1];
                pbit <= pbit - 1'b1;
                iter <= iter + 1'b1;
                st   <= S_CMP;
              end
            end else begin
              dchunk <= dchunk + 1'b1;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

endmodule

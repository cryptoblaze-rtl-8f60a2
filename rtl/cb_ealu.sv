// cb_ealu: encrypted ALU for EADD and ESUB.
//
// An encrypted operand is a negation pair {Enc(A), Enc(-A)}: Enc(A) in the
// upper 2b bits, Enc(-A) in the lower 2b bits.  Paillier addition of two
// ciphertexts is their product modulo n^2, so
//   EADD: hi = a.hi * b.hi mod n^2,  lo = a.lo * b.lo mod n^2
//         giving {Enc(A+B), Enc(-A-B)};
//   ESUB: hi = a.hi * b.lo mod n^2,  lo = a.lo * b.hi mod n^2
//         giving {Enc(A-B), Enc(B-A)}.
// Both halves are computed at the same time by two cb_modmul units, as the
// document describes; the unit is busy for 24b^2/K cycles (K a power of two
// up to 4b) and the processor stalls on it.  Which half holds Enc(A) is this
// implementation's choice.
//
// Interface: pulse start with op, era, erb and n2 valid (sampled on that
// edge); done pulses for one cycle with result valid; result holds until the
// next start.
module cb_ealu
  import cb_pkg::*;
#(
  parameter int unsigned B = 32,    // bit size of the Paillier modulus n
  parameter int unsigned K = 128    // ALU width
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  ealu_op_e        op,
  input  logic [4*B-1:0]  era,
  input  logic [4*B-1:0]  erb,
  input  logic [2*B-1:0]  n2,
  output logic            busy,
  output logic            done,
  output logic [4*B-1:0]  result
);
  localparam int unsigned CW = 2 * B;

  logic [CW-1:0] a_hi, a_lo, b_hi, b_lo;
  logic [CW-1:0] op_hi_b, op_lo_b, r_hi, r_lo;
  logic          busy_hi, busy_lo, done_hi, done_lo;

  assign {a_hi, a_lo} = era;
  assign {b_hi, b_lo} = erb;
  // ESUB pairs each half of a with the opposite half of b
  assign op_hi_b = (op == EALU_SUB) ? b_lo : b_hi;
  assign op_lo_b = (op == EALU_SUB) ? b_hi : b_lo;

  cb_modmul #(.CW(CW), .K(K)) u_hi (
    .clk, .rst_n, .start, .a(a_hi), .b(op_hi_b), .m(n2),
    .busy(busy_hi), .done(done_hi), .r(r_hi)
  );
  cb_modmul #(.CW(CW), .K(K)) u_lo (
    .clk, .rst_n, .start, .a(a_lo), .b(op_lo_b), .m(n2),
    .busy(busy_lo), .done(done_lo), .r(r_lo)
  );

  assign busy   = busy_hi | busy_lo;
  assign done   = done_hi & done_lo;
  assign result = {r_hi, r_lo};

  // both halves take the same, data-independent number of cycles
  a_halves_together: assert property (@(posedge clk) disable iff (!rst_n) done_hi == done_lo);

endmodule

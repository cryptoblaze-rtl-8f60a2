// cb_client_model: behavioural model of the client that holds the private key.
// It collects a 64-bit ciphertext Enc(A) from the processor's client link
// (32-bit words, least significant first, the last one flagged), decrypts it
// with the reference key of cb_tb_pkg and answers with the sign of A
// LATENCY cycles later.  It accepts a word only every other cycle, to
// exercise the ready handshake.  It counts queries and negative answers.
module cb_client_model
  import cb_pkg::*;
  import cb_tb_pkg::*;
#(
  parameter int LATENCY = 3
) (
  input  logic        clk,
  input  logic        tx_valid,
  output logic        tx_ready,
  input  logic [31:0] tx_data,
  input  logic        tx_last,
  output logic        rx_valid,
  input  logic        rx_ready,
  output sign_e       rx_sign,
  output int          queries,
  output int          negatives
);
  logic [63:0] ct;
  int          nw, wait_cnt;
  sign_e       pending;

  initial begin
    tx_ready = 0; rx_valid = 0; rx_sign = SIGN_ZERO; pending = SIGN_ZERO;
    queries = 0; negatives = 0; nw = 0; wait_cnt = 0; ct = '0;
  end

  always @(posedge clk) begin
    longint signed v;
    tx_ready <= ~tx_ready;
    if (rx_valid && rx_ready) rx_valid <= 0;
    if (wait_cnt > 0) begin
      wait_cnt = wait_cnt - 1;
      if (wait_cnt == 0) begin
        rx_sign  <= pending;
        rx_valid <= 1;
      end
    end
    if (tx_valid && tx_ready) begin
      ct[32*nw +: 32] = tx_data;
      nw++;
      if (tx_last) begin
        nw = 0;
        v  = decrypt(ct);
        queries++;
        if (v < 0) negatives++;
        pending  = (v < 0) ? SIGN_NEG : (v == 0) ? SIGN_ZERO : SIGN_POS;
        wait_cnt = LATENCY;
      end
    end
  end
endmodule

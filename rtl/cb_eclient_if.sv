// cb_eclient_if: link to the client for the encrypted branches.
//
// With additive homomorphism alone the processor cannot tell whether an
// encrypted value is negative, and it holds no private key.  For EBRNEG and
// EBRZPOS it therefore sends Enc(A), the upper 2b bits of the eRegister, to
// the client, which decrypts it and answers with the sign; the processor
// stalls meanwhile.  The ciphertext goes out as 2b/32 words of 32 bits, least
// significant word first, on a valid/ready channel (tx_*); the answer comes
// back as a 2-bit sign code (cb_pkg::sign_e) on a valid/ready channel (rx_*).
// The client exchange follows the document; the word order, the channels and
// the sign code are this implementation's.
//
// Interface: pulse start with ct valid.  done pulses once the sign has
// arrived; neg is then 1 when the value is negative and zpos when it is zero
// or positive (both held until the next start).
module cb_eclient_if
  import cb_pkg::*;
#(
  parameter int unsigned B = 32     // bit size of n; a ciphertext has 2b bits
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [2*B-1:0] ct,
  output logic           busy,
  output logic           done,
  output logic           neg,
  output logic           zpos,
  // ciphertext words to the client
  output logic           tx_valid,
  input  logic           tx_ready,
  output logic [31:0]    tx_data,
  output logic           tx_last,
  // sign from the client
  input  logic           rx_valid,
  output logic           rx_ready,
  input  sign_e          rx_sign
);
  localparam int unsigned W  = 2 * B / 32;
  localparam int unsigned CW = (W > 1) ? $clog2(W) : 1;

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_WAIT} state_e;
  state_e st;

  logic [2*B-1:0] buffer;
  logic [CW-1:0]  cnt;

  assign busy     = (st != S_IDLE);
  assign tx_valid = (st == S_SEND);
  assign tx_data  = buffer[cnt*32 +: 32];
  assign tx_last  = (cnt == CW'(W - 1));
  assign rx_ready = (st == S_WAIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      buffer <= '0;
      cnt    <= '0;
      done   <= 1'b0;
      neg    <= 1'b0;
      zpos   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          buffer <= ct;
          cnt    <= '0;
          st     <= S_SEND;
        end
        S_SEND: if (tx_ready) begin
          cnt <= cnt + 1'b1;
          if (tx_last) st <= S_WAIT;
        end
        S_WAIT: if (rx_valid) begin
          neg  <= (rx_sign == SIGN_NEG);
          zpos <= (rx_sign != SIGN_NEG);
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // the ciphertext must stay on the channel until the client takes it
  a_tx_stable: assert property (@(posedge clk) disable iff (!rst_n)
    tx_valid && !tx_ready |=> tx_valid && $stable(tx_data));

endmodule

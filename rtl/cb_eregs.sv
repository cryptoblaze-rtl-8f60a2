// cb_eregs: the eRegister file and the keyRegister.
//
// 32 eRegisters of 4b bits each hold negation-pair ciphertexts.  There are two
// combinational read ports (ERa, ERb) and one write port (ERd) written on the
// clock edge; EMOV, EADD, ESUB and ELD write through it.  The keyRegister holds
// n^2, the modulus of Paillier addition; N2MOV loads it from the lower 2b bits
// of an eRegister.  The register count and widths follow the document; the
// number of ports, the half N2MOV copies and reset to zero are this
// implementation's choices.
module cb_eregs #(
  parameter int unsigned B     = 32,   // bit size of n
  parameter int unsigned NREGS = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [$clog2(NREGS)-1:0]  ra_addr,
  output logic [4*B-1:0]            ra_data,
  input  logic [$clog2(NREGS)-1:0]  rb_addr,
  output logic [4*B-1:0]            rb_data,
  input  logic                      we,
  input  logic [$clog2(NREGS)-1:0]  wd_addr,
  input  logic [4*B-1:0]            wd_data,
  input  logic                      kr_we,      // N2MOV: KR <= ERa[2b-1:0]
  output logic [2*B-1:0]            kr
);
  logic [4*B-1:0] er [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) er[i] <= '0;
      kr <= '0;
    end else begin
      if (we) er[wd_addr] <= wd_data;
      if (kr_we) kr <= ra_data[2*B-1:0];
    end
  end

  assign ra_data = er[ra_addr];
  assign rb_data = er[rb_addr];

endmodule

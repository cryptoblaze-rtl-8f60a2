// cb_ram: byte-addressed memory of 32-bit words with two synchronous ports.
//
// In the processor it is the program memory: port A serves instruction
// fetch, and port B lets the host load the (unencrypted) program.  The shared
// data memory is the AXI4 slave cb_axi_ram.
//
// Each port takes one request per cycle: a write stores the
// bytes selected by be; a read returns the word in rdata on the next cycle.
// Addresses are byte addresses; the two low bits are ignored.  Word i holds
// the bytes at addresses 4i..4i+3, byte 4i in bits 7:0 (little-endian).
// The memory is not reset; contents are defined by writing them.
module cb_ram #(
  parameter int unsigned WORDS = 4096
) (
  input  logic        clk,
  // port A
  input  logic        a_req,
  input  logic        a_we,
  input  logic [3:0]  a_be,
  input  logic [31:0] a_addr,
  input  logic [31:0] a_wdata,
  output logic [31:0] a_rdata,
  // port B
  input  logic        b_req,
  input  logic        b_we,
  input  logic [3:0]  b_be,
  input  logic [31:0] b_addr,
  input  logic [31:0] b_wdata,
  output logic [31:0] b_rdata
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];

  wire [AW-1:0] a_idx = a_addr[AW+1:2];
  wire [AW-1:0] b_idx = b_addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (a_req) begin
      if (a_we) begin
        for (int i = 0; i < 4; i++) if (a_be[i]) mem[a_idx][8*i +: 8] <= a_wdata[8*i +: 8];
      end
      a_rdata <= mem[a_idx];
    end
  end

  always_ff @(posedge clk) begin
    if (b_req) begin
      if (b_we) begin
        for (int i = 0; i < 4; i++) if (b_be[i]) mem[b_idx][8*i +: 8] <= b_wdata[8*i +: 8];
      end
      b_rdata <= mem[b_idx];
    end
  end

endmodule

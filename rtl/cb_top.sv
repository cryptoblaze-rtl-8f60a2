// cb_top: the encrypted-data processor with its memories.
//
// The core (cb_core) fetches unencrypted code from a program memory (cb_ram)
// and keeps plain and encrypted data in one shared, byte-addressed data memory
// (cb_axi_ram) reached over a 32-bit AXI4 bus.  The host port of each memory (host_i*, host_d*)
// lets the data owner load the program and the ciphertexts before start and
// read results after halted; it has read data one cycle after a request.
// The client link (cl_*) carries ciphertexts to the client, which holds the
// private key, and brings back their signs for EBRNEG and EBRZPOS.
//
// Parameters: B is the bit size of the Paillier modulus n (an eRegister and an
// encrypted memory operand have 4b bits); K is the width of the eALU adder.
// The defaults, b = 32 and K = 128, are the document's minimum-latency
// configuration for b = 32.  Memory sizes are this implementation's choice.
module cb_top
  import cb_pkg::*;
#(
  parameter int unsigned B          = 32,
  parameter int unsigned K          = 128,
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        halted,
  // host access to the program memory
  input  logic        host_ireq,
  input  logic        host_iwe,
  input  logic [31:0] host_iaddr,
  input  logic [31:0] host_iwdata,
  output logic [31:0] host_irdata,
  // host access to the data memory
  input  logic        host_dreq,
  input  logic        host_dwe,
  input  logic [31:0] host_daddr,
  input  logic [31:0] host_dwdata,
  output logic [31:0] host_drdata,
  // client link
  output logic        cl_tx_valid,
  input  logic        cl_tx_ready,
  output logic [31:0] cl_tx_data,
  output logic        cl_tx_last,
  input  logic        cl_rx_valid,
  output logic        cl_rx_ready,
  input  sign_e       cl_rx_sign,
  // statistics
  output logic [31:0] instret,
  output logic [31:0] cycles,
  output logic [31:0] estall
);
  logic        imem_req;
  logic [31:0] imem_addr, imem_rdata;
  axi_req_t    dbus_req;
  axi_rsp_t    dbus_rsp;

  cb_core #(.B(B), .K(K)) u_core (
    .clk, .rst_n, .start, .halted,
    .imem_req, .imem_addr, .imem_rdata,
    .dbus_req, .dbus_rsp,
    .cl_tx_valid, .cl_tx_ready, .cl_tx_data, .cl_tx_last,
    .cl_rx_valid, .cl_rx_ready, .cl_rx_sign,
    .instret, .cycles, .estall
  );

  cb_ram #(.WORDS(IMEM_WORDS)) u_imem (
    .clk,
    .a_req(imem_req), .a_we(1'b0), .a_be(4'h0), .a_addr(imem_addr),
    .a_wdata(32'd0), .a_rdata(imem_rdata),
    .b_req(host_ireq), .b_we(host_iwe), .b_be(4'hF), .b_addr(host_iaddr),
    .b_wdata(host_iwdata), .b_rdata(host_irdata)
  );

  cb_axi_ram #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .rst_n,
    .axi_req(dbus_req), .axi_rsp(dbus_rsp),
    .host_req(host_dreq), .host_we(host_dwe), .host_addr(host_daddr),
    .host_wdata(host_dwdata), .host_rdata(host_drdata)
  );

endmodule

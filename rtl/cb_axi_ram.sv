// cb_axi_ram: the shared data memory as a 32-bit AXI4 slave.
//
// Byte-addressed memory of 32-bit words that holds plain and encrypted data
// alike.  The AXI side serves one transaction at a time, reads before writes
// when both arrive together, and INCR bursts of up to 256 beats at one beat
// per cycle: the word of each R beat is read ahead, on the address handshake
// and on every accepted beat, so a burst of n beats takes n cycles after AR.
// Writes honour wstrb; B follows the last W beat.  Responses are always OKAY.
// A second, plain port lets the host load and read data: a request with
// host_we writes, and host_rdata holds the word one cycle after a request.
// Little-endian: byte address 4i+j is bits 8j+7..8j of word i.  The memory is
// not reset.  The AXI behaviour follows the document's 32-bit AXI bus; the
// host port and the size are this implementation's.
module cb_axi_ram
  import cb_pkg::*;
#(
  parameter int unsigned WORDS = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  axi_req_t    axi_req,
  output axi_rsp_t    axi_rsp,
  // host port
  input  logic        host_req,
  input  logic        host_we,
  input  logic [31:0] host_addr,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata
);
  localparam int unsigned AW = $clog2(WORDS);

  typedef enum logic [1:0] {S_IDLE, S_R, S_W, S_B} state_e;
  state_e st;

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] ptr;       // word of the current beat
  logic [7:0]    left;      // beats left after the current one
  logic [31:0]   rword;     // read-ahead word

  wire [AW-1:0] ar_idx = axi_req.araddr[AW+1:2];
  wire [AW-1:0] aw_idx = axi_req.awaddr[AW+1:2];

  always_comb begin
    axi_rsp         = '0;
    axi_rsp.arready = (st == S_IDLE);
    axi_rsp.awready = (st == S_IDLE) && !axi_req.arvalid;
    axi_rsp.rvalid  = (st == S_R);
    axi_rsp.rdata   = rword;
    axi_rsp.rlast   = (st == S_R) && (left == 8'd0);
    axi_rsp.wready  = (st == S_W);
    axi_rsp.bvalid  = (st == S_B);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      ptr  <= '0;
      left <= '0;
    end else begin
      unique case (st)
        S_IDLE: begin
          if (axi_req.arvalid) begin
            ptr  <= ar_idx;
            left <= axi_req.arlen;
            st   <= S_R;
          end else if (axi_req.awvalid) begin
            ptr  <= aw_idx;
            left <= axi_req.awlen;
            st   <= S_W;
          end
        end
        S_R: if (axi_req.rready) begin
          ptr  <= ptr + 1'b1;
          left <= left - 1'b1;
          if (left == 8'd0) st <= S_IDLE;
        end
        S_W: if (axi_req.wvalid) begin
          ptr  <= ptr + 1'b1;
          left <= left - 1'b1;
          if (axi_req.wlast) st <= S_B;
        end
        S_B: if (axi_req.bready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // memory array: AXI reads ahead and writes, host port
  always_ff @(posedge clk) begin
    if (st == S_IDLE && axi_req.arvalid) rword <= mem[ar_idx];
    else if (st == S_R && axi_req.rready) rword <= mem[ptr + 1'b1];
    if (st == S_W && axi_req.wvalid)
      for (int i = 0; i < 4; i++)
        if (axi_req.wstrb[i]) mem[ptr][8*i +: 8] <= axi_req.wdata[8*i +: 8];
  end

  always_ff @(posedge clk) begin
    if (host_req) begin
      if (host_we) mem[host_addr[AW+1:2]] <= host_wdata;
      host_rdata <= mem[host_addr[AW+1:2]];
    end
  end

  // a write burst must end with wlast exactly on its last beat
  a_wlast: assert property (@(posedge clk) disable iff (!rst_n)
    st == S_W && axi_req.wvalid |-> axi_req.wlast == (left == 8'd0));

endmodule

// cb_emem: AXI4 load/store unit for ELD, EST and the integer loads and stores.
//
// Encrypted data live in the same byte-addressed memory as plain data and
// move over the processor's 32-bit AXI bus.  ELD and EST are single INCR
// bursts of 4b/32 beats, so an eRegister crosses the bus in 4b/32 data cycles
// as in the document; integer loads and stores are one-beat bursts, and a
// byte or halfword store sets only its lanes' write strobes.  Word i of a
// ciphertext (bits 32i+31..32i, least significant word first) sits at byte
// address addr + 4i; that order is this implementation's choice.
//
// Interface: pulse start with store, nwords (1 .. 4b/32), addr, strb and
// wdata valid (sampled then; strb applies to every beat of a store and addr
// is aligned down to a word).  A read sends AR, then takes one R beat per cycle the
// slave offers; a write sends AW, streams the W beats (wlast on the last) and
// waits for B.  done pulses when the burst is over; a load's words are then in
// rdata (word i in bits 32i+31..32i, held until the next load) and err shows
// an error response.  With a slave that answers at once (cb_axi_ram), done
// comes nwords + 1 cycles after the start edge for a load (AR, then one R
// beat per cycle) and nwords + 2 for a store (AW, W beats, B).  One
// transaction is outstanding at a time.
module cb_emem
  import cb_pkg::*;
#(
  parameter int unsigned B = 32     // bit size of n; an eRegister has 4b bits
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           store,
  input  logic [$clog2(4*B/32+1)-1:0] nwords,
  input  logic [31:0]    addr,
  input  logic [3:0]     strb,
  input  logic [4*B-1:0] wdata,
  output logic           busy,
  output logic           done,
  output logic           err,
  output logic [4*B-1:0] rdata,
  // AXI4 master
  output axi_req_t       axi_req,
  input  axi_rsp_t       axi_rsp
);
  localparam int unsigned W  = 4 * B / 32;               // words per eRegister
  localparam int unsigned CW = (W > 1) ? $clog2(W) : 1;

  typedef enum logic [2:0] {S_IDLE, S_AR, S_R, S_AW, S_W, S_B} state_e;
  state_e st;

  logic [31:0]    base;
  logic [4*B-1:0] buffer;
  logic [7:0]     len;      // beats - 1
  logic [3:0]     strb_q;
  logic [CW-1:0]  idx;      // beat counter

  assign busy  = (st != S_IDLE);
  assign rdata = buffer;

  always_comb begin
    axi_req         = '0;
    axi_req.arvalid = (st == S_AR);
    axi_req.araddr  = base;
    axi_req.arlen   = len;
    axi_req.rready  = (st == S_R);
    axi_req.awvalid = (st == S_AW);
    axi_req.awaddr  = base;
    axi_req.awlen   = len;
    axi_req.wvalid  = (st == S_W);
    axi_req.wdata   = buffer[idx*32 +: 32];
    axi_req.wstrb   = strb_q;
    axi_req.wlast   = (8'(idx) == len);
    axi_req.bready  = (st == S_B);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      base   <= '0;
      buffer <= '0;
      len    <= '0;
      strb_q <= '0;
      idx    <= '0;
      done   <= 1'b0;
      err    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          base   <= {addr[31:2], 2'b00};
          buffer <= wdata;
          len    <= 8'(nwords) - 8'd1;
          strb_q <= strb;
          idx    <= '0;
          err    <= 1'b0;
          st     <= store ? S_AW : S_AR;
        end
        S_AR: if (axi_rsp.arready) st <= S_R;
        S_R: if (axi_rsp.rvalid) begin
          buffer[idx*32 +: 32] <= axi_rsp.rdata;
          idx <= idx + 1'b1;
          if (axi_rsp.rresp != 2'b00) err <= 1'b1;
          if (axi_rsp.rlast) begin
            done <= 1'b1;
            st   <= S_IDLE;
          end
        end
        S_AW: if (axi_rsp.awready) st <= S_W;
        S_W: if (axi_rsp.wready) begin
          idx <= idx + 1'b1;
          if (axi_req.wlast) st <= S_B;
        end
        S_B: if (axi_rsp.bvalid) begin
          if (axi_rsp.bresp != 2'b00) err <= 1'b1;
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // AXI rule: a valid signal stays high, with its payload, until accepted
  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
    axi_req.arvalid && !axi_rsp.arready |=> axi_req.arvalid && $stable(axi_req.araddr));
  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
    axi_req.awvalid && !axi_rsp.awready |=> axi_req.awvalid && $stable(axi_req.awaddr));
  a_w_hold: assert property (@(posedge clk) disable iff (!rst_n)
    axi_req.wvalid && !axi_rsp.wready |=> axi_req.wvalid && $stable(axi_req.wdata));

endmodule

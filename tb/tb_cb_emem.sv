// tb_cb_emem: the AXI4 load/store unit against a behavioural AXI slave.
// Phase 1, slave always ready: EST and ELD of 128-bit ciphertexts (b = 32)
// must be single 4-beat INCR bursts with the beats on consecutive cycles, the
// words at addr + 4i in order, and done nwords + 2 cycles (store) or
// nwords + 1 cycles (load) after start; one-word transfers are checked too,
// with a byte-strobed store that must change only the selected bytes.
// Phase 2, the slave stalls at random on every channel: data must still be
// right, and the unit's AXI assertions must hold.  An error response must
// raise err.
module tb_cb_emem;
  import cb_pkg::*;
  localparam int B = 32, W = 4 * B / 32;
  logic clk = 0, rst_n = 0, start = 0, store = 0;
  always #5 clk = ~clk;
  logic [2:0] nwords = 0;
  logic [31:0] addr = 0;
  logic [3:0] strb = 4'hF;
  logic [127:0] wdata = 0, rdata;
  logic busy, done, err;
  axi_req_t axi_req;
  axi_rsp_t axi_rsp;

  cb_emem dut (.*);

  // ---------------- behavioural slave ----------------
  logic [31:0] mem [256];
  bit   stall_mode = 0, err_mode = 0;
  int   ar_count = 0, aw_count = 0, rbeats = 0, wbeats = 0, gaps = 0;
  logic [7:0] rlen, wlen;
  logic [7:0] rptr, wptr;
  int   rleft = -1, wleft = -1;
  bit   bpend = 0;
  int   last_rbeat_cyc = -10, last_wbeat_cyc = -10, cyc_now = 0;

  always @(posedge clk) cyc_now++;

  always @(negedge clk) begin
    axi_rsp.arready <= (rleft < 0) && (!stall_mode || $urandom % 2);
    axi_rsp.awready <= (wleft < 0) && !bpend && (!stall_mode || $urandom % 2);
    axi_rsp.wready  <= (wleft >= 0) && (!stall_mode || $urandom % 2);
    axi_rsp.rvalid  <= (rleft >= 0) && (!stall_mode || $urandom % 2);
    axi_rsp.rdata   <= mem[rptr];
    axi_rsp.rlast   <= (rleft == 0);
    axi_rsp.rresp   <= err_mode ? 2'b10 : 2'b00;
    axi_rsp.bvalid  <= bpend && (!stall_mode || $urandom % 2);
    axi_rsp.bresp   <= 2'b00;
  end

  always @(posedge clk) begin
    if (axi_req.arvalid && axi_rsp.arready) begin
      ar_count++; rptr = axi_req.araddr[9:2]; rleft = axi_req.arlen; rlen = axi_req.arlen;
    end else if (axi_req.rready && axi_rsp.rvalid) begin
      rbeats++;
      if (!stall_mode && last_rbeat_cyc != cyc_now - 1 && rleft != int'(rlen)) gaps++;
      last_rbeat_cyc = cyc_now;
      rptr++; rleft--;
    end
    if (axi_req.awvalid && axi_rsp.awready) begin
      aw_count++; wptr = axi_req.awaddr[9:2]; wleft = axi_req.awlen; wlen = axi_req.awlen;
    end else if (axi_req.wvalid && axi_rsp.wready) begin
      wbeats++;
      if (!stall_mode && last_wbeat_cyc != cyc_now - 1 && wleft != int'(wlen)) gaps++;
      last_wbeat_cyc = cyc_now;
      if (axi_req.wlast != (wleft == 0)) begin failures++; $display("FAIL wlast"); end
      for (int j = 0; j < 4; j++)
        if (axi_req.wstrb[j]) mem[wptr][8*j +: 8] = axi_req.wdata[8*j +: 8];
      wptr++; wleft--;
      if (wleft < 0) bpend = 1;
    end
    if (axi_req.bready && axi_rsp.bvalid) bpend = 0;
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic xfer(bit st, int nw, int a, logic [127:0] d, output int cyc);
    @(negedge clk); start = 1; store = st; nwords = 3'(nw); addr = a; wdata = d;
    @(negedge clk); start = 0; wdata = '0; addr = '0;
    cyc = 0;
    while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [127:0] v [4];
    int cyc, ar0, aw0, rb0, wb0;
    axi_rsp = '0;
    for (int i = 0; i < 256; i++) mem[i] = 32'hDEAD_0000 + i;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      stall_mode = (phase == 1);
      for (int k = 0; k < 4; k++) begin
        v[k] = {$urandom, $urandom, $urandom, $urandom};
        aw0 = aw_count; wb0 = wbeats;
        xfer(1, W, 64 + 16*k, v[k], cyc);
        check(done, "EST finished");
        if (!stall_mode) check(cyc == W + 2, $sformatf("EST took %0d cycles, expected %0d", cyc, W + 2));
        check(aw_count == aw0 + 1 && wbeats == wb0 + W, "EST is one burst of 4b/32 beats");
      end
      for (int k = 0; k < 4; k++)
        for (int i = 0; i < W; i++)
          check(mem[16 + 4*k + i] == v[k][32*i +: 32], $sformatf("word %0d of value %0d in memory", i, k));
      check(mem[15] == 32'hDEAD_000F && mem[32] == 32'hDEAD_0020, "neighbouring words changed");
      for (int k = 3; k >= 0; k--) begin
        ar0 = ar_count; rb0 = rbeats;
        xfer(0, W, 64 + 16*k, '0, cyc);
        if (!stall_mode) check(cyc == W + 1, $sformatf("ELD took %0d cycles, expected %0d", cyc, W + 1));
        check(ar_count == ar0 + 1 && rbeats == rb0 + W, "ELD is one burst of 4b/32 beats");
        check(rdata == v[k], $sformatf("ELD value %0d: %h", k, rdata));
        check(!err, "error flag without error response");
      end
      // single words (integer LW/SW)
      xfer(1, 1, 200, {96'd0, 32'h1234_5678 + phase}, cyc);
      check(mem[50] == 32'h1234_5678 + phase && mem[51] == 32'hDEAD_0033, "single-word store");
      xfer(0, 1, 200, '0, cyc);
      check(rdata[31:0] == 32'h1234_5678 + phase, "single-word load");
      // byte lanes 1 and 3 only
      strb = 4'b1010;
      xfer(1, 1, 200, {96'd0, 32'hAABB_CCDD}, cyc);
      strb = 4'hF;
      check(mem[50] == {8'hAA, 8'(32'h1234_5678 + phase >> 16), 8'hCC, 8'(32'h1234_5678 + phase)},
            $sformatf("strobed store wrote %h", mem[50]));
    end
    check(gaps == 0, $sformatf("%0d gaps between beats with a ready slave", gaps));
    err_mode = 1;
    xfer(0, W, 64, '0, cyc);
    check(err, "error response not reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cb_axi_ram: drives the AXI4 slave data memory as a master would.
// Fills memory through the host port, then runs random INCR bursts of 1 to 8
// beats: writes with random strobes and random wvalid gaps, reads with
// random rready gaps, all checked against a model.  With rready held high a
// read burst of n beats must deliver its beats on n consecutive cycles right
// after the AR handshake, with rlast on the last; B must follow each write.
module tb_cb_axi_ram;
  import cb_pkg::*;
  localparam int WORDS = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  axi_req_t axi_req;
  axi_rsp_t axi_rsp;
  logic host_req = 0, host_we = 0;
  logic [31:0] host_addr = 0, host_wdata = 0, host_rdata;

  cb_axi_ram #(.WORDS(WORDS)) dut (.*);

  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr_burst(int w0, int n);
    int guard;
    @(negedge clk);
    axi_req.awvalid = 1; axi_req.awaddr = 4*w0; axi_req.awlen = 8'(n - 1);
    do @(posedge clk); while (!axi_rsp.awready);
    @(negedge clk); axi_req.awvalid = 0;
    for (int i = 0; i < n; i++) begin
      while ($urandom % 3 == 0) @(negedge clk);
      axi_req.wvalid = 1; axi_req.wdata = $urandom; axi_req.wstrb = 4'($urandom);
      axi_req.wlast = (i == n - 1);
      do @(posedge clk); while (!axi_rsp.wready);
      for (int j = 0; j < 4; j++)
        if (axi_req.wstrb[j]) model[(w0 + i) % WORDS][8*j +: 8] = axi_req.wdata[8*j +: 8];
      @(negedge clk); axi_req.wvalid = 0; axi_req.wlast = 0;
    end
    axi_req.bready = 1;
    guard = 0;
    do begin @(posedge clk); guard++; end while (!axi_rsp.bvalid && guard < 20);
    check(axi_rsp.bvalid && axi_rsp.bresp == 2'b00, "write response");
    @(negedge clk); axi_req.bready = 0;
  endtask

  task automatic rd_burst(int w0, int n, bit stall);
    int got = 0, cyc = 0, first = -1, last = -1;
    @(negedge clk);
    axi_req.arvalid = 1; axi_req.araddr = 4*w0; axi_req.arlen = 8'(n - 1);
    do @(posedge clk); while (!axi_rsp.arready);
    @(negedge clk); axi_req.arvalid = 0;
    while (got < n && cyc < 100) begin
      axi_req.rready = stall ? ($urandom % 2) : 1'b1;
      @(posedge clk);
      if (axi_req.rready && axi_rsp.rvalid) begin
        check(axi_rsp.rdata == model[(w0 + got) % WORDS], $sformatf("read word %0d of burst at %0d", got, w0));
        check(axi_rsp.rlast == (got == n - 1), "rlast");
        if (first < 0) first = cyc;
        last = cyc;
        got++;
      end
      @(negedge clk);
      cyc++;
    end
    axi_req.rready = 0;
    check(got == n, "read burst incomplete");
    if (!stall) check(first == 0 && last == n - 1, $sformatf("beats on cycles %0d..%0d of a %0d-beat burst", first, last, n));
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    axi_req = '0;
    for (int i = 0; i < WORDS; i++) begin
      model[i] = $urandom;
      @(negedge clk); host_req = 1; host_we = 1; host_addr = 4*i; host_wdata = model[i];
    end
    @(negedge clk); host_req = 0; host_we = 0;
    rst_n = 1;
    for (int k = 0; k < 60; k++) begin
      int w0, n;
      w0 = $urandom % (WORDS - 8); n = 1 + $urandom % 8;
      unique case (k % 3)
        0: wr_burst(w0, n);
        1: rd_burst(w0, n, 1'b0);
        default: rd_burst(w0, n, 1'b1);
      endcase
    end
    for (int i = 0; i < WORDS; i += 7) begin
      @(negedge clk); host_req = 1; host_addr = 4*i;
      @(negedge clk); host_req = 0;
      check(host_rdata == model[i], $sformatf("host read word %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

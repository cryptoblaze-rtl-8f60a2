// tb_cb_core: runs one program on the core with a behavioural program memory
// (one cycle of read latency), the AXI data memory cb_axi_ram and the
// behavioural client.  The program covers the integer subset: add/subtract
// with carry, CMP/CMPU, an IMM prefix, MULI, shifts, sign extension, a call
// with link and delay slot (BRLID/RTSD), a counted loop closed by a
// conditional branch with delay slot, word, halfword and byte loads and
// stores in register and immediate form; then the encrypted path: ELD, N2MOV, EADD, ESUB, EST, and taken and
// untaken EBRNEG/EBRZPOS.  Registers are stored to memory and compared with
// values worked out by hand; the encrypted result is decrypted.  It also
// checks the three-cycle timing of a simple instruction.
module tb_cb_core;
  import cb_pkg::*;
  import cb_tb_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  logic halted, imem_req;
  logic [31:0] imem_addr, imem_rdata;
  axi_req_t dbus_req;
  axi_rsp_t dbus_rsp;
  logic [31:0] host_rdata;
  logic cl_tx_valid, cl_tx_ready, cl_tx_last, cl_rx_valid, cl_rx_ready;
  logic [31:0] cl_tx_data;
  sign_e cl_rx_sign;
  logic [31:0] instret, cycles, estall;
  int queries, negatives;

  cb_core dut (.*);
  cb_client_model u_client (
    .clk, .tx_valid(cl_tx_valid), .tx_ready(cl_tx_ready), .tx_data(cl_tx_data),
    .tx_last(cl_tx_last), .rx_valid(cl_rx_valid), .rx_ready(cl_rx_ready),
    .rx_sign(cl_rx_sign), .queries, .negatives
  );

  logic [31:0] imem [256];
  always @(posedge clk) if (imem_req) imem_rdata <= imem[imem_addr[9:2]];

  // data memory: the AXI slave of the design, preloaded and read back directly
  cb_axi_ram #(.WORDS(512)) u_dmem (
    .clk, .rst_n, .axi_req(dbus_req), .axi_rsp(dbus_rsp),
    .host_req(1'b0), .host_we(1'b0), .host_addr(32'd0), .host_wdata(32'd0),
    .host_rdata(host_rdata)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] p [$];
    logic [31:0] expv [24];
    logic [127:0] c;
    int n, t0;
    p = '{ADDIK(1, 0, 100), ADDIK(2, 0, -7), ADDK(3, 1, 2), RSUBK(4, 2, 1),
          CMPU(5, 1, 2), CMP(6, 2, 1), IMM(16'h1234), ORI(7, 0, 16'h5678),
          ADDIK(9, 0, -1), ADD(10, 9, 9), ADDC(11, 0, 0), MULI(12, 1, 3),
          SRA(13, 2), SRL(14, 2), ADDIK(17, 0, 240), SEXT8(16, 17),
          BRLID(15, 32), ADDIK(18, 0, 5),                        // 16, 17
          ADDIK(21, 0, 3), ADDIK(22, 22, 10), ADDIK(21, 21, -1), // 18..20
          BNEID(21, -8), ADDIK(23, 23, 1), BRI(16),              // 21..23
          ADDIK(19, 0, 9), RTSD(15, 8), ADDIK(20, 0, 1)};        // 24..26: subroutine
    for (int i = 1; i < 24; i++) p.push_back(SWI(i, 0, 32'h200 + 4*i));
    p.push_back(ADDIK(24, 0, 32'h200));
    p.push_back(ADDIK(25, 0, 12));
    p.push_back(LW(26, 24, 25));
    p.push_back(SWI(26, 0, 32'h300));
    // byte and halfword accesses on the word at 0x320 (little-endian lanes)
    p.push_back(SWI(7, 0, 32'h320));     // 12345678
    p.push_back(SBI(1, 0, 32'h321));     // 12346478
    p.push_back(SHI(2, 0, 32'h322));     // FFF96478
    p.push_back(LBUI(8, 0, 32'h323));    // FF
    p.push_back(ADDIK(25, 0, 32'h122));
    p.push_back(LHU(9, 24, 25));         // FFF9
    p.push_back(LBUI(10, 0, 32'h320));   // 78
    p.push_back(LHUI(11, 0, 32'h320));   // 6478
    p.push_back(SB(1, 24, 25));          // FF646478
    p.push_back(ADDIK(25, 0, 32'h130));
    p.push_back(SH(2, 24, 25));          // 0000FFF9 at 0x330
    p.push_back(LBU(12, 24, 25));        // F9
    p.push_back(SWI(8, 0, 32'h340));
    p.push_back(SWI(9, 0, 32'h344));
    p.push_back(SWI(10, 0, 32'h348));
    p.push_back(SWI(11, 0, 32'h34C));
    p.push_back(SWI(12, 0, 32'h350));
    // encrypted part
    p.push_back(ELD(0, 0, 0));
    p.push_back(N2MOV(0));
    p.push_back(ADDIK(27, 0, 16));
    p.push_back(ELD(1, 0, 27));
    p.push_back(ADDIK(27, 0, 32));
    p.push_back(ELD(2, 0, 27));
    p.push_back(EADD(3, 1, 2));
    p.push_back(ADDIK(27, 0, 48));
    p.push_back(EST(3, 0, 27));
    p.push_back(EBRZPOS(3, 8));     // 42 >= 0: taken, skips the next
    p.push_back(ADDIK(28, 0, 1));
    p.push_back(ESUB(4, 1, 2));     // 20 - 22 = -2
    p.push_back(EBRNEG(4, 8));      // taken
    p.push_back(ADDIK(29, 0, 1));
    p.push_back(EBRNEG(3, 8));      // not taken
    p.push_back(ADDIK(30, 0, 1));
    p.push_back(EBRZPOS(4, 8));     // not taken
    p.push_back(ADDIK(31, 0, 1));
    p.push_back(SWI(28, 0, 32'h304));
    p.push_back(SWI(29, 0, 32'h308));
    p.push_back(SWI(30, 0, 32'h30C));
    p.push_back(SWI(31, 0, 32'h310));
    p.push_back(HALT());
    for (int i = 0; i < 256; i++) imem[i] = (i < p.size()) ? p[i] : HALT();
    for (int i = 0; i < 512; i++) u_dmem.mem[i] = 0;
    c = {64'd0, N2};   for (int i = 0; i < 4; i++) u_dmem.mem[i]     = c[32*i +: 32];
    c = enc_pair(20);  for (int i = 0; i < 4; i++) u_dmem.mem[4 + i] = c[32*i +: 32];
    c = enc_pair(22);  for (int i = 0; i < 4; i++) u_dmem.mem[8 + i] = c[32*i +: 32];

    expv = '{0, 100, -7, 93, 107, 32'h7FFF_FF95, 107, 32'h1234_5678, 0,
             32'hFFFF_FFFF, 32'hFFFF_FFFE, 1, 300, 32'hFFFF_FFFC, 32'h7FFF_FFFC,
             64, -16, 240, 5, 9, 1, 0, 30, 3};

    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    // the first instruction (ADDIK) takes three cycles
    t0 = 0;
    while (instret == 0 && t0 < 10) begin @(negedge clk); t0++; end
    check(t0 == 3, $sformatf("first instruction took %0d cycles", t0));
    n = 0;
    while (!halted && n < 50000) begin @(negedge clk); n++; end
    check(halted, "core did not halt");
    for (int i = 1; i < 24; i++)
      check(u_dmem.mem[(32'h200 >> 2) + i] == expv[i],
            $sformatf("r%0d = %h, expected %h", i, u_dmem.mem[(32'h200 >> 2) + i], expv[i]));
    check(u_dmem.mem[32'h300 >> 2] == 93, "LW");
    check(u_dmem.mem[32'h320 >> 2] == 32'hFF64_6478, $sformatf("SB/SH result %h", u_dmem.mem[32'h320 >> 2]));
    check(u_dmem.mem[32'h330 >> 2] == 32'h0000_FFF9, $sformatf("SH to lower half %h", u_dmem.mem[32'h330 >> 2]));
    check(u_dmem.mem[32'h340 >> 2] == 32'hFF, "LBUI lane 3");
    check(u_dmem.mem[32'h344 >> 2] == 32'hFFF9, "LHU upper half");
    check(u_dmem.mem[32'h348 >> 2] == 32'h78, "LBUI lane 0");
    check(u_dmem.mem[32'h34C >> 2] == 32'h6478, "LHUI lower half");
    check(u_dmem.mem[32'h350 >> 2] == 32'hF9, "LBU register form");
    check(u_dmem.mem[32'h304 >> 2] == 0, "EBRZPOS taken did not skip");
    check(u_dmem.mem[32'h308 >> 2] == 0, "EBRNEG taken did not skip");
    check(u_dmem.mem[32'h30C >> 2] == 1, "EBRNEG not taken skipped");
    check(u_dmem.mem[32'h310 >> 2] == 1, "EBRZPOS not taken skipped");
    c = {u_dmem.mem[15], u_dmem.mem[14], u_dmem.mem[13], u_dmem.mem[12]};
    check(decrypt(c[127:64]) == 42 && decrypt(c[63:0]) == -42, "EADD result");
    check(queries == 4, $sformatf("%0d client queries", queries));
    check(estall > 0, "no stall counted");
    $display("instret %0d cycles %0d stall cycles %0d", instret, cycles, estall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

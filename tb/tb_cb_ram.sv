// tb_cb_ram: random word and byte-enable writes on both ports of a small
// memory, reads on both ports one cycle later, against a model.
module tb_cb_ram;
  localparam int WORDS = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_req = 0, a_we = 0, b_req = 0, b_we = 0;
  logic [3:0] a_be = 0, b_be = 0;
  logic [31:0] a_addr = 0, a_wdata = 0, a_rdata, b_addr = 0, b_wdata = 0, b_rdata;

  cb_ram #(.WORDS(WORDS)) dut (.*);

  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // fill through port B
    for (int i = 0; i < WORDS; i++) begin
      model[i] = $urandom;
      @(negedge clk); b_req = 1; b_we = 1; b_be = 4'hF; b_addr = 4*i; b_wdata = model[i];
    end
    @(negedge clk); b_req = 0; b_we = 0;
    for (int k = 0; k < 200; k++) begin
      int ia, ib;
      logic [31:0] ea, eb;
      ia = $urandom % WORDS; ib = $urandom % WORDS;
      while (ib == ia) ib = $urandom % WORDS;
      @(negedge clk);
      a_req = 1; a_we = ($urandom % 2) == 1; a_be = 4'($urandom); a_addr = 4*ia; a_wdata = $urandom;
      b_req = 1; b_we = 0; b_addr = 4*ib;
      ea = model[ia]; eb = model[ib];
      if (a_we) for (int j = 0; j < 4; j++) if (a_be[j]) model[ia][8*j +: 8] = a_wdata[8*j +: 8];
      @(negedge clk);
      a_req = 0; b_req = 0;
      check(a_rdata == ea, $sformatf("port A read word %0d", ia));
      check(b_rdata == eb, $sformatf("port B read word %0d", ib));
      // read back the written word through port B
      b_req = 1; b_addr = 4*ia;
      @(negedge clk); b_req = 0;
      check(b_rdata == model[ia], $sformatf("word %0d after byte write", ia));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cb_eregs: writes random ciphertext-sized values into all 32 eRegisters,
// reads them back on both ports against a model, checks reset to zero and
// that N2MOV loads the keyRegister from the lower half of ERa.
module tb_cb_eregs;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0] ra_addr = 0, rb_addr = 0, wd_addr = 0;
  logic [127:0] ra_data, rb_data, wd_data = 0;
  logic we = 0, kr_we = 0;
  logic [63:0] kr;

  cb_eregs dut (.*);

  logic [127:0] model [32];
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
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      ra_addr = 5'(i); #1;
      check(ra_data == '0, "not zero after reset");
    end
    check(kr == '0, "keyRegister not zero after reset");
    for (int i = 0; i < 32; i++) begin
      model[i] = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk); we = 1; wd_addr = 5'(i); wd_data = model[i];
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 100; k++) begin
      int a, b_;
      a = $urandom % 32; b_ = $urandom % 32;
      ra_addr = 5'(a); rb_addr = 5'(b_); #1;
      check(ra_data == model[a], $sformatf("port A reg %0d", a));
      check(rb_data == model[b_], $sformatf("port B reg %0d", b_));
    end
    ra_addr = 5'd17;
    @(negedge clk); kr_we = 1;
    @(negedge clk); kr_we = 0;
    check(kr == model[17][63:0], "N2MOV");
    ra_addr = 5'd3;
    @(negedge clk);
    check(kr == model[17][63:0], "keyRegister changed without N2MOV");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

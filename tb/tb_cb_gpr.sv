// tb_cb_gpr: random writes and reads on the three read ports against a model;
// r0 must read zero even after a write to it.
module tb_cb_gpr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0] ra_addr = 0, rb_addr = 0, rd_addr = 0, wd_addr = 0;
  logic [31:0] ra_data, rb_data, rd_data, wd_data = 0;
  logic we = 0;

  cb_gpr dut (.*);

  logic [31:0] model [32];
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
    for (int i = 0; i < 32; i++) model[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      int a, b_, d, w;
      @(negedge clk);
      a = $urandom % 32; b_ = $urandom % 32; d = $urandom % 32; w = $urandom % 32;
      ra_addr = 5'(a); rb_addr = 5'(b_); rd_addr = 5'(d);
      #1;
      check(ra_data == model[a] && rb_data == model[b_] && rd_data == model[d],
            $sformatf("read r%0d r%0d r%0d", a, b_, d));
      we = ($urandom % 2) == 1; wd_addr = 5'(w); wd_data = $urandom;
      if (we && w != 0) model[w] = wd_data;
    end
    @(negedge clk); we = 0; ra_addr = 0; #1;
    check(ra_data == 0, "r0 not zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// cb_gpr: the 32 x 32-bit general register file of the MicroBlaze-style
// integer core.  r0 always reads zero and ignores writes.  Two combinational
// read ports (rA, rB), a third one for the store data / branch operand (rD),
// and one write port written on the clock edge.  Registers reset to zero.
module cb_gpr (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ra_addr,
  output logic [31:0] ra_data,
  input  logic [4:0]  rb_addr,
  output logic [31:0] rb_data,
  input  logic [4:0]  rd_addr,
  output logic [31:0] rd_data,
  input  logic        we,
  input  logic [4:0]  wd_addr,
  input  logic [31:0] wd_data
);
  logic [31:0] regs [32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && wd_addr != 5'd0) begin
      regs[wd_addr] <= wd_data;
    end
  end

  assign ra_data = (ra_addr == 5'd0) ? 32'd0 : regs[ra_addr];
  assign rb_data = (rb_addr == 5'd0) ? 32'd0 : regs[rb_addr];
  assign rd_data = (rd_addr == 5'd0) ? 32'd0 : regs[rd_addr];

endmodule

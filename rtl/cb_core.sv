// cb_core: processor that executes plain MicroBlaze-style integer code and
// eight instructions on Paillier-encrypted data.
//
// The program is not encrypted; only data are.  Integer instructions (a
// subset of the MicroBlaze ISA: add/subtract with and without carry, compare,
// multiply, logic, shifts and sign extension, IMM prefixes, unconditional and
// conditional branches with optional delay slot, return, word, halfword and
// byte loads and stores) drive addresses, loop counters and control flow.  The encrypted
// instructions work on the eRegister file (cb_eregs):
//   EADD  ERd, ERa, ERb   ERd = ERa '+' ERb        (cb_ealu, multicycle)
//   ESUB  ERd, ERa, ERb   ERd = ERa '+' neg(ERb)   (cb_ealu, multicycle)
//   EMOV  ERd, ERa        copy
//   N2MOV ERa             keyRegister = lower 2b bits of ERa (n^2)
//   ELD   ERd, rA, rB     ERd = mem[rA + rB]       (cb_emem, 4b/32 words)
//   EST   ERd, rA, rB     mem[rA + rB] = ERd       (cb_emem)
//   EBRNEG  ERa, imm      branch to PC + imm if the plaintext of ERa < 0
//   EBRZPOS ERa, imm      branch to PC + imm if the plaintext of ERa >= 0
// The two encrypted branches ask the client for the sign (cb_eclient_if).
// The instruction list follows the document; the encodings (cb_pkg), the
// operand forms and the absence of a delay slot on the encrypted branches are
// this implementation's.
//
// Organisation: a multicycle machine, FETCH -> DECODE -> EXEC, plus wait
// states.  Simple instructions take 3 cycles.  The processor stalls in EWAIT
// until the eALU is done (24b^2/K cycles), in EMEM while the load/store unit
// (cb_emem) runs its AXI burst (4b/32 beats for ELD/EST, one beat for an
// integer load or store: a load takes 6 cycles, a store 7), and in EBR until
// the client answers.
// "bri 0" (an endless loop on itself) halts the core.  After reset the core waits for a start pulse
// and then fetches from address 0.  instret counts executed instructions,
// cycles the cycles from start to halt, and estall the cycles stalled on the
// encrypted units (eALU, ELD/EST transfers, client).
//
// Memory ports: imem_* fetches instructions and has its read data one cycle
// after the request; dbus_* is the 32-bit AXI4 master port to the shared data
// memory.  A bus error response is ignored (the access completes).
module cb_core
  import cb_pkg::*;
#(
  parameter int unsigned B = 32,    // bit size of the Paillier modulus n
  parameter int unsigned K = 128    // eALU adder width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           halted,
  // instruction memory
  output logic           imem_req,
  output logic [31:0]    imem_addr,
  input  logic [31:0]    imem_rdata,
  // data memory: 32-bit AXI4 master
  output axi_req_t       dbus_req,
  input  axi_rsp_t       dbus_rsp,
  // client link for the encrypted branches
  output logic           cl_tx_valid,
  input  logic           cl_tx_ready,
  output logic [31:0]    cl_tx_data,
  output logic           cl_tx_last,
  input  logic           cl_rx_valid,
  output logic           cl_rx_ready,
  input  sign_e          cl_rx_sign,
  // statistics
  output logic [31:0]    instret,
  output logic [31:0]    cycles,
  output logic [31:0]    estall
);
  localparam int unsigned DW = 4 * B;

  typedef enum logic [3:0] {
    S_IDLE, S_FETCH, S_DECODE, S_EXEC, S_EWAIT, S_EMEM, S_EBR, S_HALT
  } state_e;
  state_e st, st_next;

  logic [31:0] pc, ir;
  logic        imm_valid;
  logic [15:0] imm_hold;
  logic        dly_pending;
  logic [31:0] dly_target;
  logic        msr_c;

  // ---------------- instruction fields ----------------
  opcode_e     opc;
  logic [4:0]  f_rd, f_ra, f_rb;
  logic [31:0] imm32;
  efunc_e      efn;
  assign opc   = opcode_e'(ir[31:26]);
  assign f_rd  = ir[25:21];
  assign f_ra  = ir[20:16];
  assign f_rb  = ir[15:11];
  assign imm32 = imm_valid ? {imm_hold, ir[15:0]} : {{16{ir[15]}}, ir[15:0]};
  assign efn   = efunc_e'(ir[3:0]);

  // ---------------- register files ----------------
  logic [31:0] ra_v, rb_v, rd_v;
  logic        gpr_we;
  logic [4:0]  gpr_wa;
  logic [31:0] gpr_wd;

  cb_gpr u_gpr (
    .clk, .rst_n,
    .ra_addr(f_ra), .ra_data(ra_v),
    .rb_addr(f_rb), .rb_data(rb_v),
    .rd_addr(f_rd), .rd_data(rd_v),
    .we(gpr_we), .wd_addr(gpr_wa), .wd_data(gpr_wd)
  );

  logic [4:0]    er_ra;
  logic [DW-1:0] er_a, er_b;
  logic          er_we, kr_we;
  logic [DW-1:0] er_wd;
  logic [2*B-1:0] kr;

  // EST reads the register named in the rD field
  assign er_ra = (opc == OP_ETYPE && efn == EF_EST) ? f_rd : f_ra;

  cb_eregs #(.B(B), .NREGS(32)) u_eregs (
    .clk, .rst_n,
    .ra_addr(er_ra), .ra_data(er_a),
    .rb_addr(f_rb),  .rb_data(er_b),
    .we(er_we), .wd_addr(f_rd), .wd_data(er_wd),
    .kr_we, .kr
  );

  // integer datapath signals, declared here because the load/store unit uses them
  logic        is_imm;
  logic [31:0] opb;
  logic [32:0] sum;
  logic [31:0] alu_res;
  logic        alu_c, alu_c_we, alu_wr;
  logic        br_take, br_delay, br_link;
  logic [31:0] br_target;
  logic        is_load, is_store, is_imm_prefix, is_halt;

  // ---------------- encrypted units ----------------
  logic          ealu_start, ealu_busy, ealu_done;
  logic [DW-1:0] ealu_res;
  cb_ealu #(.B(B), .K(K)) u_ealu (
    .clk, .rst_n, .start(ealu_start),
    .op((efn == EF_ESUB) ? EALU_SUB : EALU_ADD),
    .era(er_a), .erb(er_b), .n2(kr),
    .busy(ealu_busy), .done(ealu_done), .result(ealu_res)
  );

  // one load/store unit on the AXI bus serves ELD/EST (4b/32-beat bursts)
  // and the integer loads and stores (single beats)
  localparam int unsigned NWW = $clog2(DW / 32 + 1);
  logic           emem_start, emem_busy, emem_done, emem_err;
  logic           is_eop, m_store;
  logic [NWW-1:0] m_nwords;
  logic [31:0]    m_addr;
  logic [DW-1:0]  m_wdata, emem_rdata;
  logic [3:0]     m_strb;
  logic [31:0]    m_wword, m_lword;
  assign is_eop   = (opc == OP_ETYPE);
  assign m_store  = is_eop ? (efn == EF_EST) : is_store;
  assign m_nwords = is_eop ? NWW'(DW / 32) : NWW'(1);
  assign m_addr   = is_eop ? ra_v + rb_v : ra_v + opb;
  assign m_wdata  = is_eop ? er_a : DW'(m_wword);
  // byte and halfword accesses (opcode bits 1:0 = 00 byte, 01 halfword, 10
  // word): little-endian lanes, the halfword aligned down to an even address
  always_comb begin
    unique case (opc[1:0])
      2'b00: begin
        m_strb  = 4'b0001 << m_addr[1:0];
        m_wword = {4{rd_v[7:0]}};
        m_lword = 32'(emem_rdata[8*m_addr[1:0] +: 8]);
      end
      2'b01: begin
        m_strb  = m_addr[1] ? 4'b1100 : 4'b0011;
        m_wword = {2{rd_v[15:0]}};
        m_lword = 32'(emem_rdata[16*m_addr[1] +: 16]);
      end
      default: begin
        m_strb  = 4'hF;
        m_wword = rd_v;
        m_lword = emem_rdata[31:0];
      end
    endcase
    if (is_eop) m_strb = 4'hF;
  end
  cb_emem #(.B(B)) u_emem (
    .clk, .rst_n, .start(emem_start), .store(m_store), .nwords(m_nwords),
    .addr(m_addr), .strb(m_strb), .wdata(m_wdata),
    .busy(emem_busy), .done(emem_done), .err(emem_err), .rdata(emem_rdata),
    .axi_req(dbus_req), .axi_rsp(dbus_rsp)
  );

  logic ecl_start, ecl_busy, ecl_done, ecl_neg, ecl_zpos;
  cb_eclient_if #(.B(B)) u_ecl (
    .clk, .rst_n, .start(ecl_start), .ct(er_a[DW-1:2*B]),
    .busy(ecl_busy), .done(ecl_done), .neg(ecl_neg), .zpos(ecl_zpos),
    .tx_valid(cl_tx_valid), .tx_ready(cl_tx_ready), .tx_data(cl_tx_data),
    .tx_last(cl_tx_last),
    .rx_valid(cl_rx_valid), .rx_ready(cl_rx_ready), .rx_sign(cl_rx_sign)
  );

  // ---------------- integer datapath ----------------

  assign is_imm = ir[29];
  assign opb    = is_imm ? imm32 : rb_v;

  always_comb begin
    logic [31:0] a_in;
    logic        cin;
    a_in     = ir[26] ? ~ra_v : ra_v;                       // RSUB*: rB - rA
    cin      = ir[27] ? msr_c : ir[26];
    sum      = {1'b0, a_in} + {1'b0, opb} + {32'd0, cin};
    alu_res  = '0;
    alu_c    = msr_c;
    alu_c_we = 1'b0;
    alu_wr   = 1'b0;
    br_take  = 1'b0;
    br_delay = 1'b0;
    br_link  = 1'b0;
    br_target = pc + opb;
    is_load  = 1'b0;
    is_store = 1'b0;
    is_imm_prefix = 1'b0;
    is_halt  = 1'b0;
    if (ir[31:30] == 2'b00 && ir[31:26] != OP_MUL && ir[31:26] != OP_MULI &&
        ir[31:26] != OP_ETYPE && ir[31:26] != OP_EBR) begin
      // add / reverse subtract family
      alu_wr  = 1'b1;
      alu_res = sum[31:0];
      if (!ir[28]) begin
        alu_c    = sum[32];
        alu_c_we = 1'b1;
      end
      if (opc == OP_RSUBK && ir[10:0] == 11'd1)            // CMP
        alu_res[31] = ($signed(ra_v) > $signed(rb_v));
      if (opc == OP_RSUBK && ir[10:0] == 11'd3)            // CMPU
        alu_res[31] = (ra_v > rb_v);
    end else begin
      unique case (opc)
        OP_MUL, OP_MULI: begin alu_wr = 1'b1; alu_res = ra_v * opb; end
        OP_OR,  OP_ORI:  begin alu_wr = 1'b1; alu_res = ra_v | opb; end
        OP_AND, OP_ANDI: begin alu_wr = 1'b1; alu_res = ra_v & opb; end
        OP_XOR, OP_XORI: begin alu_wr = 1'b1; alu_res = ra_v ^ opb; end
        OP_ANDN, OP_ANDNI: begin alu_wr = 1'b1; alu_res = ra_v & ~opb; end
        OP_SHIFT: begin
          alu_wr = 1'b1;
          unique case (ir[6:0])
            7'h01: begin alu_res = {ra_v[31], ra_v[31:1]}; alu_c = ra_v[0]; alu_c_we = 1'b1; end
            7'h21: begin alu_res = {msr_c,   ra_v[31:1]}; alu_c = ra_v[0]; alu_c_we = 1'b1; end
            7'h41: begin alu_res = {1'b0,    ra_v[31:1]}; alu_c = ra_v[0]; alu_c_we = 1'b1; end
            7'h60: alu_res = {{24{ra_v[7]}}, ra_v[7:0]};
            7'h61: alu_res = {{16{ra_v[15]}}, ra_v[15:0]};
            default: alu_wr = 1'b0;
          endcase
        end
        OP_BR, OP_BRI: begin
          br_take   = 1'b1;
          br_delay  = ir[20];
          br_link   = ir[18];
          br_target = ir[19] ? opb : pc + opb;
          is_halt   = (opc == OP_BRI) && (imm32 == 32'd0) && (ir[20:18] == 3'b000);
        end
        OP_BCC, OP_BCCI: begin
          br_delay = ir[25];
          unique case (ir[23:21])
            3'd0: br_take = (ra_v == 32'd0);
            3'd1: br_take = (ra_v != 32'd0);
            3'd2: br_take = ra_v[31];
            3'd3: br_take = ra_v[31] || (ra_v == 32'd0);
            3'd4: br_take = !ra_v[31] && (ra_v != 32'd0);
            3'd5: br_take = !ra_v[31];
            default: br_take = 1'b0;
          endcase
        end
        OP_RTSD: begin
          br_take   = 1'b1;
          br_delay  = 1'b1;
          br_target = ra_v + imm32;
        end
        OP_IMM:        is_imm_prefix = 1'b1;
        OP_LBU, OP_LHU, OP_LW, OP_LBUI, OP_LHUI, OP_LWI: is_load  = 1'b1;
        OP_SB,  OP_SH,  OP_SW, OP_SBI,  OP_SHI,  OP_SWI: is_store = 1'b1;
        default: ;
      endcase
    end
  end

  // ---------------- control ----------------
  logic        commit;          // instruction completes this cycle
  logic        c_take;          // ... and branches
  logic        c_delay;
  logic [31:0] c_target;

  always_comb begin
    st_next    = st;
    commit     = 1'b0;
    c_take     = 1'b0;
    c_delay    = 1'b0;
    c_target   = br_target;
    gpr_we     = 1'b0;
    gpr_wa     = f_rd;
    gpr_wd     = alu_res;
    er_we      = 1'b0;
    er_wd      = er_a;
    kr_we      = 1'b0;
    ealu_start = 1'b0;
    emem_start = 1'b0;
    ecl_start  = 1'b0;
    imem_req   = 1'b0;
    unique case (st)
      S_IDLE:   if (start) st_next = S_FETCH;
      S_FETCH:  begin imem_req = 1'b1; st_next = S_DECODE; end
      S_DECODE: st_next = S_EXEC;
      S_EXEC: begin
        if (opc == OP_ETYPE) begin
          unique case (efn)
            EF_EADD, EF_ESUB: begin ealu_start = 1'b1; st_next = S_EWAIT; end
            EF_ELD, EF_EST:   begin emem_start = 1'b1; st_next = S_EMEM; end
            EF_EMOV:  begin er_we = 1'b1; commit = 1'b1; end
            EF_N2MOV: begin kr_we = 1'b1; commit = 1'b1; end
            default:  commit = 1'b1;                       // unused: no-op
          endcase
        end else if (opc == OP_EBR) begin
          ecl_start = 1'b1;
          st_next   = S_EBR;
        end else if (is_halt) begin
          st_next = S_HALT;
        end else if (is_load || is_store) begin
          emem_start = 1'b1;
          st_next    = S_EMEM;
        end else begin
          gpr_we   = alu_wr;
          if (br_link) begin gpr_we = 1'b1; gpr_wd = pc; end
          c_take   = br_take;
          c_delay  = br_delay;
          commit   = 1'b1;
        end
        if (commit) st_next = S_FETCH;
      end
      S_EWAIT: if (ealu_done) begin
        er_we   = 1'b1;
        er_wd   = ealu_res;
        commit  = 1'b1;
        st_next = S_FETCH;
      end
      S_EMEM: if (emem_done) begin
        er_we   = is_eop && (efn == EF_ELD);
        er_wd   = emem_rdata;
        gpr_we  = is_load;
        gpr_wd  = m_lword;
        commit  = 1'b1;
        st_next = S_FETCH;
      end
      S_EBR: if (ecl_done) begin
        c_take   = (f_rd == EBR_NEG) ? ecl_neg : ecl_zpos;
        c_target = pc + imm32;
        commit   = 1'b1;
        st_next  = S_FETCH;
      end
      S_HALT: ;
      default: st_next = S_IDLE;
    endcase
  end

  assign imem_addr = pc;

  assign halted = (st == S_HALT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_IDLE;
      pc          <= '0;
      ir          <= '0;
      imm_valid   <= 1'b0;
      imm_hold    <= '0;
      dly_pending <= 1'b0;
      dly_target  <= '0;
      msr_c       <= 1'b0;
      instret     <= '0;
      cycles      <= '0;
      estall      <= '0;
    end else begin
      st <= st_next;
      if (st == S_DECODE) ir <= imem_rdata;
      if (st != S_IDLE && st != S_HALT) cycles <= cycles + 1'b1;
      if (st == S_EWAIT || st == S_EBR || (st == S_EMEM && is_eop)) estall <= estall + 1'b1;
      if (st == S_EXEC && alu_c_we && !is_halt) msr_c <= alu_c;
      if (st == S_EXEC && is_halt) instret <= instret + 1'b1;
      if (commit) begin
        instret   <= instret + 1'b1;
        imm_valid <= (st == S_EXEC) && is_imm_prefix && opc == OP_IMM;
        if (is_imm_prefix && st == S_EXEC) imm_hold <= ir[15:0];
        if (c_take && c_delay) begin
          dly_pending <= 1'b1;
          dly_target  <= c_target;
          pc          <= pc + 32'd4;
        end else if (c_take) begin
          dly_pending <= 1'b0;
          pc          <= c_target;
        end else if (dly_pending) begin
          dly_pending <= 1'b0;
          pc          <= dly_target;
        end else begin
          pc <= pc + 32'd4;
        end
      end
    end
  end

endmodule

// cb_pkg: types and constants shared by the encrypted-data processor.
//
// The processor runs a subset of the MicroBlaze integer instruction set plus
// eight instructions that work on Paillier ciphertexts held in wide
// eRegisters: EADD, ESUB, EMOV, N2MOV, ELD, EST, EBRNEG and EBRZPOS.
// An encrypted operand is a "negation pair": Enc(A) in the upper 2b bits and
// Enc(-A) in the lower 2b bits, 4b bits in all, where b is the bit size of the
// Paillier modulus n.  The names of the eight instructions are the design's;
// their binary encoding (two otherwise unused MicroBlaze opcodes) is this
// implementation's choice.  The package also defines the request and response
// bundles of the 32-bit AXI4 data bus (INCR bursts, one ID, AXI4 names).
package cb_pkg;

  // ---- MicroBlaze primary opcodes (instr[31:26]) used by the core ----
  typedef enum logic [5:0] {
    OP_ADD    = 6'b000000, OP_RSUB   = 6'b000001, OP_ADDC   = 6'b000010,
    OP_RSUBC  = 6'b000011, OP_ADDK   = 6'b000100, OP_RSUBK  = 6'b000101,
    OP_ADDKC  = 6'b000110, OP_RSUBKC = 6'b000111,
    OP_ADDI   = 6'b001000, OP_RSUBI  = 6'b001001, OP_ADDIC  = 6'b001010,
    OP_RSUBIC = 6'b001011, OP_ADDIK  = 6'b001100, OP_RSUBIK = 6'b001101,
    OP_ADDIKC = 6'b001110, OP_RSUBIKC= 6'b001111,
    OP_MUL    = 6'b010000, OP_MULI   = 6'b011000,
    OP_ETYPE  = 6'b011100,  // encrypted register/memory instructions
    OP_EBR    = 6'b011101,  // encrypted conditional branches
    OP_OR     = 6'b100000, OP_AND    = 6'b100001, OP_XOR    = 6'b100010,
    OP_ANDN   = 6'b100011, OP_SHIFT  = 6'b100100,
    OP_BR     = 6'b100110, OP_BCC    = 6'b100111,
    OP_ORI    = 6'b101000, OP_ANDI   = 6'b101001, OP_XORI   = 6'b101010,
    OP_ANDNI  = 6'b101011, OP_IMM    = 6'b101100, OP_RTSD   = 6'b101101,
    OP_BRI    = 6'b101110, OP_BCCI   = 6'b101111,
    OP_LBU    = 6'b110000, OP_LHU    = 6'b110001, OP_LW     = 6'b110010,
    OP_SB     = 6'b110100, OP_SH     = 6'b110101, OP_SW     = 6'b110110,
    OP_LBUI   = 6'b111000, OP_LHUI   = 6'b111001, OP_LWI    = 6'b111010,
    OP_SBI    = 6'b111100, OP_SHI    = 6'b111101, OP_SWI    = 6'b111110
  } opcode_e;

  // ---- function field (instr[3:0]) of OP_ETYPE ----
  typedef enum logic [3:0] {
    EF_EADD  = 4'd0,  // ERd = ERa '+' ERb  (pairwise)
    EF_ESUB  = 4'd1,  // ERd = ERa '+' swap(ERb)
    EF_EMOV  = 4'd2,  // ERd = ERa
    EF_N2MOV = 4'd3,  // KR  = low 2b bits of ERa
    EF_ELD   = 4'd4,  // ERd = mem[rA + rB]
    EF_EST   = 4'd5   // mem[rA + rB] = ERd
  } efunc_e;

  // ---- rD field of OP_EBR selects the condition ----
  localparam logic [4:0] EBR_NEG  = 5'd0;  // branch if plaintext of ERa < 0
  localparam logic [4:0] EBR_ZPOS = 5'd1;  // branch if plaintext of ERa >= 0

  // ---- sign code returned by the client ----
  typedef enum logic [1:0] {
    SIGN_ZERO = 2'b00,
    SIGN_POS  = 2'b01,
    SIGN_NEG  = 2'b10
  } sign_e;

  // ---- operation of the eALU ----
  typedef enum logic {
    EALU_ADD = 1'b0,
    EALU_SUB = 1'b1
  } ealu_op_e;

  // ---- 32-bit AXI4 data bus (single ID, INCR bursts) ----
  // master -> slave
  typedef struct packed {
    logic        awvalid;
    logic [31:0] awaddr;
    logic [7:0]  awlen;      // beats - 1
    logic        wvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        wlast;
    logic        bready;
    logic        arvalid;
    logic [31:0] araddr;
    logic [7:0]  arlen;      // beats - 1
    logic        rready;
  } axi_req_t;

  // slave -> master
  typedef struct packed {
    logic        awready;
    logic        wready;
    logic        bvalid;
    logic [1:0]  bresp;
    logic        arready;
    logic        rvalid;
    logic [31:0] rdata;
    logic [1:0]  rresp;
    logic        rlast;
  } axi_rsp_t;

endpackage

// keyv_pkg: types and constants shared by the KeyV RV32IM processor.
//
// An instruction travels through the six stages of an execution unit (EU) as a
// uop_t: Fetch fills pc/ir/seq/ep/valid, Decode adds dec, Register Read adds the
// operands a/b, Execute adds res/taken/target and Memory may replace res with
// load or CSR data. seq numbers instructions in fetch order (instruction seq
// runs in EU seq mod E); ep is the branch epoch it was fetched in. is_dead()
// tells whether an instruction was fetched on a path that a taken branch has
// since abandoned. Encodings and field layout are this design's own.
package keyv_pkg;

  localparam int unsigned XLEN    = 32;
  localparam int unsigned SEQ_W   = 16;
  localparam int unsigned NSTAGE  = 6;

  // Stage indices of an EU (rows of the KeyRing).
  localparam int unsigned ST_F = 0;  // Fetch
  localparam int unsigned ST_D = 1;  // Decode
  localparam int unsigned ST_R = 2;  // Register Read
  localparam int unsigned ST_E = 3;  // Execute
  localparam int unsigned ST_M = 4;  // Memory
  localparam int unsigned ST_W = 5;  // Register Write

  typedef logic [SEQ_W-1:0] seq_t;
  typedef logic [1:0]       ep_t;

  // RV32 major opcodes.
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;
  localparam logic [6:0] OP_FENCE  = 7'b0001111;
  localparam logic [6:0] OP_SYSTEM = 7'b1110011;

  // CSR addresses served by the SYS resource (read-only counters).
  localparam logic [11:0] CSR_CYCLE    = 12'hC00;
  localparam logic [11:0] CSR_TIME     = 12'hC01;
  localparam logic [11:0] CSR_INSTRET  = 12'hC02;
  localparam logic [11:0] CSR_CYCLEH   = 12'hC80;
  localparam logic [11:0] CSR_TIMEH    = 12'hC81;
  localparam logic [11:0] CSR_INSTRETH = 12'hC82;
  localparam logic [11:0] CSR_MCYCLE   = 12'hB00;
  localparam logic [11:0] CSR_MINSTRET = 12'hB02;
  localparam logic [11:0] CSR_MCYCLEH  = 12'hB80;
  localparam logic [11:0] CSR_MINSTRETH= 12'hB82;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU,
    ALU_XOR, ALU_SRL, ALU_SRA, ALU_OR, ALU_AND, ALU_PASSB
  } alu_op_e;

  typedef struct packed {
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [4:0]  rd;
    logic        use_rs1;
    logic        use_rs2;
    logic        rd_we;
    logic [31:0] imm;
    alu_op_e     alu_op;
    logic        a_pc;      // operand A is the pc (auipc)
    logic        b_imm;     // operand B is the immediate
    logic        is_branch;
    logic        is_jal;
    logic        is_jalr;
    logic        is_load;
    logic        is_store;
    logic        is_muldiv;
    logic        is_csr;
    logic        is_halt;   // ecall / ebreak
    logic [2:0]  funct3;
    logic [11:0] csr;
    logic        illegal;
  } dec_t;

  typedef struct packed {
    logic        valid;
    ep_t         ep;
    seq_t        seq;
    logic [31:0] pc;
    logic [31:0] ir;
    dec_t        dec;
    logic [31:0] a;
    logic [31:0] b;
    logic [31:0] res;
    logic        taken;
    logic [31:0] target;
  } uop_t;

  // True when u was fetched after a taken branch that has since redirected the
  // fetch: its epoch has been closed and its sequence number lies past the
  // branch that closed it. ep_cur is the current epoch, end_seq[k] the sequence
  // number of the branch that closed epoch k.
  function automatic logic is_dead(uop_t u, ep_t ep_cur, seq_t [3:0] end_seq);
    seq_t diff;
    diff = u.seq - end_seq[u.ep];
    return !u.valid || ((u.ep != ep_cur) && !diff[SEQ_W-1] && (diff != '0));
  endfunction

endpackage

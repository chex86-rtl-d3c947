// chex_pkg: types and constants shared by the capability / pointer-tracking
// extension. A capability is 128 bits: a 64-bit base address, a 32-bit bound
// (allocation size in bytes) and a 32-bit permission word holding read, write,
// execute, busy and valid bits; that layout follows the design description.
// Capabilities are named by a non-zero pointer identifier (PID); PID 0 means
// "not a tracked pointer" and the all-ones PID marks a wild pointer made from an
// integer constant. The PID width, register count, sequence-number width and
// the micro-op encodings below are this design's own choices.
package chex_pkg;

  parameter int PID_W = 32;          // pointer identifier width (assumed)
  parameter int VA_W  = 64;          // virtual address width
  parameter int SEQ_W = 16;          // micro-op sequence number width (assumed)
  parameter int NREG  = 32;          // 16 x86-64 GPRs + 16 microcode temporaries (assumed)
  parameter int REG_W = $clog2(NREG);

  typedef logic [PID_W-1:0] pid_t;
  typedef logic [VA_W-1:0]  va_t;
  typedef logic [SEQ_W-1:0] seq_t;
  typedef logic [REG_W-1:0] reg_t;

  localparam pid_t PID_NONE = '0;    // not a pointer / untracked buffer
  localparam pid_t PID_WILD = '1;    // PID(-1): pointer built from an immediate

  // x86-64 register numbers used as defaults for heap-function signatures
  localparam reg_t REG_RAX = reg_t'(0);
  localparam reg_t REG_RDI = reg_t'(7);

  // 128-bit capability, stored in the shadow capability table
  typedef struct packed {
    logic [63:0] base;
    logic [31:0] bounds;
    logic [26:0] rsvd;
    logic        busy;
    logic        valid;
    logic        x;
    logic        w;
    logic        r;
  } cap_t;

  // Micro-op classes the pointer tracker distinguishes (rows of the rule set)
  typedef enum logic [3:0] {
    UOP_OTHER = 4'd0,
    UOP_MOV   = 4'd1,
    UOP_AND   = 4'd2,
    UOP_ADD   = 4'd3,
    UOP_SUB   = 4'd4,
    UOP_LEA   = 4'd5,
    UOP_LD    = 4'd6,
    UOP_ST    = 4'd7,
    UOP_LIMM  = 4'd8
  } uop_op_e;

  // How a rule computes the destination PID
  typedef enum logic [2:0] {
    R_ZERO    = 3'd0,   // PID(dst) <- 0
    R_SRC1    = 3'd1,   // PID(dst) <- PID(src1)
    R_NONZERO = 3'd2,   // PID(dst) <- whichever source PID is non-zero
    R_MEM     = 3'd3,   // PID(dst) <- PID(Mem[EA]) (predicted)
    R_WILD    = 3'd4,   // PID(dst) <- PID(-1)
    R_STORE   = 3'd5    // PID(Mem[EA]) <- PID(src1); no register written
  } rule_e;

  // Decoded micro-op as delivered by the host decoder
  typedef struct packed {
    va_t     pc;       // address of the macro-op
    logic    first;    // first micro-op of its macro-op
    uop_op_e op;
    logic    imm;      // register-immediate addressing mode
    logic    wr;       // writes register dst
    reg_t    dst;
    reg_t    src1;     // first source; base of lea; data register of a store
    reg_t    src2;     // second source; index of lea
    reg_t    base;     // base register of a memory access
    seq_t    seq;
  } uop_t;

  // What the pointer tracker learned about one micro-op
  typedef struct packed {
    logic deref;       // memory access through a register carrying a PID
    pid_t deref_pid;   // PID of the base register
    logic is_write;    // the access is a store
    pid_t dst_pid;     // PID given to the destination register
    pid_t pred_pid;    // load: predicted PID of the reloaded word
    logic st_valid;    // store: carries a PID to memory
    pid_t st_pid;      // store: PID of the stored register
  } ann_t;

  // Capability micro-ops injected by the microcode customization unit
  typedef enum logic [2:0] {
    CAP_NONE       = 3'd0,
    CAP_GEN_BEGIN  = 3'd1,
    CAP_GEN_END    = 3'd2,
    CAP_CHECK      = 3'd3,
    CAP_FREE_BEGIN = 3'd4,
    CAP_FREE_END   = 3'd5
  } capop_e;

  typedef struct packed {
    capop_e op;
    pid_t   pid;
    reg_t   reg_opnd;  // register whose value the micro-op consumes
    logic   is_write;  // capCheck: access is a store
    seq_t   seq;       // sequence number of the host micro-op
  } capuop_t;

  typedef enum logic [2:0] {
    EXC_NONE         = 3'd0,
    EXC_OOB          = 3'd1,  // out-of-bounds access
    EXC_UAF          = 3'd2,  // access through a freed capability
    EXC_PERM         = 3'd3,  // read/write permission missing
    EXC_WILD         = 3'd4,  // PID with no capability (wild / PID(-1))
    EXC_INVALID_FREE = 3'd5,
    EXC_DOUBLE_FREE  = 3'd6,
    EXC_SIZE         = 3'd7   // allocation larger than the configured maximum
  } exc_e;

  // Outcome of validating a pointer-reload prediction at execute
  typedef enum logic [1:0] {
    RL_OK   = 2'd0,   // prediction correct
    RL_PNA0 = 2'd1,   // predicted PID(N), actual 0: injected check becomes zero idiom
    RL_P0AN = 2'd2,   // predicted 0, actual PID(N): flush and restart
    RL_PMAN = 2'd3    // predicted PID(M), actual PID(N): forward the right PID
  } reload_res_e;

  // Heap-function kinds that can be registered
  typedef enum logic [1:0] {
    HF_NONE  = 2'd0,
    HF_ALLOC = 2'd1,
    HF_FREE  = 2'd2
  } heapfn_e;

  // Protection mode (context-sensitive enforcement)
  typedef enum logic [1:0] {
    MODE_OFF    = 2'd0,   // no capability checks injected
    MODE_ALL    = 2'd1,   // check every tracked dereference
    MODE_REGION = 2'd2    // check only inside the security-critical code region
  } prot_mode_e;

  // One registered heap-management function: entry and exit points and the
  // signature (argument register and result register)
  typedef struct packed {
    va_t     entry_pc;
    va_t     exit_pc;
    heapfn_e kind;
    reg_t    arg_reg;
    reg_t    ret_reg;
  } heapfn_t;

  // Model-specific register addresses
  localparam logic [11:0] MSR_MODE        = 12'h000;
  localparam logic [11:0] MSR_REGION_LO   = 12'h001;
  localparam logic [11:0] MSR_REGION_HI   = 12'h002;
  localparam logic [11:0] MSR_CAP_TBL     = 12'h003;
  localparam logic [11:0] MSR_ALIAS_ROOT  = 12'h004;
  localparam logic [11:0] MSR_ALIAS_ALLOC = 12'h005;
  localparam logic [11:0] MSR_MAX_ALLOC   = 12'h006;
  localparam logic [11:0] MSR_HEAPFN      = 12'h100; // +4*i: entry, exit, kind, {ret,arg}
  localparam logic [11:0] MSR_RULE        = 12'h200; // +{op,imm}: rule_e

  // Configuration held in the model-specific registers
  typedef struct packed {
    prot_mode_e  mode;
    va_t         region_lo;     // security-critical code region [lo, hi)
    va_t         region_hi;
    va_t         cap_tbl_base;  // shadow capability table base
    va_t         alias_root;    // root of the 5-level shadow alias table
    va_t         alias_alloc;   // first free zeroed page for new alias tables
    logic [63:0] max_alloc;     // largest allocation allowed
  } chex_cfg_t;

endpackage

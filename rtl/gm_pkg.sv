// gm_pkg: types and constants shared by the G/100-style processor blocks.
//
// Holds the bus widths (32-bit address, 32-bit data), the control-transfer
// classes the pre-jump logic distinguishes, the ALU and shifter operation
// codes and the EIT vector numbers of the TRON EIT table. The vector numbers
// and the 8-byte spacing of vector table entries follow the TRON EIT table;
// the enum encodings of the operation codes are this design's own choice,
// because the instruction and micro-instruction encodings are not published.
//
// Lint notes: Some constants (bus widths, vector numbers, bitmap function
// codes) are given for users of the package and testbenches and are not
// referenced by every design unit.
package gm_pkg;

  localparam int unsigned AW = 32;  // address bus width
  localparam int unsigned DW = 32;  // data bus width

  // Control-transfer class of a decoded instruction, as seen by the pre-jump
  // logic in the D-stage and by its check in the E-stage.
  typedef enum logic [2:0] {
    CT_NONE  = 3'd0,  // not a control transfer
    CT_BRA   = 3'd1,  // branch always: pre-branch always taken
    CT_BSR   = 3'd2,  // branch to subroutine: pre-branch taken, push return PC
    CT_BCC   = 3'd3,  // conditional branch: predicted by the history table
    CT_LOOP  = 3'd4,  // ACB / SCB: pre-branch always taken
    CT_CALL  = 3'd5,  // other subroutine call (target not known in D): push only
    CT_RET   = 3'd6   // RTS / EXITD: pre-return from the PC stack
  } ctrl_kind_e;

  typedef enum logic [3:0] {
    ALU_ADD = 4'd0, ALU_ADDC = 4'd1, ALU_SUB = 4'd2, ALU_SUBC = 4'd3,
    ALU_AND = 4'd4, ALU_OR   = 4'd5, ALU_XOR = 4'd6, ALU_NOT  = 4'd7,
    ALU_NEG = 4'd8, ALU_PASSA = 4'd9, ALU_PASSB = 4'd10, ALU_CMP = 4'd11
  } alu_op_e;

  typedef enum logic [2:0] {
    SH_SHL = 3'd0,  // logical left
    SH_SHR = 3'd1,  // logical right
    SH_SHA = 3'd2,  // arithmetic right
    SH_ROL = 3'd3,  // rotate left
    SH_ROR = 3'd4   // rotate right
  } shift_op_e;

  typedef struct packed {
    logic z;  // zero
    logic n;  // negative
    logic v;  // overflow
    logic c;  // carry / borrow
  } flags_t;

  // EIT vector numbers (TRON EIT table). Vector table entry address is
  // EITVB + 8 * vector.
  localparam logic [7:0] VEC_RESET   = 8'h00;
  localparam logic [7:0] VEC_INT0    = 8'h40;  // external interrupt INT n = 40h+n
  localparam logic [7:0] VEC_DI0     = 8'h50;  // delayed interrupt DI n = 50h+n
  localparam logic [7:0] VEC_TRAPA0  = 8'h20;  // TRAPA n = 20h+n
  localparam logic [7:0] VEC_ZDIV    = 8'h1a;  // zero divide trap

  // One requester's side of the internal bus. The requester holds req (and
  // the other fields) until the bus interface answers with ack.
  typedef struct packed {
    logic        req;
    logic        we;
    logic [3:0]  be;     // byte enables, be[3] = byte at the lowest address
    logic [31:0] addr;   // word address (addr[1:0] ignored)
    logic [31:0] wdata;
  } bus_req_t;

  typedef struct packed {
    logic        ack;    // one-clock pulse: access finished
    logic [31:0] rdata;  // read data, valid with ack
  } bus_rsp_t;

  // Bitmap logical function: 4-bit truth table indexed by {t, d}.
  localparam logic [3:0] BV_COPY = 4'b1100;  // result = source
  localparam logic [3:0] BV_AND  = 4'b1000;
  localparam logic [3:0] BV_OR   = 4'b1110;
  localparam logic [3:0] BV_XOR  = 4'b0110;

  // Micro-operation accepted by the E-stage (issued by the microprogram
  // sequencer). The field layout is this design's own.
  typedef enum logic [2:0] {
    U_NOP = 3'd0, U_ALU = 3'd1, U_SHIFT = 3'd2, U_LOAD = 3'd3,
    U_STORE = 3'd4, U_BVMAP = 3'd5, U_BVSCH = 3'd6
  } uop_kind_e;

  typedef struct packed {
    uop_kind_e   kind;
    alu_op_e     alu;
    shift_op_e   sh;
    logic [3:0]  rs1;
    logic [3:0]  rs2;
    logic [3:0]  rd;
    logic        use_imm;   // second operand / address offset from imm
    logic [31:0] imm;
    logic [3:0]  bv_func;   // bitmap logical function
    logic        bv_dir;    // bitmap scan direction, 1 = backward
  } uop_t;

  // One-clock event pulses brought out of the top for monitoring.
  typedef struct packed {
    logic prebranch;     // D-stage redirected fetch (pre-branch or pre-return)
    logic mispredict;    // E-stage flush after a wrong pre-branch
    logic preret_hit;    // pre-return confirmed (PC1 = PC2)
    logic preret_miss;   // pre-return wrong or not made: flush to PC2
    logic bb_hit;        // instruction word supplied by the branch buffer
    logic bb_fill;       // fetched word written into the branch buffer
    logic queue_full;    // fetch held because the queue is full
    logic sb_overlap;    // E-stage worked while the store buffer was writing
    logic sb_stall;      // E-stage waited for the store buffer
    logic bv_word;       // bitmap engine finished a 32-bit block
    logic a_indirect;    // A-stage read a chained-mode base from memory
    logic of_cross;      // OF-stage read an operand that spans two words
  } events_t;

  // Operand addressing as the D-stage hands it to the A-stage (the A-code).
  // The list of modes is that of the architecture; the encoding is this
  // design's own, and the D-stage has already sign-extended 16-bit
  // displacements and addresses to 32 bits.
  typedef enum logic [3:0] {
    AM_REG,     // Rn
    AM_IMM,     // #exp
    AM_IND,     // @Rn
    AM_DISP,    // @(exp, Rn)
    AM_ABS,     // @exp
    AM_PCREL,   // @(exp, PC)
    AM_POP,     // @SP+
    AM_PUSH,    // @-SP
    AM_CHAIN    // one step of chained addressing
  } addr_mode_e;

  // Base of the first step of a chained mode.
  typedef enum logic [1:0] {CB_REG, CB_PC, CB_ZERO} chain_base_e;

  typedef struct packed {
    addr_mode_e  mode;
    logic [3:0]  rn;     // base register
    logic [31:0] disp;   // displacement, absolute address or immediate value
    logic [31:0] pc;     // address of the instruction (PC-relative modes)
    logic [2:0]  size;   // operand size in bytes: step of @SP+ and @-SP
    chain_base_e cbase;  // chained: base of the first step
    logic        idx;    // chained: add a scaled index register
    logic [3:0]  rx;     // chained: index register
    logic [1:0]  scale;  // chained: index shifted left by this amount
    logic        more;   // chained: another step follows, based on the word read here
    logic        fetch;  // the operand is read (not only written)
  } acode_t;

  // Operand as the A-stage hands it to the OF-stage (the F-code).
  typedef struct packed {
    logic        is_reg;  // operand is register rn
    logic        is_imm;  // operand is the value in addr
    logic [3:0]  rn;
    logic [31:0] addr;    // operand address (or immediate value)
    logic [2:0]  size;    // operand size in bytes (1, 2, 4)
    logic        fetch;   // the OF-stage reads the operand from memory
    logic        sp_we;   // @SP+ / @-SP: the E-stage writes sp_new to R15
    logic [31:0] sp_new;
  } fcode_t;

  // Operand as the OF-stage hands it to the E-stage (the S-code).
  typedef struct packed {
    logic        is_reg;  // operand is register rn
    logic [3:0]  rn;
    logic [31:0] addr;    // operand address (destination of a later store)
    logic [31:0] value;   // operand read from memory, or the immediate value
    logic        sp_we;
    logic [31:0] sp_new;
  } scode_t;

endpackage

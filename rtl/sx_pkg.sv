// sx_pkg: types and constants shared by the packed-instruction stack processor.
//
// The processor packs up to four byte-code sub-instructions into one 32-bit
// word. Each opcode byte carries a 2-bit entry type in its top bits and a
// 6-bit opcode below it. The entry type tells the decoder how long the
// sub-instruction is: 0 = no more instructions in this word, 1 = S-format
// (opcode only), 2 = M-format (opcode + one operand byte), 3 = L-format
// (opcode + three operand bytes, only as the first byte of a word).
// The entry-type encoding, the byte order and the multiplexer inputs follow
// the published design. The opcode numbers, the ALU operation set and the
// encoding of the multiplexer selects are this design's own choice: the
// original instruction set (36 instructions) is not reproduced here.
package sx_pkg;

  // ---- entry type of an opcode byte (bits [7:6]) ----
  typedef enum logic [1:0] {
    ET_NONE = 2'd0,   // rest of the word is empty: fetch the next word
    ET_S    = 2'd1,   // zero-operand instruction
    ET_M    = 2'd2,   // one-byte operand follows
    ET_L    = 2'd3    // three-byte operand follows
  } etype_e;

  // ---- outcome of the first decode state (ID0) ----
  typedef enum logic [2:0] {
    DC_PRE_IF = 3'd0,
    DC_S      = 3'd1,
    DC_M      = 3'd2,
    DC_L      = 3'd3,
    DC_HALT   = 3'd4
  } dclass_e;

  // ---- opcodes (6 bits, this design's assignment) ----
  typedef enum logic [5:0] {
    OP_NOP  = 6'd0,
    OP_LIT  = 6'd1,   // push arg
    OP_GET  = 6'd2,   // push mem[FP-arg]
    OP_PUT  = 6'd3,   // mem[FP-arg] = TS, pop
    OP_LD   = 6'd4,   // TS = mem[TS]
    OP_ST   = 6'd5,   // mem[TS] = second, pop two
    OP_ADD  = 6'd6,
    OP_SUB  = 6'd7,   // second - top
    OP_MUL  = 6'd8,
    OP_AND  = 6'd9,
    OP_OR   = 6'd10,
    OP_XOR  = 6'd11,
    OP_SHL  = 6'd12,  // second << top
    OP_SHR  = 6'd13,  // second >> top (logical)
    OP_EQ   = 6'd14,
    OP_LT   = 6'd15,  // second < top (signed)
    OP_GT   = 6'd16,  // second > top (signed)
    OP_NOT  = 6'd17,
    OP_DUP  = 6'd18,
    OP_DROP = 6'd19,
    OP_SWAP = 6'd20,
    OP_JMPS = 6'd21,  // M-format jump: arg = {NW[5:0], NB[1:0]}
    OP_JMP  = 6'd22,  // L-format jump: arg = {NW[21:0], NB[1:0]}
    OP_JT   = 6'd23,  // jump if TS != 0, pop
    OP_JF   = 6'd24,  // jump if TS == 0, pop
    OP_CALL = 6'd25,  // L-format: arg = {absolute word address, NB}
    OP_RET  = 6'd26,  // M-format: arg = words to drop from the frame
    OP_NEW  = 6'd27   // TS = AA, AA += size (size taken from TS)
  } opcode_e;

  // ---- ALU operations, a = p1 (mux x), b = p2 (mux y) ----
  typedef enum logic [4:0] {
    ALU_PASSA = 5'd0,
    ALU_PASSB = 5'd1,
    ALU_ADD   = 5'd2,   // a + b
    ALU_SUB   = 5'd3,   // a - b
    ALU_RSUB  = 5'd4,   // b - a
    ALU_MUL   = 5'd5,
    ALU_AND   = 5'd6,
    ALU_OR    = 5'd7,
    ALU_XOR   = 5'd8,
    ALU_RSHL  = 5'd9,   // b << a[4:0]
    ALU_RSHR  = 5'd10,  // b >> a[4:0]
    ALU_EQ    = 5'd11,  // a == b
    ALU_RLT   = 5'd12,  // b < a, signed
    ALU_RGT   = 5'd13,  // b > a, signed
    ALU_NOT   = 5'd14,  // ~a
    ALU_INC   = 5'd15,  // a + 1
    ALU_DEC   = 5'd16   // a - 1
  } alu_op_e;

  // ---- multiplexer selects (names of Figure 6) ----
  typedef enum logic [1:0] { XS_TS, XS_SP, XS_FP, XS_NX }          xsel_e; // p1
  typedef enum logic [1:0] { YS_FF, YS_ARG, YS_ARGW, YS_AA }       ysel_e; // p2
  typedef enum logic [1:0] { BS_DBUS, BS_PC, BS_TBUS }             bsel_e; // register-bank bus
  typedef enum logic [2:0] { CS_0, CS_1, CS_2, CS_3, CS_ARG }      csel_e; // cbus to BP
  typedef enum logic [1:0] { IS_B1, IS_B2, IS_B3, IS_W24 }         isel_e; // arg
  typedef enum logic       { AS_PC, AS_TBUS }                      asel_e; // abus
  typedef enum logic       { DS_TS, DS_FP }                        dsel_e; // din
  typedef enum logic [1:0] { JS_NPC, JS_TBUS, JS_ONE }             jsel_e; // jbus
  typedef enum logic       { ES_ONE, ES_ARGW }                     esel_e; // ebus

  // ---- one control word, produced every cycle by the control unit ----
  typedef struct packed {
    alu_op_e alu_op;
    xsel_e   xsel;
    ysel_e   ysel;
    bsel_e   bsel;
    logic    ld_ts, ld_sp, ld_fp, ld_nx, ld_ff, ld_aa;
    logic    ld_ir;
    logic    ld_arg;
    isel_e   isel;
    logic    ld_bp;
    csel_e   csel;
    asel_e   asel;
    dsel_e   dsel;
    logic    mem_we;
    logic    ld_pc;
    jsel_e   jsel;
    esel_e   esel;
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '{alu_op: ALU_PASSA, xsel: XS_TS, ysel: YS_FF, bsel: BS_TBUS,
                                  ld_ts: 1'b0, ld_sp: 1'b0, ld_fp: 1'b0, ld_nx: 1'b0,
                                  ld_ff: 1'b0, ld_aa: 1'b0, ld_ir: 1'b0, ld_arg: 1'b0,
                                  isel: IS_B1, ld_bp: 1'b0, csel: CS_0, asel: AS_PC,
                                  dsel: DS_TS, mem_we: 1'b0, ld_pc: 1'b0, jsel: JS_NPC,
                                  esel: ES_ONE};

endpackage

// a8051_pkg: types and constants shared by the fetch and decode stages of the
// pipelined 8051 front end.
//
// The 8051 program counter is 16 bits wide (64K program space). Every
// instruction starts with an opcode byte that alone determines the
// instruction; zero, one or two "remained" bytes follow. The decode stage
// splits an instruction into
//   * an operation (op_e), the 8051 mnemonic;
//   * read locations (read_t, the "read signal"): where up to two source
//     operands come from;
//   * write locations (write_t, the "write signal"): where up to two results go;
//   * an action (action_t, "ActionCtrl"): how many bytes remain, what each of
//     them means (fmt_e) and what kind of branch the instruction is (br_e).
// The encodings of these fields are this design's own; the document names the
// signals but does not give their codes.
package a8051_pkg;

  localparam int unsigned PC_W = 16;
  typedef logic [PC_W-1:0] pc_t;

  typedef enum logic [5:0] {
    OP_NOP, OP_INC, OP_DEC, OP_ADD, OP_ADDC, OP_ORL, OP_ANL, OP_XRL,
    OP_MOV, OP_SUBB, OP_CJNE, OP_XCH, OP_XCHD, OP_DJNZ,
    OP_JBC, OP_JB, OP_JNB, OP_JC, OP_JNC, OP_JZ, OP_JNZ,
    OP_SJMP, OP_AJMP, OP_LJMP, OP_ACALL, OP_LCALL, OP_RET, OP_RETI, OP_JMP,
    OP_MOVX, OP_MOVC, OP_PUSH, OP_POP, OP_DIV, OP_MUL, OP_SWAP, OP_DA,
    OP_CLR, OP_CPL, OP_SETB, OP_RR, OP_RRC, OP_RL, OP_RLC, OP_RSVD
  } op_e;

  // Operand locations.
  typedef enum logic [3:0] {
    LOC_NONE,   // no operand
    LOC_A,      // accumulator
    LOC_B,      // B register
    LOC_C,      // carry flag
    LOC_RN,     // register R0..R7 of the current bank
    LOC_IRI,    // internal RAM at @R0/@R1
    LOC_DIR,    // direct address (internal RAM or SFR)
    LOC_IMM,    // immediate #data (8 or 16 bits)
    LOC_BIT,    // bit address
    LOC_NBIT,   // complement of a bit (/bit)
    LOC_DPTR,   // data pointer
    LOC_XDPTR,  // external data memory at @DPTR
    LOC_XRI,    // external data memory at @R0/@R1
    LOC_CODE,   // code memory at @A+PC or @A+DPTR
    LOC_STACK   // internal RAM at the stack pointer
  } loc_e;

  // Meaning of the remained bytes b2 (second byte) and b3 (third byte).
  typedef enum logic [3:0] {
    FMT_NONE,     // one-byte instruction
    FMT_DIR,      // b2 = direct or bit address
    FMT_IMM8,     // b2 = #data
    FMT_REL,      // b2 = relative offset
    FMT_ADDR11,   // b2 = low 8 bits of an 11-bit in-page address
    FMT_DIR_IMM,  // b2 = direct address, b3 = #data
    FMT_DIR_REL,  // b2 = direct or bit address, b3 = relative offset
    FMT_IMM_REL,  // b2 = #data, b3 = relative offset
    FMT_DIR_DIR,  // b2 = source direct address, b3 = destination direct address
    FMT_IMM16,    // b2 = high byte, b3 = low byte of #data16
    FMT_ADDR16    // b2 = high byte, b3 = low byte of addr16
  } fmt_e;

  typedef enum logic [2:0] {
    BR_NONE,   // not a branch: next PC is the following instruction
    BR_REL,    // unconditional PC-relative (SJMP)
    BR_ABS11,  // unconditional within the 2K page (AJMP, ACALL)
    BR_ABS16,  // unconditional long (LJMP, LCALL)
    BR_COND,   // conditional PC-relative: outcome comes back on jmp
    BR_IND     // target known only downstream (JMP @A+DPTR, RET, RETI)
  } br_e;

  typedef struct packed {
    logic [1:0] remain;  // remained bytes, 0..2
    fmt_e       fmt;
    br_e        br;
  } action_t;

  typedef struct packed {
    loc_e src1;
    loc_e src2;
  } read_t;

  typedef struct packed {
    loc_e dst1;
    loc_e dst2;
  } write_t;

  // ID1 -> ID2: everything known from the opcode byte.
  typedef struct packed {
    action_t    act;     // ActionCtrl
    read_t      rd;      // ReadOut
    write_t     wr;      // WriteOut
    op_e        op;      // OpcodeOut
    logic [7:0] opbyte;  // the raw opcode byte
    pc_t        pc;      // address of the opcode byte
  } id_ctrl_t;

  // ID2 -> OF: the complete decoded instruction.
  typedef struct packed {
    op_e         op;       // Opcodein
    logic [7:0]  opbyte;
    read_t       rd;       // ReadIn
    write_t      wr;       // WriteIn
    br_e         br;
    logic [2:0]  rsel;     // Rn number, or Ri number for @Ri forms
    logic [7:0]  addr1;    // direct/bit address (source for MOV dir,dir)
    logic [7:0]  addr2;    // destination direct address of MOV dir,dir
    logic [15:0] imm;      // #data (zero-extended) or #data16
    pc_t         target;   // branch target, when the decoder can compute it
    pc_t         next_pc;  // address of the following instruction (return address of calls)
    pc_t         pc;       // address of the opcode byte
  } of_req_t;

  function automatic logic [1:0] fmt_len(fmt_e f);
    unique case (f)
      FMT_NONE:                                 return 2'd0;
      FMT_DIR, FMT_IMM8, FMT_REL, FMT_ADDR11:   return 2'd1;
      default:                                  return 2'd2;
    endcase
  endfunction

endpackage

// id1_stage: first half of the 8051 instruction decoder.
//
// ID1 owns the program counter. It sends the PC to the fetch stage, takes
// the opcode byte that comes back and decodes it. The decode is split as in
// the document: an opcode whose low nibble is 6..F is "regular" (operand
// @R0/@R1 for 6/7, R0..R7 for 8..F, operation chosen by the high nibble
// alone); every other opcode goes through a full case. This keeps the large
// multiplexer to the 96 irregular codes. The result (ActionCtrl, ReadOut,
// WriteOut, OpcodeOut) is offered to ID2 as one bundle.
//
// ID1 then waits for ID2 to acknowledge the bundle. ID2 acknowledges only
// after it has fetched the remained bytes and knows the address of the next
// instruction, which it returns with the acknowledge (ctrl_next_pc). ID1 loads
// it into the PC and fetches the next opcode. This enclosure keeps ID1 from
// using the fetch port while ID2 still needs it.
//
// The reserved opcode A5h decodes as a one-byte OP_RSVD that touches
// nothing; the document leaves it reserved.
//
// Timing: one cycle to issue the fetch, the fetch latency, one cycle to
// decode, then ctrl_valid stays high until ctrl_ready. Reset is synchronous;
// the PC starts at RESET_PC (the 8051 reset vector 0000h).
module id1_stage
  import a8051_pkg::*;
#(
  parameter pc_t RESET_PC = '0
) (
  input  logic       clk,
  input  logic       rst_n,
  // fetch port (ID_2_IF_addr / IF_2_ID_data)
  output logic       f_addr_valid,
  input  logic       f_addr_ready,
  output pc_t        f_addr,
  input  logic       f_data_valid,
  output logic       f_data_ready,
  input  logic [7:0] f_data,
  // to ID2
  output logic       ctrl_valid,
  input  logic       ctrl_ready,
  output id_ctrl_t   ctrl,
  input  pc_t        ctrl_next_pc,
  // the opcode just decoded was regular (observability)
  output logic       ev_regular
);
  typedef enum logic [1:0] {S_REQ, S_WAIT, S_DEC, S_CTRL} state_e;
  state_e     state;
  pc_t        pc;
  logic [7:0] ir;
  id_ctrl_t   dec;

  assign f_addr_valid = (state == S_REQ);
  assign f_addr       = pc;
  assign f_data_ready = (state == S_WAIT);
  assign ctrl_valid   = (state == S_CTRL);

  // ---- decoder -----------------------------------------------------------
  logic is_regular;
  loc_e rloc;

  assign is_regular = ir[3] || (ir[2] && ir[1]);
  assign rloc       = ir[3] ? LOC_RN : LOC_IRI;

  always_comb begin
    op_e    op;
    fmt_e   fmt;
    br_e    br;
    read_t  rd;
    write_t wr;
    op  = OP_NOP;
    fmt = FMT_NONE;
    br  = BR_NONE;
    rd  = '{LOC_NONE, LOC_NONE};
    wr  = '{LOC_NONE, LOC_NONE};
    if (is_regular) begin
      unique case (ir[7:4])
        4'h0: begin op = OP_INC;  rd = '{rloc, LOC_NONE}; wr = '{rloc, LOC_NONE}; end
        4'h1: begin op = OP_DEC;  rd = '{rloc, LOC_NONE}; wr = '{rloc, LOC_NONE}; end
        4'h2: begin op = OP_ADD;  rd = '{LOC_A, rloc};    wr = '{LOC_A, LOC_NONE}; end
        4'h3: begin op = OP_ADDC; rd = '{LOC_A, rloc};    wr = '{LOC_A, LOC_NONE}; end
        4'h4: begin op = OP_ORL;  rd = '{LOC_A, rloc};    wr = '{LOC_A, LOC_NONE}; end
        4'h5: begin op = OP_ANL;  rd = '{LOC_A, rloc};    wr = '{LOC_A, LOC_NONE}; end
        4'h6: begin op = OP_XRL;  rd = '{LOC_A, rloc};    wr = '{LOC_A, LOC_NONE}; end
        4'h7: begin op = OP_MOV;  rd = '{LOC_IMM, LOC_NONE}; wr = '{rloc, LOC_NONE}; fmt = FMT_IMM8; end
        4'h8: begin op = OP_MOV;  rd = '{rloc, LOC_NONE}; wr = '{LOC_DIR, LOC_NONE}; fmt = FMT_DIR; end
        4'h9: begin op = OP_SUBB; rd = '{LOC_A, rloc};    wr = '{LOC_A, LOC_NONE}; end
        4'hA: begin op = OP_MOV;  rd = '{LOC_DIR, LOC_NONE}; wr = '{rloc, LOC_NONE}; fmt = FMT_DIR; end
        4'hB: begin op = OP_CJNE; rd = '{rloc, LOC_IMM};  fmt = FMT_IMM_REL; br = BR_COND; end
        4'hC: begin op = OP_XCH;  rd = '{LOC_A, rloc};    wr = '{LOC_A, rloc}; end
        4'hD:
          if (ir[3]) begin
            op = OP_DJNZ; rd = '{rloc, LOC_NONE}; wr = '{rloc, LOC_NONE}; fmt = FMT_REL; br = BR_COND;
          end else begin
            op = OP_XCHD; rd = '{LOC_A, rloc}; wr = '{LOC_A, rloc};
          end
        4'hE: begin op = OP_MOV;  rd = '{rloc, LOC_NONE}; wr = '{LOC_A, LOC_NONE}; end
        default: begin op = OP_MOV; rd = '{LOC_A, LOC_NONE}; wr = '{rloc, LOC_NONE}; end
      endcase
    end else if (ir[3:0] == 4'h1) begin
      // AJMP / ACALL: the page bits sit in the opcode's top three bits
      fmt = FMT_ADDR11;
      br  = BR_ABS11;
      if (ir[4]) begin op = OP_ACALL; wr = '{LOC_STACK, LOC_NONE}; end
      else       begin op = OP_AJMP; end
    end else begin
      unique case (ir)
        8'h00: op = OP_NOP;
        8'h10: begin op = OP_JBC; rd = '{LOC_BIT, LOC_NONE}; wr = '{LOC_BIT, LOC_NONE}; fmt = FMT_DIR_REL; br = BR_COND; end
        8'h20: begin op = OP_JB;  rd = '{LOC_BIT, LOC_NONE}; fmt = FMT_DIR_REL; br = BR_COND; end
        8'h30: begin op = OP_JNB; rd = '{LOC_BIT, LOC_NONE}; fmt = FMT_DIR_REL; br = BR_COND; end
        8'h40: begin op = OP_JC;  rd = '{LOC_C, LOC_NONE}; fmt = FMT_REL; br = BR_COND; end
        8'h50: begin op = OP_JNC; rd = '{LOC_C, LOC_NONE}; fmt = FMT_REL; br = BR_COND; end
        8'h60: begin op = OP_JZ;  rd = '{LOC_A, LOC_NONE}; fmt = FMT_REL; br = BR_COND; end
        8'h70: begin op = OP_JNZ; rd = '{LOC_A, LOC_NONE}; fmt = FMT_REL; br = BR_COND; end
        8'h80: begin op = OP_SJMP; fmt = FMT_REL; br = BR_REL; end
        8'h90: begin op = OP_MOV; rd = '{LOC_IMM, LOC_NONE}; wr = '{LOC_DPTR, LOC_NONE}; fmt = FMT_IMM16; end
        8'hA0: begin op = OP_ORL; rd = '{LOC_C, LOC_NBIT}; wr = '{LOC_C, LOC_NONE}; fmt = FMT_DIR; end
        8'hB0: begin op = OP_ANL; rd = '{LOC_C, LOC_NBIT}; wr = '{LOC_C, LOC_NONE}; fmt = FMT_DIR; end
        8'hC0: begin op = OP_PUSH; rd = '{LOC_DIR, LOC_NONE}; wr = '{LOC_STACK, LOC_NONE}; fmt = FMT_DIR; end
        8'hD0: begin op = OP_POP;  rd = '{LOC_STACK, LOC_NONE}; wr = '{LOC_DIR, LOC_NONE}; fmt = FMT_DIR; end
        8'hE0: begin op = OP_MOVX; rd = '{LOC_XDPTR, LOC_NONE}; wr = '{LOC_A, LOC_NONE}; end
        8'hF0: begin op = OP_MOVX; rd = '{LOC_A, LOC_NONE}; wr = '{LOC_XDPTR, LOC_NONE}; end

        8'h02: begin op = OP_LJMP; fmt = FMT_ADDR16; br = BR_ABS16; end
        8'h12: begin op = OP_LCALL; wr = '{LOC_STACK, LOC_NONE}; fmt = FMT_ADDR16; br = BR_ABS16; end
        8'h22: begin op = OP_RET;  rd = '{LOC_STACK, LOC_NONE}; br = BR_IND; end
        8'h32: begin op = OP_RETI; rd = '{LOC_STACK, LOC_NONE}; br = BR_IND; end
        8'h42: begin op = OP_ORL; rd = '{LOC_DIR, LOC_A}; wr = '{LOC_DIR, LOC_NONE}; fmt = FMT_DIR; end
        8'h52: begin op = OP_ANL; rd = '{LOC_DIR, LOC_A}; wr = '{LOC_DIR, LOC_NONE}; fmt = FMT_DIR; end
        8'h62: begin op = OP_XRL; rd = '{LOC_DIR, LOC_A}; wr = '{LOC_DIR, LOC_NONE}; fmt = FMT_DIR; end
        8'h72: begin op = OP_ORL; rd = '{LOC_C, LOC_BIT}; wr = '{LOC_C, LOC_NONE}; fmt = FMT_DIR; end
        8'h82: begin op = OP_ANL; rd = '{LOC_C, LOC_BIT}; wr = '{LOC_C, LOC_NONE}; fmt = FMT_DIR; end
        8'h92: begin op = OP_MOV; rd = '{LOC_C, LOC_NONE}; wr = '{LOC_BIT, LOC_NONE}; fmt = FMT_DIR; end
        8'hA2: begin op = OP_MOV; rd = '{LOC_BIT, LOC_NONE}; wr = '{LOC_C, LOC_NONE}; fmt = FMT_DIR; end
        8'hB2: begin op = OP_CPL; rd = '{LOC_BIT, LOC_NONE}; wr = '{LOC_BIT, LOC_NONE}; fmt = FMT_DIR; end
        8'hC2: begin op = OP_CLR;  wr = '{LOC_BIT, LOC_NONE}; fmt = FMT_DIR; end
        8'hD2: begin op = OP_SETB; wr = '{LOC_BIT, LOC_NONE}; fmt = FMT_DIR; end
        8'hE2, 8'hE3: begin op = OP_MOVX; rd = '{LOC_XRI, LOC_NONE}; wr = '{LOC_A, LOC_NONE}; end
        8'hF2, 8'hF3: begin op = OP_MOVX; rd = '{LOC_A, LOC_NONE}; wr = '{LOC_XRI, LOC_NONE}; end

        8'h03: begin op = OP_RR;  rd = '{LOC_A, LOC_NONE}; wr = '{LOC_A, LOC_NONE}; end
        8'h13: begin op = OP_RRC; rd = '{LOC_A, LOC_C};    wr = '{LOC_A, LOC_C}; end
        8'h23: begin op = OP_RL;  rd = '{LOC_A, LOC_NONE}; wr = '{LOC_A, LOC_NONE}; end
        8'h33: begin op = OP_RLC; rd = '{LOC_A, LOC_C};    wr = '{LOC_A, LOC_C}; end
        8'h43: begin op = OP_ORL; rd = '{LOC_DIR, LOC_IMM}; wr = '{LOC_DIR, LOC_NONE}; fmt = FMT_DIR_IMM; end
        8'h53: begin op = OP_ANL; rd = '{LOC_DIR, LOC_IMM}; wr = '{LOC_DIR, LOC_NONE}; fmt = FMT_DIR_IMM; end
        8'h63: begin op = OP_XRL; rd = '{LOC_DIR, LOC_IMM}; wr = '{LOC_DIR, LOC_NONE}; fmt = FMT_DIR_IMM; end
        8'h73: begin op = OP_JMP;  rd = '{LOC_A, LOC_DPTR}; br = BR_IND; end
        8'h83: begin op = OP_MOVC; rd = '{LOC_A, LOC_CODE}; wr = '{LOC_A, LOC_NONE}; end
        8'h93: begin op = OP_MOVC; rd = '{LOC_A, LOC_CODE}; wr = '{LOC_A, LOC_NONE}; end
        8'hA3: begin op = OP_INC;  rd = '{LOC_DPTR, LOC_NONE}; wr = '{LOC_DPTR, LOC_NONE}; end
        8'hB3: begin op = OP_CPL;  rd = '{LOC_C, LOC_NONE}; wr = '{LOC_C, LOC_NONE}; end
        8'hC3: begin op = OP_CLR;  wr = '{LOC_C, LOC_NONE}; end
        8'hD3: begin op = OP_SETB; wr = '{LOC_C, LOC_NONE}; end

        8'h04: begin op = OP_INC;  rd = '{LOC_A, LOC_NONE}; wr = '{LOC_A, LOC_NONE}; end
        8'h14: begin op = OP_DEC;  rd = '{LOC_A, LOC_NONE}; wr = '{LOC_A, LOC_NONE}; end
        8'h24: begin op = OP_ADD;  rd = '{LOC_A, LOC_IMM}; wr = '{LOC_A, LOC_NONE}; fmt = FMT_IMM8; end
        8'h34: begin op = OP_ADDC; rd = '{LOC_A, LOC_IMM}; wr = '{LOC_A, LOC_NONE}; fmt = FMT_IMM8; end
        8'h44: begin op = OP_ORL;  rd = '{LOC_A, LOC_IMM}; wr = '{LOC_A, LOC_NONE}; fmt = FMT_IMM8; end
        8'h54: begin op = OP_ANL;  rd = '{LOC_A, LOC_IMM}; wr = '{LOC_A, LOC_NONE}; fmt = FMT_IMM8; end
        8'h64: begin op = OP_XRL;  rd = '{LOC_A, LOC_IMM}; wr = '{LOC_A, LOC_NONE}; fmt = FMT_IMM8; end
        8'h74: begin op = OP_MOV;  rd = '{LOC_IMM, LOC_NONE}; wr = '{LOC_A, LOC_NONE}; fmt = FMT_IMM8; end
        8'h84: begin op = OP_DIV;  rd = '{LOC_A, LOC_B}; wr = '{LOC_A, LOC_B}; end
        8'h94: begin op = OP_SUBB; rd = '{LOC_A, LOC_IMM}; wr = '{LOC_A, LOC_NONE}; fmt = FMT_IMM8; end
        8'hA4: begin op = OP_MUL;  rd = '{LOC_A, LOC_B}; wr = '{LOC_A, LOC_B}; end
        8'hB4: begin op = OP_CJNE; rd = '{LOC_A, LOC_IMM}; fmt = FMT_IMM_REL; br = BR_COND; end
        8'hC4: begin op = OP_SWAP; rd = '{LOC_A, LOC_NONE}; wr = '{LOC_A, LOC_NONE}; end
        8'hD4: begin op = OP_DA;   rd = '{LOC_A, LOC_NONE}; wr = '{LOC_A, LOC_NONE}; end
        8'hE4: begin op = OP_CLR;  wr = '{LOC_A, LOC_NONE}; end
        8'hF4: begin op = OP_CPL;  rd = '{LOC_A, LOC_NONE}; wr = '{LOC_A, LOC_NONE}; end

        8'h05: begin op = OP_INC;  rd = '{LOC_DIR, LOC_NONE}; wr = '{LOC_DIR, LOC_NONE}; fmt = FMT_DIR; end
        8'h15: begin op = OP_DEC;  rd = '{LOC_DIR, LOC_NONE}; wr = '{LOC_DIR, LOC_NONE}; fmt = FMT_DIR; end
        8'h25: begin op = OP_ADD;  rd = '{LOC_A, LOC_DIR}; wr = '{LOC_A, LOC_NONE}; fmt = FMT_DIR; end
        8'h35: begin op = OP_ADDC; rd = '{LOC_A, LOC_DIR}; wr = '{LOC_A, LOC_NONE}; fmt = FMT_DIR; end
        8'h45: begin op = OP_ORL;  rd = '{LOC_A, LOC_DIR}; wr = '{LOC_A, LOC_NONE}; fmt = FMT_DIR; end
        8'h55: begin op = OP_ANL;  rd = '{LOC_A, LOC_DIR}; wr = '{LOC_A, LOC_NONE}; fmt = FMT_DIR; end
        8'h65: begin op = OP_XRL;  rd = '{LOC_A, LOC_DIR}; wr = '{LOC_A, LOC_NONE}; fmt = FMT_DIR; end
        8'h75: begin op = OP_MOV;  rd = '{LOC_IMM, LOC_NONE}; wr = '{LOC_DIR, LOC_NONE}; fmt = FMT_DIR_IMM; end
        8'h85: begin op = OP_MOV;  rd = '{LOC_DIR, LOC_NONE}; wr = '{LOC_DIR, LOC_NONE}; fmt = FMT_DIR_DIR; end
        8'h95: begin op = OP_SUBB; rd = '{LOC_A, LOC_DIR}; wr = '{LOC_A, LOC_NONE}; fmt = FMT_DIR; end
        8'hA5: op = OP_RSVD;
        8'hB5: begin op = OP_CJNE; rd = '{LOC_A, LOC_DIR}; fmt = FMT_DIR_REL; br = BR_COND; end
        8'hC5: begin op = OP_XCH;  rd = '{LOC_A, LOC_DIR}; wr = '{LOC_A, LOC_DIR}; fmt = FMT_DIR; end
        8'hD5: begin op = OP_DJNZ; rd = '{LOC_DIR, LOC_NONE}; wr = '{LOC_DIR, LOC_NONE}; fmt = FMT_DIR_REL; br = BR_COND; end
        8'hE5: begin op = OP_MOV;  rd = '{LOC_DIR, LOC_NONE}; wr = '{LOC_A, LOC_NONE}; fmt = FMT_DIR; end
        8'hF5: begin op = OP_MOV;  rd = '{LOC_A, LOC_NONE}; wr = '{LOC_DIR, LOC_NONE}; fmt = FMT_DIR; end
        default: op = OP_RSVD;
      endcase
    end
    dec.act    = '{remain: fmt_len(fmt), fmt: fmt, br: br};
    dec.rd     = rd;
    dec.wr     = wr;
    dec.op     = op;
    dec.opbyte = ir;
    dec.pc     = pc;
  end

  assign ev_regular = (state == S_DEC) && is_regular;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_REQ;
      pc    <= RESET_PC;
      ir    <= '0;
      ctrl  <= '0;
    end else begin
      unique case (state)
        S_REQ:  if (f_addr_ready) state <= S_WAIT;
        S_WAIT: if (f_data_valid) begin ir <= f_data; state <= S_DEC; end
        S_DEC:  begin ctrl <= dec; state <= S_CTRL; end
        S_CTRL: if (ctrl_ready) begin pc <= ctrl_next_pc; state <= S_REQ; end
        default: state <= S_REQ;
      endcase
    end
  end

  a_ctrl_hold : assert property (@(posedge clk) disable iff (!rst_n)
    ctrl_valid && !ctrl_ready |=> ctrl_valid && $stable(ctrl));

endmodule

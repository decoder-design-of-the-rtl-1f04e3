// id2_stage: second half of the 8051 instruction decoder.
//
// ID2 takes the bundle ID1 decoded from the opcode byte and branches on its
// ActionCtrl: zero, one or two remained bytes, or a branch. It fetches the
// remained bytes (at pc+1 and pc+2) through the fetch port, turns them into
// operands (direct/bit addresses, #data, #data16, relative or absolute
// targets) and passes the complete instruction to the operand-fetch stage.
//
// Branches are handled here:
//   * SJMP, AJMP/ACALL and LJMP/LCALL have targets fixed by the instruction
//     bytes; ID2 computes the target and makes it the next PC at once.
//     For calls, next_pc carries the return address for the stack push.
//   * Conditional branches (JC, JNZ, JB, JBC, CJNE, DJNZ, ...) depend on data
//     that only the later stages read. ID2 computes the target and the
//     fall-through address, sends the instruction on, and waits on the jmp
//     channel for the outcome: jmp_taken selects the target.
//   * JMP @A+DPTR, RET and RETI have targets held in registers or on the stack;
//     ID2 waits on the jmp channel and takes jmp_addr as the next PC.
// The jmp channel is this design's reading of the "jmp" input of the ID
// stage and of the write-back-to-decode path of the pipeline.
//
// Only after all this does ID2 acknowledge ID1 (ctrl_ready for one cycle) and
// hand it the next PC, so ID1 never fetches a new opcode while ID2 still
// uses the fetch port or the next PC is unknown.
//
// Timing: per remained byte one fetch round trip; one cycle to form the
// operands; of_valid stays high until of_ready; then, for a conditional or
// indirect branch, jmp_ready stays high until jmp_valid; then one
// acknowledge cycle. Reset is synchronous.
module id2_stage
  import a8051_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // from ID1 (ActionCtrl, ReadOut, WriteOut, OpcodeOut)
  input  logic       ctrl_valid,
  output logic       ctrl_ready,
  input  id_ctrl_t   ctrl,
  output pc_t        ctrl_next_pc,
  // fetch port for the remained bytes
  output logic       f_addr_valid,
  input  logic       f_addr_ready,
  output pc_t        f_addr,
  input  logic       f_data_valid,
  output logic       f_data_ready,
  input  logic [7:0] f_data,
  // to OF (ReadIn, WriteIn, Opcodein and operands)
  output logic       of_valid,
  input  logic       of_ready,
  output of_req_t    of_req,
  // branch outcome from the later stages
  input  logic       jmp_valid,
  output logic       jmp_ready,
  input  logic       jmp_taken,
  input  pc_t        jmp_addr,
  // observability: one-cycle pulses
  output logic       ev_redirect,   // next PC differs from the fall-through
  output logic       ev_jmp_wait,   // waiting for a branch outcome
  output logic       busy           // an instruction is in ID2
);
  typedef enum logic [2:0] {S_IDLE, S_REQ, S_WAIT, S_FORM, S_SEND, S_JMP, S_ACK} state_e;
  state_e     state;
  id_ctrl_t   c;
  logic       k;          // index of the remained byte being fetched
  logic [7:0] b2, b3;
  pc_t        next_pc, new_pc;
  of_req_t    form;

  assign f_addr_valid = (state == S_REQ);
  assign f_addr       = c.pc + pc_t'(k) + pc_t'(1);
  assign f_data_ready = (state == S_WAIT);
  assign of_valid     = (state == S_SEND);
  assign jmp_ready    = (state == S_JMP);
  assign ctrl_ready   = (state == S_ACK);
  assign ctrl_next_pc = new_pc;
  assign busy         = (state != S_IDLE);
  assign ev_jmp_wait  = (state == S_JMP);
  assign ev_redirect  = (state == S_ACK) && (new_pc != of_req.next_pc);

  assign next_pc = c.pc + pc_t'(c.act.remain) + pc_t'(1);

  always_comb begin
    logic [7:0] rel;
    form         = '0;
    form.op      = c.op;
    form.opbyte  = c.opbyte;
    form.rd      = c.rd;
    form.wr      = c.wr;
    form.br      = c.act.br;
    form.rsel    = c.opbyte[3] ? c.opbyte[2:0] : {2'b00, c.opbyte[0]};
    form.next_pc = next_pc;
    form.pc      = c.pc;
    rel          = '0;
    unique case (c.act.fmt)
      FMT_DIR:     form.addr1 = b2;
      FMT_IMM8:    form.imm   = {8'h00, b2};
      FMT_REL:     rel        = b2;
      FMT_DIR_IMM: begin form.addr1 = b2; form.imm = {8'h00, b3}; end
      FMT_DIR_REL: begin form.addr1 = b2; rel = b3; end
      FMT_IMM_REL: begin form.imm = {8'h00, b2}; rel = b3; end
      FMT_DIR_DIR: begin form.addr1 = b2; form.addr2 = b3; end
      FMT_IMM16:   form.imm = {b2, b3};
      default: ;
    endcase
    unique case (c.act.br)
      BR_REL, BR_COND: form.target = next_pc + pc_t'({{(PC_W-8){rel[7]}}, rel});
      BR_ABS11:        form.target = {next_pc[15:11], c.opbyte[7:5], b2};
      BR_ABS16:        form.target = {b2, b3};
      default:         form.target = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      c      <= '0;
      k      <= 1'b0;
      b2     <= '0;
      b3     <= '0;
      of_req <= '0;
      new_pc <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (ctrl_valid) begin
            c     <= ctrl;
            k     <= 1'b0;
            state <= (ctrl.act.remain == 2'd0) ? S_FORM : S_REQ;
          end
        S_REQ:
          if (f_addr_ready) state <= S_WAIT;
        S_WAIT:
          if (f_data_valid) begin
            if (k) b3 <= f_data; else b2 <= f_data;
            if (2'(k) + 2'd1 == c.act.remain) state <= S_FORM;
            else begin
              k     <= 1'b1;
              state <= S_REQ;
            end
          end
        S_FORM: begin
          of_req <= form;
          state  <= S_SEND;
        end
        S_SEND:
          if (of_ready) begin
            unique case (of_req.br)
              BR_COND, BR_IND: state <= S_JMP;
              BR_REL, BR_ABS11, BR_ABS16: begin new_pc <= of_req.target; state <= S_ACK; end
              default: begin new_pc <= of_req.next_pc; state <= S_ACK; end
            endcase
          end
        S_JMP:
          if (jmp_valid) begin
            if (of_req.br == BR_IND) new_pc <= jmp_addr;
            else new_pc <= jmp_taken ? of_req.target : of_req.next_pc;
            state <= S_ACK;
          end
        S_ACK:
          state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_of_hold : assert property (@(posedge clk) disable iff (!rst_n)
    of_valid && !of_ready |=> of_valid && $stable(of_req));

endmodule

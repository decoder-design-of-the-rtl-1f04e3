// tb_id2_stage: ID2 on its own. The testbench plays ID1, offering bundles
// for all 256 opcodes (four rounds, random addresses), with the byte-format
// field derived from an independent opcode map. It serves ID2's byte fetches
// from a random memory, accepts the decoded instruction with random
// back-pressure, and answers conditional and indirect branches on the jmp
// channel after a random delay. Checks: the remained bytes are fetched from
// pc+1 and pc+2 and no others; operands, branch target and fall-through
// address match the reference; the acknowledge to ID1 carries the right next
// PC and never comes before the branch outcome; control fields pass through.
`timescale 1ns/1ps
module tb_id2_stage;
  import a8051_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ctrl_valid, ctrl_ready;
  id_ctrl_t ctrl;
  pc_t  ctrl_next_pc;
  logic f_addr_valid, f_addr_ready, f_data_valid, f_data_ready;
  pc_t  f_addr;
  logic [7:0] f_data;
  logic of_valid, of_ready;
  of_req_t of_req;
  logic jmp_valid, jmp_ready, jmp_taken;
  pc_t  jmp_addr;
  logic ev_redirect, ev_jmp_wait, busy;

  id2_stage dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic fmt_e ref_fmt(logic [7:0] op);
    case (ref_roles(op))
      "D-": return FMT_DIR;
      "I-": return FMT_IMM8;
      "R-": return FMT_REL;
      "A-": return FMT_ADDR11;
      "DI": return FMT_DIR_IMM;
      "DR": return FMT_DIR_REL;
      "IR": return FMT_IMM_REL;
      "Dd": return FMT_DIR_DIR;
      "HL": return FMT_IMM16;
      "AA": return FMT_ADDR16;
      default: return FMT_NONE;
    endcase
  endfunction

  function automatic br_e ref_br(logic [7:0] op);
    br_e m [6] = '{BR_NONE, BR_REL, BR_ABS11, BR_ABS16, BR_COND, BR_IND};
    return m[ref_kind(op)];
  endfunction

  logic [7:0] mem [65536];
  initial for (int i = 0; i < 65536; i++) mem[i] = 8'($urandom);

  // fetch port model: random acceptance, answer two cycles later
  pc_t  fa;
  int   nfetch;
  pc_t  fetched [2];
  always @(posedge clk) begin
    if (!rst_n) begin
      f_addr_ready <= 0; f_data_valid <= 0;
    end else begin
      f_data_valid <= 0;
      f_addr_ready <= ($urandom % 2) == 0;
      if (f_addr_valid && f_addr_ready) begin
        if (nfetch < 2) fetched[nfetch] = f_addr;
        nfetch = nfetch + 1;
        fa = f_addr;
        #12;
        f_data <= mem[fa]; f_data_valid <= 1;
      end
    end
  end

  // OF back-pressure
  always_ff @(posedge clk) of_ready <= ($urandom % 3) != 0;

  int n_kind [6];
  int n_redirect = 0;
  always_ff @(posedge clk) if (rst_n && ev_redirect) n_redirect <= n_redirect + 1;

  initial begin
    logic [7:0] ops [256];
    ctrl_valid = 0; ctrl = '0; jmp_valid = 0; jmp_taken = 0; jmp_addr = '0; nfetch = 0;
    for (int i = 0; i < 256; i++) ops[i] = 8'(i);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) begin
      ops.shuffle();
      foreach (ops[i]) begin
        logic [7:0] op;
        pc_t      pc0, exp_next;
        ref_dec_t r;
        op  = ops[i];
        pc0 = pc_t'($urandom);
        r   = ref_decode(pc0, op, mem[pc0 + 1], mem[pc0 + 2]);
        n_kind[r.kind]++;
        @(negedge clk);
        nfetch = 0;
        ctrl_valid = 1;
        ctrl.act.remain = 2'(ref_len(op) - 1);
        ctrl.act.fmt    = ref_fmt(op);
        ctrl.act.br     = ref_br(op);
        ctrl.op         = op_e'($urandom % 45);
        ctrl.rd         = read_t'($urandom);
        ctrl.wr         = write_t'($urandom);
        ctrl.opbyte     = op;
        ctrl.pc         = pc0;
        // decoded instruction
        while (!(of_valid && of_ready)) begin
          check(!ctrl_ready, "no acknowledge before the instruction is passed on");
          @(negedge clk);
        end
        check(nfetch == ref_len(op) - 1, $sformatf("%h fetched %0d bytes", op, nfetch));
        if (nfetch >= 1) check(fetched[0] == pc0 + 1, "first remained byte address");
        if (nfetch >= 2) check(fetched[1] == pc0 + 2, "second remained byte address");
        check(of_req.addr1 == r.addr1 && of_req.addr2 == r.addr2 && of_req.imm == r.imm,
              $sformatf("%h operands %h %h %h exp %h %h %h", op, of_req.addr1, of_req.addr2, of_req.imm,
                        r.addr1, r.addr2, r.imm));
        check(of_req.next_pc == r.next_pc && of_req.pc == pc0, $sformatf("%h next_pc", op));
        if (r.kind inside {1, 2, 3, 4})
          check(of_req.target == r.target, $sformatf("%h target %h exp %h", op, of_req.target, r.target));
        check(of_req.op == ctrl.op && of_req.rd == ctrl.rd && of_req.wr == ctrl.wr && of_req.opbyte == op,
              "control fields pass through");
        if (op[3]) check(of_req.rsel == op[2:0], "register number");
        exp_next = r.next_pc;
        if (r.kind inside {1, 2, 3}) exp_next = r.target;
        if (r.kind >= 4) begin
          // outcome arrives later; ID2 must wait for it
          logic tk;
          pc_t  ja;
          tk = $urandom % 2;
          ja = pc_t'($urandom);
          @(negedge clk);
          repeat ($urandom % 5) begin
            check(jmp_ready && !ctrl_ready, "waiting for the branch outcome");
            @(negedge clk);
          end
          jmp_valid = 1; jmp_taken = tk; jmp_addr = ja;
          while (!jmp_ready) @(negedge clk);
          @(posedge clk); #1; jmp_valid = 0;
          exp_next = (r.kind == 5) ? ja : (tk ? r.target : r.next_pc);
        end
        @(negedge clk);
        while (!ctrl_ready) @(negedge clk);
        check(ctrl_next_pc == exp_next, $sformatf("%h next pc %h exp %h", op, ctrl_next_pc, exp_next));
        @(posedge clk); #1; ctrl_valid = 0;
      end
    end
    check(n_redirect > 0, "redirects seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

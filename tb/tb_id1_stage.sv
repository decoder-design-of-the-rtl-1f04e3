// tb_id1_stage: feeds ID1 every one of the 256 opcodes, in random order, and
// checks the decoded bundle against an independent opcode map: mnemonic,
// number of remained bytes, branch kind, regular/irregular split, the
// address of the opcode and the raw byte. ID2 is modelled by the testbench,
// which acknowledges after a random delay with a random next PC; ID1 must
// fetch its next opcode from exactly that address.
`timescale 1ns/1ps
module tb_id1_stage;
  import a8051_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic f_addr_valid, f_addr_ready, f_data_valid, f_data_ready;
  pc_t  f_addr;
  logic [7:0] f_data;
  logic ctrl_valid, ctrl_ready;
  id_ctrl_t ctrl;
  pc_t  ctrl_next_pc;
  logic ev_regular;

  id1_stage dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  // Mnemonic of each opcode, from the 8051 opcode map.
  function automatic string ref_mnem(logic [7:0] op);
    string reg_ops [16] = '{"INC", "DEC", "ADD", "ADDC", "ORL", "ANL", "XRL", "MOV",
                            "MOV", "SUBB", "MOV", "CJNE", "XCH", "XCHD", "MOV", "MOV"};
    string c0 [16] = '{"NOP", "JBC", "JB", "JNB", "JC", "JNC", "JZ", "JNZ",
                       "SJMP", "MOV", "ORL", "ANL", "PUSH", "POP", "MOVX", "MOVX"};
    string c2 [16] = '{"LJMP", "LCALL", "RET", "RETI", "ORL", "ANL", "XRL", "ORL",
                       "ANL", "MOV", "MOV", "CPL", "CLR", "SETB", "MOVX", "MOVX"};
    string c3 [16] = '{"RR", "RRC", "RL", "RLC", "ORL", "ANL", "XRL", "JMP",
                       "MOVC", "MOVC", "INC", "CPL", "CLR", "SETB", "MOVX", "MOVX"};
    string c4 [16] = '{"INC", "DEC", "ADD", "ADDC", "ORL", "ANL", "XRL", "MOV",
                       "DIV", "SUBB", "MUL", "CJNE", "SWAP", "DA", "CLR", "CPL"};
    string c5 [16] = '{"INC", "DEC", "ADD", "ADDC", "ORL", "ANL", "XRL", "MOV",
                       "MOV", "SUBB", "RSVD", "CJNE", "XCH", "DJNZ", "MOV", "MOV"};
    int h = int'(op[7:4]);
    case (op[3:0])
      4'h0: return c0[h];
      4'h1: return op[4] ? "ACALL" : "AJMP";
      4'h2: return c2[h];
      4'h3: return c3[h];
      4'h4: return c4[h];
      4'h5: return c5[h];
      default: return (h == 13 && op[3]) ? "DJNZ" : reg_ops[h];
    endcase
  endfunction

  function automatic br_e ref_br(logic [7:0] op);
    br_e m [6] = '{BR_NONE, BR_REL, BR_ABS11, BR_ABS16, BR_COND, BR_IND};
    return m[ref_kind(op)];
  endfunction

  logic [7:0] ops [256];
  pc_t        exp_addr;
  int         n_reg = 0;

  always_ff @(posedge clk) if (rst_n && ev_regular) n_reg <= n_reg + 1;

  initial begin
    f_addr_ready = 0; f_data_valid = 0; f_data = 0; ctrl_ready = 0; ctrl_next_pc = 0;
    for (int i = 0; i < 256; i++) ops[i] = 8'(i);
    ops.shuffle();
    exp_addr = '0;   // reset vector
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (ops[i]) begin
      logic [7:0] op;
      pc_t nxt;
      op = ops[i];
      // fetch port: accept the address after a random delay, answer later
      @(negedge clk);
      while (!f_addr_valid) @(negedge clk);
      repeat ($urandom % 3) @(negedge clk);
      check(f_addr == exp_addr, $sformatf("fetch address %h exp %h", f_addr, exp_addr));
      f_addr_ready = 1;
      @(posedge clk); #1; f_addr_ready = 0;
      repeat ($urandom % 4) @(negedge clk);
      @(negedge clk);
      f_data_valid = 1; f_data = op;
      @(posedge clk); #1; f_data_valid = 0;
      @(negedge clk);
      while (!ctrl_valid) @(negedge clk);
      check(ctrl.op.name() == {"OP_", ref_mnem(op)},
            $sformatf("%h decoded as %s exp %s", op, ctrl.op.name(), ref_mnem(op)));
      check(int'(ctrl.act.remain) == ref_len(op) - 1, $sformatf("%h remained bytes %0d", op, ctrl.act.remain));
      check(ctrl.act.br == ref_br(op), $sformatf("%h branch kind %s", op, ctrl.act.br.name()));
      check(int'(fmt_len(ctrl.act.fmt)) == ref_len(op) - 1, $sformatf("%h format", op));
      check(ctrl.opbyte == op && ctrl.pc == exp_addr, $sformatf("%h opcode/pc", op));
      repeat ($urandom % 3) @(negedge clk);
      check(ctrl_valid, "ctrl held until acknowledged");
      nxt = pc_t'($urandom);
      ctrl_ready = 1; ctrl_next_pc = nxt;
      @(posedge clk); #1; ctrl_ready = 0;
      exp_addr = nxt;
    end
    // low nibble 6..F: 16 x 10 regular opcodes
    check(n_reg == 160, $sformatf("regular count %0d", n_reg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ref_pkg: independent reference for the 8051 instruction encoding, used by
// the testbenches to predict what the decoder must produce. It is written
// from the 8051 opcode map row by row and shares no code with the RTL.
package tb_ref_pkg;

  // Instruction length in bytes; one string per high nibble, one digit per
  // low nibble (0..F).
  function automatic int ref_len(logic [7:0] op);
    string rows [16] = '{
      "1231121111111111", "3231121111111111", "3211221111111111", "3211221111111111",
      "2223221111111111", "2223221111111111", "2223221111111111", "2221232222222222",
      "2221132222222222", "3221221111111111", "2221112222222222", "2221333333333333",
      "2221121111111111", "2221131122222222", "1211121111111111", "1211121111111111"};
    return int'(rows[op[7:4]][int'(op[3:0])]) - 48;
  endfunction

  // Branch kind: 0 none, 1 SJMP, 2 AJMP/ACALL, 3 LJMP/LCALL, 4 conditional,
  // 5 indirect (JMP @A+DPTR, RET, RETI).
  function automatic int ref_kind(logic [7:0] op);
    if (op == 8'h80) return 1;
    if (op[3:0] == 4'h1) return 2;
    if (op == 8'h02 || op == 8'h12) return 3;
    if (op == 8'h22 || op == 8'h32 || op == 8'h73) return 5;
    if (op inside {8'h10, 8'h20, 8'h30, 8'h40, 8'h50, 8'h60, 8'h70, 8'hB4, 8'hB5, 8'hD5}) return 4;
    if (op[7:4] == 4'hB && op[3:0] >= 4'h6) return 4;   // CJNE @Ri/Rn,#data,rel
    if (op[7:4] == 4'hD && op[3]) return 4;              // DJNZ Rn,rel
    return 0;
  endfunction

  // Role of the second and third byte: "D" direct/bit address, "d" second
  // direct address (destination of MOV dir,dir), "I" #data, "R" relative
  // offset, "A" address, "H"/"L" high/low byte of #data16, "-" none.
  function automatic string ref_roles(logic [7:0] op);
    int n = ref_len(op);
    if (n == 1) return "--";
    if (op[3:0] == 4'h1) return "A-";
    if (op == 8'h02 || op == 8'h12) return "AA";
    if (op == 8'h90) return "HL";
    if (op == 8'h85) return "Dd";
    if (op inside {8'h43, 8'h53, 8'h63, 8'h75}) return "DI";
    if (op inside {8'h10, 8'h20, 8'h30, 8'hB5, 8'hD5}) return "DR";
    if (op == 8'hB4 || (op[7:4] == 4'hB && op[3:0] >= 4'h6)) return "IR";
    if (op inside {8'h40, 8'h50, 8'h60, 8'h70, 8'h80} || (op[7:4] == 4'hD && op[3])) return "R-";
    if (op inside {8'h24, 8'h34, 8'h44, 8'h54, 8'h64, 8'h74, 8'h94}) return "I-";
    if (op[7:4] == 4'h7 && op[3:0] >= 4'h6) return "I-";  // MOV @Ri/Rn,#data
    return "D-";
  endfunction

  typedef struct {
    logic [7:0]  addr1, addr2;
    logic [15:0] imm;
    logic [15:0] target;
    logic [15:0] next_pc;
    int          kind;
  } ref_dec_t;

  function automatic ref_dec_t ref_decode(logic [15:0] pc, logic [7:0] op, logic [7:0] b2, logic [7:0] b3);
    ref_dec_t r;
    string    ro = ref_roles(op);
    int       n  = ref_len(op);
    logic [7:0] relb;
    r.addr1 = 0; r.addr2 = 0; r.imm = 0; r.target = 0;
    r.kind    = ref_kind(op);
    r.next_pc = pc + 16'(n);
    if (ro[0] == "D") r.addr1 = b2;
    if (ro[1] == "d") r.addr2 = b3;
    if (ro[0] == "I") r.imm = {8'h00, b2};
    if (ro[1] == "I") r.imm = {8'h00, b3};
    if (ro == "HL")   r.imm = {b2, b3};
    relb = (n == 2) ? b2 : b3;
    case (r.kind)
      1, 4: r.target = r.next_pc + {{8{relb[7]}}, relb};
      2:    r.target = {r.next_pc[15:11], op[7:5], b2};
      3:    r.target = {b2, b3};
      default: r.target = 0;
    endcase
    return r;
  endfunction

endpackage

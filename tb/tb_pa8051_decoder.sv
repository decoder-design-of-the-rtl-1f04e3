// tb_pa8051_decoder: end-to-end test of the fetch/decode front end at its
// default configuration (two 32-byte buffers).
//
// A 4 KB program ROM (latency 2..5 cycles) holds a straight-line region of
// non-branch instructions from 0000h, closed by an indirect jump, and random
// bytes above 0200h. A model of
// the later pipeline stages accepts decoded instructions with random
// back-pressure and answers every conditional or indirect branch on the jmp
// channel with a random outcome. An independent reference walks the same
// program and checks every decoded instruction: its address, opcode,
// operands, branch target and fall-through address. It also counts how often
// each mechanism of the design occurs and fails any that never did.
`timescale 1ns/1ps
module tb_pa8051_decoder;
  import a8051_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned NINSTR = 4000;
  localparam int unsigned ROM_AW = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic rom_req_valid, rom_req_ready, rom_resp_valid;
  pc_t  rom_addr;
  logic [7:0] rom_resp_data;
  logic of_valid, of_ready, jmp_valid, jmp_ready, jmp_taken;
  of_req_t of_req;
  pc_t  jmp_addr;
  logic ev_hit, ev_miss, ev_prefetch, ev_conflict, ev_filling, ev_regular, ev_redirect, ev_jmp_wait;

  pa8051_decoder dut (.*);

  rom_model #(.ROM_AW(ROM_AW), .LAT(2), .JITTER(3)) u_rom (
    .clk, .rst_n, .req_valid(rom_req_valid), .req_ready(rom_req_ready), .addr(rom_addr),
    .resp_valid(rom_resp_valid), .resp_data(rom_resp_data));

  int checks = 0, failures = 0;
  int n_hit, n_miss, n_pf, n_conf, n_fillwait, n_reg, n_irreg, n_redir, n_jwait, n_bp;
  int n_len [4];
  int n_kind [6];
  int n_taken, n_nottaken;

  function automatic logic [7:0] romb(pc_t a);
    return u_rom.mem[a[ROM_AW-1:0]];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // program image
  initial begin : init_rom
    automatic int a = 0;
    while (a < 512) begin
      logic [7:0] op;
      do op = 8'($urandom); while (ref_kind(op) != 0);
      u_rom.mem[a] = op;
      for (int i = 1; i < ref_len(op); i++) u_rom.mem[a + i] = 8'($urandom);
      a += ref_len(op);
    end
    for (int i = a; i < 2**ROM_AW; i++) u_rom.mem[i] = 8'($urandom);
    u_rom.mem[a] = 8'h73;  // JMP @A+DPTR: leave the straight region for a random address
  end

  // later-stage model: back-pressure on OF, branch outcomes on jmp
  logic       pend;
  int         pend_kind, delay;
  logic       dec_taken;
  pc_t        dec_addr;
  pc_t        exp_pc;
  int         ninstr = 0;
  int         cycles = 0;

  always_ff @(posedge clk) if (rst_n) cycles <= cycles + 1;

  always_ff @(posedge clk) of_ready <= ($urandom % 4) != 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      pend <= 0; jmp_valid <= 0; exp_pc = '0;
    end else begin
      if (jmp_valid && jmp_ready) begin
        jmp_valid <= 0;
        pend <= 0;
      end else if (pend && !jmp_valid) begin
        if (delay == 0) begin
          jmp_valid <= 1; jmp_taken <= dec_taken; jmp_addr <= dec_addr;
        end else delay <= delay - 1;
      end
      if (of_valid && !of_ready) n_bp++;
      if (of_valid && of_ready) begin
        ref_dec_t r;
        logic [7:0] op;
        op = romb(exp_pc);
        r  = ref_decode(exp_pc, op, romb(exp_pc + 1), romb(exp_pc + 2));
        check(of_req.pc == exp_pc, $sformatf("pc %h exp %h", of_req.pc, exp_pc));
        check(of_req.opbyte == op, $sformatf("opcode %h exp %h", of_req.opbyte, op));
        check(of_req.next_pc == r.next_pc, "next_pc");
        check(of_req.addr1 == r.addr1 && of_req.addr2 == r.addr2 && of_req.imm == r.imm,
              $sformatf("operands of %h", op));
        if (r.kind inside {1, 2, 3, 4}) check(of_req.target == r.target, $sformatf("target of %h", op));
        n_len[ref_len(op) - 1]++;
        n_kind[r.kind]++;
        if (op[3] || (op[2] && op[1])) n_reg++; else n_irreg++;
        case (r.kind)
          0: exp_pc = r.next_pc;
          1, 2, 3: exp_pc = r.target;
          4: begin
            dec_taken = ($urandom % 3) == 0;
            exp_pc    = dec_taken ? r.target : r.next_pc;
            if (dec_taken) n_taken++; else n_nottaken++;
          end
          default: begin
            dec_addr = pc_t'($urandom % (2**ROM_AW));
            exp_pc   = dec_addr;
          end
        endcase
        if (r.kind >= 4) begin
          pend <= 1; delay <= $urandom % 4;
        end
        ninstr++;
      end
      if (ev_hit) n_hit++;
      if (ev_miss) n_miss++;
      if (ev_prefetch) n_pf++;
      if (ev_conflict) n_conf++;
      if (ev_redirect) n_redir++;
      if (ev_jmp_wait) n_jwait++;
      if (ev_filling && dut.u_if.g_buffered.u_fetcher.state == dut.u_if.g_buffered.u_fetcher.S_RWAIT) n_fillwait++;
      // ID1's regular/irregular split must agree with the opcode map
      if (ev_regular) check(dut.u_id.u_id1.ir[3:0] >= 4'h6, "regular flag");
    end
  end

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (ninstr >= NINSTR);
    repeat (2) @(posedge clk);
    $display("instructions %0d  cycles %0d  rom accesses %0d", ninstr, cycles, u_rom.accesses);
    $display("hit %0d miss %0d prefetch %0d conflict %0d fill-wait %0d", n_hit, n_miss, n_pf, n_conf, n_fillwait);
    $display("len1 %0d len2 %0d len3 %0d regular %0d irregular %0d", n_len[0], n_len[1], n_len[2], n_reg, n_irreg);
    $display("sjmp %0d ajmp %0d ljmp %0d cond %0d (taken %0d) indirect %0d redirect %0d jmp-wait %0d backpressure %0d",
             n_kind[1], n_kind[2], n_kind[3], n_kind[4], n_taken, n_kind[5], n_redir, n_jwait, n_bp);
    need(n_hit, "buffer hit");
    need(n_miss, "buffer miss and refill of all buffers");
    need(n_pf, "prefetch after the last byte of a buffer");
    need(n_conf, "two buffers competing for ROM");
    need(n_fillwait, "read waiting for a buffer fill");
    need(n_len[0], "0 remained bytes");
    need(n_len[1], "1 remained byte");
    need(n_len[2], "2 remained bytes");
    need(n_reg, "regular instruction");
    need(n_irreg, "irregular instruction");
    need(n_kind[1], "SJMP");
    need(n_kind[2], "AJMP/ACALL");
    need(n_kind[3], "LJMP/LCALL");
    need(n_taken, "conditional branch taken");
    need(n_nottaken, "conditional branch not taken");
    need(n_kind[5], "indirect branch");
    need(n_redir, "PC redirect");
    need(n_jwait, "wait for branch outcome");
    need(n_bp, "OF back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

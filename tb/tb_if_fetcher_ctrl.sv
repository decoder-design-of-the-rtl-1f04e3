// tb_if_fetcher_ctrl: the fetcher controller against model buffers.
//
// The model buffers take a write action and stay busy for a random time (the
// fill), and answer a read in the next cycle with the ROM byte of the address.
// A reference predicts, for every PC, the exact sequence of buffer actions:
// a hit in the first buffer holding the byte gives one read (plus a prefetch
// write of base + NBUF*BYTES when the byte is the window's last); a miss gives
// one write per buffer (pc + k*BYTES) and then a read of buffer 0. The PC
// stream is mostly sequential with random jumps, near and far.
`timescale 1ns/1ps
module tb_if_fetcher_ctrl;
  import a8051_pkg::*;
  localparam int unsigned NBUF = 2, BYTES = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic pc_valid, pc_ready, byte_valid, byte_ready;
  pc_t  pc;
  logic [7:0] byte_data;
  logic [NBUF-1:0] act_valid, act_ready, rdata_valid;
  logic act_rnw;
  pc_t  act_addr;
  logic [7:0] rdata [NBUF];
  logic ev_hit, ev_miss, ev_prefetch;
  int   n_ev_miss = 0;
  always_ff @(posedge clk) if (ev_miss) n_ev_miss <= n_ev_miss + 1;

  if_fetcher_ctrl #(.NBUF(NBUF), .BYTES(BYTES)) dut (.*);

  function automatic logic [7:0] romf(pc_t a);
    return 8'((a * 16'd29) ^ (a >> 7));
  endfunction

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // model buffers
  int  busy [NBUF];
  pc_t mbase [NBUF];
  for (genvar k = 0; k < NBUF; k++) begin : g_mb
    assign act_ready[k] = (busy[k] == 0);
    always @(posedge clk) begin
      rdata_valid[k] <= 1'b0;
      if (!rst_n) busy[k] <= 0;
      else if (busy[k] > 0) busy[k] <= busy[k] - 1;
      else if (act_valid[k]) begin
        if (act_rnw) begin
          check(pc_t'(act_addr - mbase[k]) < BYTES, "read inside the buffer window");
          rdata[k] <= romf(act_addr); rdata_valid[k] <= 1'b1;
        end else begin
          mbase[k] <= act_addr; busy[k] <= 5 + $urandom % 40;
        end
      end
    end
  end

  // expected action queue
  typedef struct { int k; logic rnw; pc_t a; } act_t;
  act_t exp_q [$];
  pc_t  rbase [NBUF];
  logic rvalid [NBUF];
  int   n_hit, n_miss, n_pf, n_hit2;

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < NBUF; k++) if (act_valid[k] && act_ready[k]) begin
      check(exp_q.size() > 0, "unexpected action");
      if (exp_q.size() > 0) begin
        act_t e;
        e = exp_q.pop_front();
        check(e.k == k && e.rnw == act_rnw && e.a == act_addr,
              $sformatf("action buf%0d rnw%0d %h, exp buf%0d rnw%0d %h", k, act_rnw, act_addr, e.k, e.rnw, e.a));
      end
    end
  end

  task automatic predict(input pc_t p);
    int h = -1;
    for (int k = NBUF - 1; k >= 0; k--) if (rvalid[k] && pc_t'(p - rbase[k]) < BYTES) h = k;
    if (h < 0) begin
      n_miss++;
      for (int k = 0; k < NBUF; k++) begin
        rbase[k] = p + pc_t'(k * BYTES); rvalid[k] = 1;
        exp_q.push_back('{k, 1'b0, rbase[k]});
      end
      h = 0;
    end else begin
      n_hit++;
      if (h > 0) n_hit2++;
    end
    exp_q.push_back('{h, 1'b1, p});
    if (pc_t'(p - rbase[h]) == BYTES - 1) begin
      n_pf++;
      rbase[h] = rbase[h] + pc_t'(NBUF * BYTES);
      exp_q.push_back('{h, 1'b0, rbase[h]});
    end
  endtask

  initial begin
    pc_t p = 16'h1234;
    pc_valid = 0; pc = '0; byte_ready = 0;
    for (int k = 0; k < NBUF; k++) rvalid[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      while (!pc_ready) @(negedge clk);
      check(exp_q.size() == 0, "all predicted actions done");
      predict(p);
      pc_valid = 1; pc = p;
      @(posedge clk); #1; pc_valid = 0;
      byte_ready = 1;
      @(negedge clk);
      while (!byte_valid) @(negedge clk);
      check(byte_data == romf(p), $sformatf("byte at %h", p));
      @(posedge clk); #1; byte_ready = 0;
      case ($urandom % 40)
        0: p = pc_t'($urandom);
        1: p = p - pc_t'($urandom % 20);
        2: p = p + pc_t'($urandom % 90);
        default: p = p + 1;
      endcase
    end
    repeat (60) @(posedge clk);
    check(exp_q.size() == 0, "all predicted actions done");
    $display("hit %0d (in buffer 2: %0d) miss %0d prefetch %0d", n_hit, n_hit2, n_miss, n_pf);
    check(n_hit2 > 0 && n_miss > 0 && n_pf > 0, "all cases seen");
    check(n_ev_miss == n_miss, "miss strobe count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

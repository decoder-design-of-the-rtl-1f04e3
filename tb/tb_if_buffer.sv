// tb_if_buffer: fills the buffer from random unaligned start addresses and
// reads every byte of the window back in random order. Checks the data, that
// a fill makes exactly BYTES consecutive ROM requests starting at the given
// address, that a read offered during a fill is held off until the fill has
// ended, and that a read answers in the next cycle.
`timescale 1ns/1ps
module tb_if_buffer;
  import a8051_pkg::*;
  localparam int unsigned BYTES = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic act_valid, act_ready, act_rnw, rdata_valid;
  pc_t  act_addr;
  logic [7:0] rdata;
  logic mreq_valid, mreq_ready, mresp_valid, filling;
  pc_t  mreq_addr;
  logic [7:0] mresp_data;

  if_buffer #(.BYTES(BYTES)) dut (.*);
  rom_model #(.ROM_AW(16), .LAT(1), .JITTER(2)) u_rom (
    .clk, .rst_n, .req_valid(mreq_valid), .req_ready(mreq_ready), .addr(mreq_addr),
    .resp_valid(mresp_valid), .resp_data(mresp_data));

  int checks = 0, failures = 0;
  int cyc = 0, t0;
  always_ff @(posedge clk) cyc <= cyc + 1;
  int nreq;
  pc_t next_expected;

  initial for (int i = 0; i < 65536; i++) u_rom.mem[i] = 8'((i * 13) ^ (i >> 8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // every ROM request must be the next consecutive address
  always_ff @(posedge clk) if (rst_n && mreq_valid && mreq_ready) begin
    check(mreq_addr == next_expected, $sformatf("fill address %h exp %h", mreq_addr, next_expected));
    next_expected <= next_expected + 1'b1;
    nreq <= nreq + 1;
  end

  // drive on the falling edge; returns just after the accepting rising edge
  task automatic act(input logic rnw, input pc_t a);
    @(negedge clk);
    act_valid = 1'b1; act_rnw = rnw; act_addr = a;
    while (!act_ready) @(negedge clk);
    @(posedge clk); #1;
    act_valid = 1'b0;
  endtask

  initial begin
    act_valid = 1'b0; act_rnw = 1'b0; act_addr = '0; nreq = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      pc_t base;
      int  order [BYTES];
      base = pc_t'($urandom);
      next_expected = base;
      nreq = 0;
      act(1'b0, base);
      t0 = cyc;
      // a read right behind the write must wait for the whole fill
      check(!act_ready && filling, "buffer busy during fill");
      act(1'b1, base + 5);
      check(nreq == BYTES, $sformatf("fill made %0d requests", nreq));
      // one ROM round trip (at least two cycles here) per byte, one byte at a time
      check(cyc - t0 >= 2 * BYTES, $sformatf("fill took %0d cycles", cyc - t0));
      check(rdata_valid && rdata == u_rom.mem[base + 5], "read after fill");
      for (int i = 0; i < BYTES; i++) order[i] = i;
      order.shuffle();
      foreach (order[i]) begin
        act(1'b1, base + pc_t'(order[i]));
        check(rdata_valid && rdata == u_rom.mem[base + pc_t'(order[i])],
              $sformatf("read %h", base + pc_t'(order[i])));
      end
    end
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

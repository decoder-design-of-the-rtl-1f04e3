// tb_if_stage: the IF stage (two 32-byte buffers) with a ROM of random
// latency. A mostly sequential address stream with random jumps is fetched
// byte by byte; every byte must equal the ROM contents. The test also
// requires hits, misses, last-byte prefetches and ROM conflicts between the
// buffers to occur, and checks the hit latency: three cycles from the
// accepting edge to byte_valid, never less.
`timescale 1ns/1ps
module tb_if_stage;
  import a8051_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic pc_valid, pc_ready, byte_valid, byte_ready;
  pc_t  pc;
  logic [7:0] byte_data;
  logic rom_req_valid, rom_req_ready, rom_resp_valid;
  pc_t  rom_addr;
  logic [7:0] rom_resp_data;
  logic ev_hit, ev_miss, ev_prefetch, ev_conflict, ev_filling;

  if_stage dut (.*);
  rom_model #(.ROM_AW(16), .LAT(2), .JITTER(2)) u_rom (
    .clk, .rst_n, .req_valid(rom_req_valid), .req_ready(rom_req_ready), .addr(rom_addr),
    .resp_valid(rom_resp_valid), .resp_data(rom_resp_data));

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_pf = 0, n_conf = 0;
  int cyc = 0, t0, lat, min_lat = 1000;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (ev_hit) n_hit <= n_hit + 1;
      if (ev_miss) n_miss <= n_miss + 1;
      if (ev_prefetch) n_pf <= n_pf + 1;
      if (ev_conflict) n_conf <= n_conf + 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial for (int i = 0; i < 65536; i++) u_rom.mem[i] = 8'($urandom);

  initial begin
    pc_t p = 16'hFF80;   // also crosses the top of the address space
    pc_valid = 0; pc = '0; byte_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      pc_valid = 1; pc = p;
      while (!pc_ready) @(negedge clk);
      @(posedge clk); #1; pc_valid = 0; t0 = cyc;
      byte_ready = 1;
      @(negedge clk);
      while (!byte_valid) @(negedge clk);
      lat = cyc - t0;
      if (lat < min_lat) min_lat = lat;
      check(byte_data == u_rom.mem[p], $sformatf("byte at %h", p));
      @(posedge clk); #1; byte_ready = 0;
      case ($urandom % 60)
        0: p = pc_t'($urandom);
        1: p = p - pc_t'($urandom % 30);
        default: p = p + 1;
      endcase
    end
    $display("hit %0d miss %0d prefetch %0d conflict %0d min latency %0d", n_hit, n_miss, n_pf, n_conf, min_lat);
    check(n_hit > 0, "hits");
    check(n_miss > 0, "misses");
    check(n_pf > 0, "prefetches");
    check(n_conf > 0, "conflicts");
    check(min_lat == 3, "hit latency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

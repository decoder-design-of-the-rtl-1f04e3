// tb_if_mem_interface: two requesters issue random byte addresses to the
// arbiter, which shares a ROM with random latency between them. Every byte
// must come back to the requester that asked for it, with the ROM contents
// of its address; when both wait at once, requester 0 must be granted first.
`timescale 1ns/1ps
module tb_if_mem_interface;
  import a8051_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] req_valid, req_ready, resp_valid;
  pc_t        req_addr [2];
  logic [7:0] resp_data;
  logic       rom_req_valid, rom_req_ready, rom_resp_valid, conflict;
  pc_t        rom_addr;
  logic [7:0] rom_resp_data;

  if_mem_interface #(.NREQ(2)) dut (.*);
  rom_model #(.ROM_AW(12), .LAT(1), .JITTER(3)) u_rom (
    .clk, .rst_n, .req_valid(rom_req_valid), .req_ready(rom_req_ready), .addr(rom_addr),
    .resp_valid(rom_resp_valid), .resp_data(rom_resp_data));

  int checks = 0, failures = 0, n_conf = 0, done [2];
  logic       waiting [2];
  pc_t        asked [2];

  initial for (int i = 0; i < 4096; i++) u_rom.mem[i] = 8'(i * 37 + (i >> 8) + 3);

  for (genvar r = 0; r < 2; r++) begin : g_req
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        req_valid[r] <= 1'b0; waiting[r] <= 1'b0; done[r] <= 0; req_addr[r] <= '0;
      end else begin
        if (req_valid[r] && req_ready[r]) begin
          req_valid[r] <= 1'b0; waiting[r] <= 1'b1; asked[r] <= req_addr[r];
        end else if (!req_valid[r] && !waiting[r] && ($urandom % 3 == 0) && done[r] < 300) begin
          req_valid[r] <= 1'b1; req_addr[r] <= pc_t'($urandom);
        end
        if (resp_valid[r]) begin
          checks++;
          if (!waiting[r] || resp_data != u_rom.mem[asked[r][11:0]]) begin
            failures++; $display("FAIL requester %0d addr %h got %h", r, asked[r], resp_data);
          end
          waiting[r] <= 1'b0; done[r] <= done[r] + 1;
        end
      end
    end
  end

  always_ff @(posedge clk) if (rst_n && conflict) begin
    n_conf++;
    checks++;
    if (!(req_ready[0] || !rom_req_ready) || req_ready[1]) begin
      failures++; $display("FAIL priority");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] >= 300 && done[1] >= 300);
    checks++;
    if (n_conf == 0) begin failures++; $display("FAIL no conflict seen"); end
    $display("conflicts %0d", n_conf);
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

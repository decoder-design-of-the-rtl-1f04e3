// add_bench: one copy of the front end running a straight-line program of
// NADD additions (ADD A,#data, opcode 24h, two bytes each) from 0000h. The
// ROM answers every byte LAT cycles after the request; OF is always ready.
// Reports the cycles from reset to the last decoded addition and counts
// decoded instructions that differ from the program.
`timescale 1ns/1ps
module add_bench #(
  parameter int unsigned NBUF  = 2,
  parameter int unsigned BYTES = 32,
  parameter int unsigned NADD  = 256,
  parameter int unsigned LAT   = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   cycles,
  output int   errors,
  output int   rom_reads
);
  import a8051_pkg::*;

  logic rom_req_valid, rom_req_ready, rom_resp_valid;
  pc_t  rom_addr;
  logic [7:0] rom_resp_data;
  logic of_valid, jmp_ready;
  of_req_t of_req;
  logic ev_hit, ev_miss, ev_prefetch, ev_conflict, ev_filling, ev_regular, ev_redirect, ev_jmp_wait;
  int   n;

  pa8051_decoder #(.NBUF(NBUF), .BYTES(BYTES)) dut (
    .clk, .rst_n, .rom_req_valid, .rom_req_ready, .rom_addr, .rom_resp_valid, .rom_resp_data,
    .of_valid, .of_ready(1'b1), .of_req,
    .jmp_valid(1'b0), .jmp_ready, .jmp_taken(1'b0), .jmp_addr('0),
    .ev_hit, .ev_miss, .ev_prefetch, .ev_conflict, .ev_filling, .ev_regular, .ev_redirect, .ev_jmp_wait);

  rom_model #(.ROM_AW(12), .LAT(LAT)) u_rom (
    .clk, .rst_n, .req_valid(rom_req_valid), .req_ready(rom_req_ready), .addr(rom_addr),
    .resp_valid(rom_resp_valid), .resp_data(rom_resp_data));

  initial for (int i = 0; i < 4096; i++)
    u_rom.mem[i] = (i < 2 * NADD) ? ((i % 2 == 0) ? 8'h24 : 8'(i / 2 + 1)) : 8'h00;

  assign rom_reads = u_rom.accesses;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n <= 0; cycles <= 0; errors <= 0; done <= 1'b0;
    end else if (!done) begin
      cycles <= cycles + 1;
      if (of_valid) begin
        if (of_req.opbyte != 8'h24 || of_req.imm != {8'h00, 8'(n + 1)} || of_req.pc != pc_t'(2 * n))
          errors <= errors + 1;
        n <= n + 1;
        if (n == NADD - 1) done <= 1'b1;
      end
    end
  end
endmodule

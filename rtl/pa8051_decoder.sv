// pa8051_decoder: fetch and decode front end of a pipelined 8051.
//
// The pipeline is IF - ID - OF - EXE - WB. This module holds the first two
// stages: the IF stage with its prefetch buffers and the two-part ID stage.
// It reads program bytes from an external ROM, decodes one instruction at a
// time into a control word for the operand-fetch stage and follows the
// program's control flow, resolving unconditional jumps itself and taking
// the outcome of conditional and register-indirect branches back from the
// later stages on the jmp channel.
//
// Interface
//   rom_*  program ROM: request (valid/ready, 16-bit address), response
//          (one-cycle valid, 8-bit data); any latency; one access at a time.
//   of_*   decoded instruction to OF (valid/ready, of_req_t).
//   jmp_*  branch outcome (valid/ready): jmp_taken for conditional branches,
//          jmp_addr for JMP @A+DPTR, RET and RETI. It is awaited after each
//          such instruction has been handed to OF and before the next
//          instruction is fetched.
//   ev_*   one-cycle event strobes for performance counting.
// All flops reset synchronously on rst_n low; execution starts at 0000h.
// The default configuration is two 32-byte buffers.
module pa8051_decoder
  import a8051_pkg::*;
#(
  parameter int unsigned NBUF  = 2,
  parameter int unsigned BYTES = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       rom_req_valid,
  input  logic       rom_req_ready,
  output pc_t        rom_addr,
  input  logic       rom_resp_valid,
  input  logic [7:0] rom_resp_data,
  output logic       of_valid,
  input  logic       of_ready,
  output of_req_t    of_req,
  input  logic       jmp_valid,
  output logic       jmp_ready,
  input  logic       jmp_taken,
  input  pc_t        jmp_addr,
  output logic       ev_hit,
  output logic       ev_miss,
  output logic       ev_prefetch,
  output logic       ev_conflict,
  output logic       ev_filling,
  output logic       ev_regular,
  output logic       ev_redirect,
  output logic       ev_jmp_wait
);
  logic       pc_valid, pc_ready, byte_valid, byte_ready;
  pc_t        pc;
  logic [7:0] byte_data;

  if_stage #(.NBUF(NBUF), .BYTES(BYTES)) u_if (
    .clk, .rst_n,
    .pc_valid, .pc_ready, .pc,
    .byte_valid, .byte_ready, .byte_data,
    .rom_req_valid, .rom_req_ready, .rom_addr,
    .rom_resp_valid, .rom_resp_data,
    .ev_hit, .ev_miss, .ev_prefetch, .ev_conflict, .ev_filling
  );

  id_stage u_id (
    .clk, .rst_n,
    .f_addr_valid (pc_valid),
    .f_addr_ready (pc_ready),
    .f_addr       (pc),
    .f_data_valid (byte_valid),
    .f_data_ready (byte_ready),
    .f_data       (byte_data),
    .of_valid, .of_ready, .of_req,
    .jmp_valid, .jmp_ready, .jmp_taken, .jmp_addr,
    .ev_regular, .ev_redirect, .ev_jmp_wait
  );

endmodule

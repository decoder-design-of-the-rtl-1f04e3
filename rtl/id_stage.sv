// id_stage: instruction decode stage, ID1 followed by ID2.
//
// ID1 fetches and decodes the opcode byte, ID2 fetches the remained bytes,
// forms the operands and resolves branches (see id1_stage and id2_stage).
// Both use one fetch port towards the IF stage. Because ID1 waits for ID2's
// acknowledge before fetching again, the two never want the port at the same
// time: the port belongs to ID2 while ID2 holds an instruction and to ID1
// otherwise.
module id_stage
  import a8051_pkg::*;
#(
  parameter pc_t RESET_PC = '0
) (
  input  logic       clk,
  input  logic       rst_n,
  // fetch port (ID_2_IF_addr / IF_2_ID_data)
  output logic       f_addr_valid,
  input  logic       f_addr_ready,
  output pc_t        f_addr,
  input  logic       f_data_valid,
  output logic       f_data_ready,
  input  logic [7:0] f_data,
  // to OF
  output logic       of_valid,
  input  logic       of_ready,
  output of_req_t    of_req,
  // branch outcome
  input  logic       jmp_valid,
  output logic       jmp_ready,
  input  logic       jmp_taken,
  input  pc_t        jmp_addr,
  // observability
  output logic       ev_regular,
  output logic       ev_redirect,
  output logic       ev_jmp_wait
);
  logic     ctrl_valid, ctrl_ready;
  id_ctrl_t ctrl;
  pc_t      ctrl_next_pc;
  logic     id2_busy;

  logic     f1_addr_valid, f1_data_ready, f2_addr_valid, f2_data_ready;
  pc_t      f1_addr, f2_addr;

  id1_stage #(.RESET_PC(RESET_PC)) u_id1 (
    .clk, .rst_n,
    .f_addr_valid (f1_addr_valid),
    .f_addr_ready (f_addr_ready && !id2_busy),
    .f_addr       (f1_addr),
    .f_data_valid (f_data_valid && !id2_busy),
    .f_data_ready (f1_data_ready),
    .f_data,
    .ctrl_valid, .ctrl_ready, .ctrl, .ctrl_next_pc,
    .ev_regular
  );

  id2_stage u_id2 (
    .clk, .rst_n,
    .ctrl_valid, .ctrl_ready, .ctrl, .ctrl_next_pc,
    .f_addr_valid (f2_addr_valid),
    .f_addr_ready (f_addr_ready && id2_busy),
    .f_addr       (f2_addr),
    .f_data_valid (f_data_valid && id2_busy),
    .f_data_ready (f2_data_ready),
    .f_data,
    .of_valid, .of_ready, .of_req,
    .jmp_valid, .jmp_ready, .jmp_taken, .jmp_addr,
    .ev_redirect, .ev_jmp_wait,
    .busy         (id2_busy)
  );

  assign f_addr_valid = id2_busy ? f2_addr_valid : f1_addr_valid;
  assign f_addr       = id2_busy ? f2_addr       : f1_addr;
  assign f_data_ready = id2_busy ? f2_data_ready : f1_data_ready;

  a_one_user : assert property (@(posedge clk) disable iff (!rst_n)
    !(f1_addr_valid && f2_addr_valid));

endmodule

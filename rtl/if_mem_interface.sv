// if_mem_interface: arbiter between the IF-stage prefetch buffers and the
// single program-ROM port.
//
// Each buffer presents one byte address at a time on its request channel
// (valid/ready). When the ROM port is free the arbiter grants one requester,
// remembers which one it was (the "direct" variable of the original
// description), forwards the address to the ROM and, when the ROM answers,
// hands the byte back to that requester only. If several requesters are
// waiting in the same cycle the lowest index (buffer 1 in the document's
// numbering) wins, following the "Buf1?" decision of the flow chart. The
// fixed priority and the single outstanding ROM access are this design's
// choices.
//
// Timing: a grant happens in the cycle the ROM accepts the address
// (req_ready[i] = rom_req_ready for the winner). The byte is passed on in the
// cycle rom_resp_valid is high (resp_valid[i] is a one-cycle pulse; requesters
// must take it). A new address is accepted in the cycle after the response.
// The byte itself is wired straight from the ROM to all requesters; only the
// per-requester resp_valid strobe says whose it is.
module if_mem_interface
  import a8051_pkg::*;
#(
  parameter int unsigned NREQ = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  // requesters (bufN_2_interface_addr / interface_2_bufN_data)
  input  logic [NREQ-1:0]  req_valid,
  output logic [NREQ-1:0]  req_ready,
  input  pc_t              req_addr [NREQ],
  output logic [NREQ-1:0]  resp_valid,
  output logic [7:0]       resp_data,
  // program ROM (IF_2_mem_addr / mem_2_IF_data)
  output logic             rom_req_valid,
  input  logic             rom_req_ready,
  output pc_t              rom_addr,
  input  logic             rom_resp_valid,
  input  logic [7:0]       rom_resp_data,
  // more than one requester waited while the port was free (observability)
  output logic             conflict
);
  localparam int unsigned IW = (NREQ > 1) ? $clog2(NREQ) : 1;

  logic          busy;
  logic [IW-1:0] owner, pick;

  always_comb begin
    pick = '0;
    for (int i = NREQ - 1; i >= 0; i--)
      if (req_valid[i]) pick = IW'(i);
  end

  assign rom_req_valid = !busy && (|req_valid);
  assign rom_addr      = req_addr[pick];
  assign conflict      = !busy && ($countones(req_valid) > 1);

  always_comb begin
    req_ready = '0;
    if (!busy) req_ready[pick] = rom_req_ready;
  end

  always_comb begin
    resp_valid = '0;
    if (busy && rom_resp_valid) resp_valid[owner] = 1'b1;
  end
  assign resp_data = rom_resp_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      owner <= '0;
    end else if (!busy) begin
      if (rom_req_valid && rom_req_ready) begin
        busy  <= 1'b1;
        owner <= pick;
      end
    end else if (rom_resp_valid) begin
      busy <= 1'b0;
    end
  end

  // A requester keeps its address steady until it is granted.
  for (genvar i = 0; i < NREQ; i++) begin : g_chk
    a_hold : assert property (@(posedge clk) disable iff (!rst_n)
      req_valid[i] && !req_ready[i] |=> req_valid[i] && $stable(req_addr[i]));
  end

endmodule

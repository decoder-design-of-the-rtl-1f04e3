// if_stage: instruction fetch stage of the pipelined 8051.
//
// NBUF prefetch buffers of BYTES bytes each sit between a mem interface,
// which owns the single program-ROM port, and the fetcher controller, which
// answers the decode stage's byte requests. The defaults, two buffers of 32
// bytes, are the configuration the document evaluates as its main one.
// NBUF = 0 builds the unbuffered variant the document compares against:
// each byte request goes straight to the ROM.
//
// Interface: the decode stage sends an address on pc_* (valid/ready) and
// receives the byte on byte_* (valid/ready). The ROM port is a request
// channel (rom_req_*, valid/ready) and a response pulse (rom_resp_*), one
// access outstanding at a time; the ROM may take any number of cycles.
module if_stage
  import a8051_pkg::*;
#(
  parameter int unsigned NBUF  = 2,
  parameter int unsigned BYTES = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pc_valid,
  output logic       pc_ready,
  input  pc_t        pc,
  output logic       byte_valid,
  input  logic       byte_ready,
  output logic [7:0] byte_data,
  output logic       rom_req_valid,
  input  logic       rom_req_ready,
  output pc_t        rom_addr,
  input  logic       rom_resp_valid,
  input  logic [7:0] rom_resp_data,
  output logic       ev_hit,
  output logic       ev_miss,
  output logic       ev_prefetch,
  output logic       ev_conflict,
  output logic       ev_filling
);
  if (NBUF > 0) begin : g_buffered
    logic [NBUF-1:0] act_valid, act_ready, rdata_valid;
    logic            act_rnw;
    pc_t             act_addr;
    logic [7:0]      rdata [NBUF];
    logic [NBUF-1:0] mreq_valid, mreq_ready, mresp_valid;
    pc_t             mreq_addr [NBUF];
    logic [7:0]      mresp_data;
    logic [NBUF-1:0] filling;

    assign ev_filling = |filling;

    if_fetcher_ctrl #(.NBUF(NBUF), .BYTES(BYTES)) u_fetcher (
      .clk, .rst_n,
      .pc_valid, .pc_ready, .pc,
      .byte_valid, .byte_ready, .byte_data,
      .act_valid, .act_ready, .act_rnw, .act_addr, .rdata_valid, .rdata,
      .ev_hit, .ev_miss, .ev_prefetch
    );

    for (genvar k = 0; k < NBUF; k++) begin : g_buf
      if_buffer #(.BYTES(BYTES)) u_buf (
        .clk, .rst_n,
        .act_valid   (act_valid[k]),
        .act_ready   (act_ready[k]),
        .act_rnw     (act_rnw),
        .act_addr    (act_addr),
        .rdata_valid (rdata_valid[k]),
        .rdata       (rdata[k]),
        .mreq_valid  (mreq_valid[k]),
        .mreq_ready  (mreq_ready[k]),
        .mreq_addr   (mreq_addr[k]),
        .mresp_valid (mresp_valid[k]),
        .mresp_data  (mresp_data),
        .filling     (filling[k])
      );
    end

    if_mem_interface #(.NREQ(NBUF)) u_memif (
      .clk, .rst_n,
      .req_valid  (mreq_valid),
      .req_ready  (mreq_ready),
      .req_addr   (mreq_addr),
      .resp_valid (mresp_valid),
      .resp_data  (mresp_data),
      .rom_req_valid, .rom_req_ready, .rom_addr,
      .rom_resp_valid, .rom_resp_data,
      .conflict   (ev_conflict)
    );

  end else begin : g_direct
    // No buffers: every byte is a ROM access of its own.
    typedef enum logic [1:0] {D_IDLE, D_REQ, D_WAIT, D_OUT} dstate_e;
    dstate_e dstate;
    pc_t     daddr;

    assign pc_ready      = (dstate == D_IDLE);
    assign rom_req_valid = (dstate == D_REQ);
    assign rom_addr      = daddr;
    assign byte_valid    = (dstate == D_OUT);
    assign ev_hit        = 1'b0;
    assign ev_miss       = (dstate == D_IDLE) && pc_valid;
    assign ev_prefetch   = 1'b0;
    assign ev_conflict   = 1'b0;
    assign ev_filling    = 1'b0;

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        dstate    <= D_IDLE;
        daddr     <= '0;
        byte_data <= '0;
      end else begin
        unique case (dstate)
          D_IDLE: if (pc_valid) begin daddr <= pc; dstate <= D_REQ; end
          D_REQ:  if (rom_req_ready) dstate <= D_WAIT;
          D_WAIT: if (rom_resp_valid) begin byte_data <= rom_resp_data; dstate <= D_OUT; end
          D_OUT:  if (byte_ready) dstate <= D_IDLE;
          default: dstate <= D_IDLE;
        endcase
      end
    end
  end

endmodule

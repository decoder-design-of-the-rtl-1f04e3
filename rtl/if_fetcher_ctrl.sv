// if_fetcher_ctrl: controller of the IF stage.
//
// For every program-counter value the decode stage sends (ID_2_IF_addr) the
// controller returns the byte at that address (IF_2_ID_data). It keeps the
// window base of every buffer and looks the address up in buffer 1 first,
// then buffer 2, and so on (the order of its flow chart).
//   * Hit: it sends a read action to the first buffer that holds the byte and
//     passes the byte on. If that byte is the last one of the buffer's
//     window, it then sends the buffer a write (prefetch) action.
//   * Miss: it flushes all buffers by sending each a write action, buffer k
//     refilling from pc + k*BYTES, so that together they hold NBUF*BYTES
//     consecutive bytes from the missing address; then it reads buffer 1.
// The prefetch after a last-byte read refills that buffer with the window
// that follows the others, base + NBUF*BYTES, so that sequential code keeps
// running out of one buffer while the other is being filled. The document
// states that a miss refills all buffers and that the last byte triggers a
// prefetch; the start addresses of these fills are this design's reading.
//
// Timing: one address is handled at a time. pc_ready is high only in the idle
// state. A hit costs four cycles from acceptance to byte_valid when the buffer
// is idle; a read waits inside the buffer while that buffer is filling.
module if_fetcher_ctrl
  import a8051_pkg::*;
#(
  parameter int unsigned NBUF  = 2,
  parameter int unsigned BYTES = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  // ID side
  input  logic             pc_valid,
  output logic             pc_ready,
  input  pc_t              pc,
  output logic             byte_valid,
  input  logic             byte_ready,
  output logic [7:0]       byte_data,
  // buffer side (ctrl_2_bufN_addr, ctrl_2_bufN_RnW / bufN_2_ctrl_data)
  output logic [NBUF-1:0]  act_valid,
  input  logic [NBUF-1:0]  act_ready,
  output logic             act_rnw,
  output pc_t              act_addr,
  input  logic [NBUF-1:0]  rdata_valid,
  input  logic [7:0]       rdata [NBUF],
  // observability: lookup outcome, one-cycle pulses
  output logic             ev_hit,
  output logic             ev_miss,
  output logic             ev_prefetch
);
  localparam int unsigned BW = (NBUF > 1) ? $clog2(NBUF) : 1;

  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_FILL, S_RD, S_RWAIT, S_OUT, S_PF} state_e;
  state_e          state;
  pc_t             cur;                 // address being served
  pc_t             tag_base [NBUF];
  logic [NBUF-1:0] tag_valid;
  logic [BW-1:0]   sel;                 // buffer being addressed
  logic [NBUF-1:0] hit;
  logic [BW-1:0]   hit_idx;
  pc_t             offs;
  pc_t             fill_addr;

  always_comb begin
    for (int k = 0; k < NBUF; k++)
      hit[k] = tag_valid[k] && ((cur - tag_base[k]) < pc_t'(BYTES));
    hit_idx = '0;
    for (int k = NBUF - 1; k >= 0; k--)
      if (hit[k]) hit_idx = BW'(k);
  end

  assign offs      = cur - tag_base[sel];
  assign fill_addr = (state == S_PF) ? tag_base[sel] + pc_t'(NBUF * BYTES)
                                     : cur + pc_t'(32'(sel) * BYTES);

  assign pc_ready   = (state == S_IDLE);
  assign byte_valid = (state == S_OUT);
  assign act_rnw    = (state == S_RD);
  assign act_addr   = (state == S_RD) ? cur : fill_addr;

  always_comb begin
    act_valid = '0;
    if (state == S_RD || state == S_FILL || state == S_PF) act_valid[sel] = 1'b1;
  end

  assign ev_hit      = (state == S_LOOK) && (|hit);
  assign ev_miss     = (state == S_LOOK) && !(|hit);
  assign ev_prefetch = (state == S_PF) && act_ready[sel];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur       <= '0;
      sel       <= '0;
      tag_valid <= '0;
      byte_data <= '0;
      for (int k = 0; k < NBUF; k++) tag_base[k] <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (pc_valid) begin
            cur   <= pc;
            state <= S_LOOK;
          end
        S_LOOK:
          if (|hit) begin
            sel   <= hit_idx;
            state <= S_RD;
          end else begin
            sel   <= '0;
            state <= S_FILL;
          end
        S_FILL:
          if (act_ready[sel]) begin
            tag_base[sel]  <= fill_addr;
            tag_valid[sel] <= 1'b1;
            if (32'(sel) == NBUF - 1) begin
              sel   <= '0;
              state <= S_RD;
            end else begin
              sel <= sel + 1'b1;
            end
          end
        S_RD:
          if (act_ready[sel]) state <= S_RWAIT;
        S_RWAIT:
          if (rdata_valid[sel]) begin
            byte_data <= rdata[sel];
            state     <= S_OUT;
          end
        S_OUT:
          if (byte_ready)
            state <= (offs == pc_t'(BYTES - 1)) ? S_PF : S_IDLE;
        S_PF:
          if (act_ready[sel]) begin
            tag_base[sel] <= fill_addr;
            state         <= S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_pc_hold : assert property (@(posedge clk) disable iff (!rst_n)
    pc_valid && !pc_ready |=> pc_valid && $stable(pc));

endmodule

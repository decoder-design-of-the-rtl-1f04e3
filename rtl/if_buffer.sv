// if_buffer: one instruction prefetch buffer of the IF stage.
//
// The buffer takes an action and an address from the fetcher controller.
// A read action (rnw = 1) returns the byte at that address, which must lie in
// the window the buffer holds. A write action makes the buffer fetch BYTES
// consecutive bytes starting at the given address from program ROM through
// the mem interface, one byte request at a time; the window need not be
// aligned. The buffer serves one action at a time, as in its flow chart, so
// a read that arrives during a fill is taken only when the fill is complete.
//
// Timing: an action is accepted when act_ready is high (the buffer is idle).
// A read answers with a one-cycle rdata_valid pulse in the next cycle. A fill
// takes BYTES ROM transactions; act_ready returns after the last byte is
// stored. Storage is a plain register array written by the fill engine.
module if_buffer
  import a8051_pkg::*;
#(
  parameter int unsigned BYTES = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  // fetcher ctrl side (ctrl_2_bufN_addr, ctrl_2_bufN_RnW / bufN_2_ctrl_data)
  input  logic       act_valid,
  output logic       act_ready,
  input  logic       act_rnw,
  input  pc_t        act_addr,
  output logic       rdata_valid,
  output logic [7:0] rdata,
  // mem interface side (bufN_2_interface_addr / interface_2_bufN_data)
  output logic       mreq_valid,
  input  logic       mreq_ready,
  output pc_t        mreq_addr,
  input  logic       mresp_valid,
  input  logic [7:0] mresp_data,
  // a fill is in progress (observability)
  output logic       filling
);
  localparam int unsigned OW = $clog2(BYTES);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT} state_e;
  state_e        state;
  pc_t           base;
  logic [OW-1:0] cnt;
  logic [7:0]    mem [BYTES];
  pc_t           rel_addr;

  assign act_ready  = (state == S_IDLE);
  assign mreq_valid = (state == S_REQ);
  assign mreq_addr  = base + pc_t'(cnt);
  assign filling    = (state != S_IDLE);
  assign rel_addr   = act_addr - base;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      base        <= '0;
      cnt         <= '0;
      rdata_valid <= 1'b0;
      rdata       <= '0;
    end else begin
      rdata_valid <= 1'b0;
      unique case (state)
        S_IDLE:
          if (act_valid) begin
            if (act_rnw) begin
              rdata       <= mem[rel_addr[OW-1:0]];
              rdata_valid <= 1'b1;
            end else begin
              base  <= act_addr;
              cnt   <= '0;
              state <= S_REQ;
            end
          end
        S_REQ:
          if (mreq_ready) state <= S_WAIT;
        S_WAIT:
          if (mresp_valid) begin
            cnt   <= cnt + 1'b1;
            state <= (cnt == OW'(BYTES - 1)) ? S_IDLE : S_REQ;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk)
    if (state == S_WAIT && mresp_valid) mem[cnt] <= mresp_data;

  a_read_in_window : assert property (@(posedge clk) disable iff (!rst_n)
    act_valid && act_ready && act_rnw |-> rel_addr < pc_t'(BYTES));

endmodule

// rom_model: behavioural model of the external program ROM for simulation.
// 2**ROM_AW bytes; higher address bits are ignored. An address is accepted
// whenever the model is idle; the byte comes back LAT cycles later (plus up
// to JITTER random extra cycles) as a one-cycle rdata pulse. The contents are
// written by the testbench through the mem array.
module rom_model #(
  parameter int unsigned ROM_AW = 12,
  parameter int unsigned LAT    = 2,
  parameter int unsigned JITTER = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [15:0] addr,
  output logic        resp_valid,
  output logic [7:0]  resp_data
);
  logic [7:0]        mem [2**ROM_AW];
  logic              busy;
  int unsigned       cnt;
  logic [ROM_AW-1:0] a_q;
  int unsigned       accesses;

  assign req_ready = !busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      resp_valid <= 1'b0;
      resp_data  <= '0;
      cnt        <= 0;
      accesses   <= 0;
    end else begin
      resp_valid <= 1'b0;
      if (!busy) begin
        if (req_valid) begin
          busy     <= 1'b1;
          a_q      <= addr[ROM_AW-1:0];
          cnt      <= LAT + ((JITTER > 0) ? ($urandom % (JITTER + 1)) : 0);
          accesses <= accesses + 1;
        end
      end else if (cnt <= 1) begin
        busy       <= 1'b0;
        resp_valid <= 1'b1;
        resp_data  <= mem[a_q];
      end else begin
        cnt <= cnt - 1;
      end
    end
  end
endmodule

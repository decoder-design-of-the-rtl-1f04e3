// tb_workload_additions: the 256-addition benchmark on several front-end
// configurations side by side: no buffer, one, two and three 32-byte
// buffers, and two buffers of 8, 16, 32 and 64 bytes. Every configuration must decode the
// program correctly. Prints the cycle count of each and checks the effect of
// buffering: two buffers must beat both one buffer and none, because one
// buffer fills while the other is read. (With a ROM whose every byte costs
// the same, a single buffer only adds its refill stall, so it is not
// required to beat direct access.)
`timescale 1ns/1ps
module tb_workload_additions;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 7;
  localparam int CFG_NBUF [NCFG]  = '{1, 2, 3, 2, 2, 2, 0};
  localparam int CFG_BYTES [NCFG] = '{32, 32, 32, 8, 16, 64, 32};

  logic done [NCFG];
  int   cycles [NCFG], errors [NCFG], reads [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    add_bench #(.NBUF(CFG_NBUF[c]), .BYTES(CFG_BYTES[c])) u_b (
      .clk, .rst_n, .done(done[c]), .cycles(cycles[c]), .errors(errors[c]), .rom_reads(reads[c]));
  end

  int checks = 0, failures = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCFG; c++) wait (done[c]);
    @(posedge clk);
    for (int c = 0; c < NCFG; c++) begin
      $display("buffers %0d x %0d bytes: %0d cycles, %0d ROM reads, normalised %0.2f",
               CFG_NBUF[c], CFG_BYTES[c], cycles[c], reads[c], real'(cycles[c]) / real'(cycles[1]));
      checks++;
      if (errors[c] != 0) begin failures++; $display("FAIL decode errors in configuration %0d", c); end
    end
    checks++;
    if (!(cycles[1] < cycles[0])) begin failures++; $display("FAIL two buffers not faster than one"); end
    checks++;
    if (!(cycles[1] < cycles[6])) begin failures++; $display("FAIL two buffers not faster than none"); end
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

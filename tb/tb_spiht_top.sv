// tb_spiht_top: end-to-end test of the compression engine on a 64x64 image
// with three wavelet levels and shallow coder FIFOs (so that stalls occur).
// Loads a random image, runs all three phases and checks the transform,
// the LL mean, every coded stream and the clock counts against a reference
// model (see spiht_tb_body.svh).
`define TOP_PARAMS #(.LOG2N(6), .LEVELS(3), .DEPTH(4))
module tb_spiht_top;
  localparam int LOG2N    = 6;
  localparam int LEVELS   = 3;
  localparam int IMG_KIND = 1;
  localparam int WATCHDOG = 400000;
`include "spiht_tb_body.svh"
  // watchdog
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_spiht_top_1024: end-to-end test at the largest image size the engine is
// meant for, 1024x1024 with seven wavelet levels, so that every level format
// from 0 to 6 (17 integer bits, LSB weight 2) is used. Coder FIFOs at their
// default depth. Textured image; everything the engine returns is checked
// against the reference model in spiht_tb_body.svh.
`define TOP_PARAMS #(.LOG2N(10), .LEVELS(7))
module tb_spiht_top_1024;
  localparam int LOG2N    = 10;
  localparam int LEVELS   = 7;
  localparam int IMG_KIND = 0;
  localparam int WATCHDOG = 8000000;
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

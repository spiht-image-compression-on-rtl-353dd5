// tb_spiht_top_16: end-to-end test at the smallest image size the engine is
// meant for, 16x16 with a single wavelet level (an 8x8 top LL band). Coder
// FIFOs are four words deep so that stalls occur. Random image; everything
// the engine returns is checked against the reference model in
// spiht_tb_body.svh.
`define TOP_PARAMS #(.LOG2N(4), .LEVELS(1), .DEPTH(4))
module tb_spiht_top_16;
  localparam int LOG2N    = 4;
  localparam int LEVELS   = 1;
  localparam int IMG_KIND = 1;
  localparam int WATCHDOG = 100000;
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

// tb_spiht_top_full: one complete 512x512 compression with the engine at its
// default configuration (six wavelet levels, 8-word coder FIFOs). A
// synthetic textured 8-bit image is loaded, coded, and everything the engine
// returns is checked against the reference model in spiht_tb_body.svh.
`define TOP_PARAMS
module tb_spiht_top_full;
  localparam int LOG2N    = 9;
  localparam int LEVELS   = 6;
  localparam int IMG_KIND = 0;
  localparam int WATCHDOG = 3000000;
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

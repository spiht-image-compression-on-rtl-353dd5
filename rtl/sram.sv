// sram: one board memory with a synchronous read port and a write port.
//
// Models one of the board's memory banks that carry data from one phase
// to the next: DEPTH words of W bits, write on the clock edge, read data
// valid one clock after rd_en. Contents are not reset. The width and
// depth are set by the instantiating design.
module sram #(
  parameter int W  = 32,
  parameter int AW = 10
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data
);
  logic [W-1:0] mem [1 << AW];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule

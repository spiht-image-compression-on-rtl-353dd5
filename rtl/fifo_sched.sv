// fifo_sched: dynamic FIFO scheduler.
//
// Looks at the word counts of NUM variable FIFOs and picks the one holding
// the most words (lowest index on a tie); valid is low when all are empty.
// The selected FIFO's head word is the one written to memory this clock.
// Selecting the fullest FIFO is the document's policy; the tie rule is this
// design's choice. Combinational.
module fifo_sched #(
  parameter int NUM = 44,
  parameter int CW  = 4
) (
  input  logic [NUM-1:0][CW-1:0]        counts,
  output logic                          valid,
  output logic [$clog2(NUM)-1:0]        sel
);
  logic [CW-1:0] best;
  always_comb begin
    best = '0;
    sel  = '0;
    for (int i = 0; i < NUM; i++)
      if (counts[i] > best) begin
        best = counts[i];
        sel  = ($clog2(NUM))'(i);
      end
    valid = (best != 0);
  end
endmodule

// var_fifo: variable-width FIFO that packs 0..16-bit chunks into 32-bit words.
//
// A push appends in_cnt bits (in_bits, first bit most significant, right
// aligned) behind the bits already held in a 32-bit partial word. When the
// partial word fills, it moves into a word FIFO of DEPTH entries and the
// remainder starts the next one. flush moves a non-empty partial word,
// zero padded, into the word FIFO. The head word is always visible on
// rd_word (first-word fall-through); pop removes it. count (words held) is
// what the scheduler compares and what stalls the coder; bits is the total
// number of bits pushed since clr. The document gives the function (0 to
// 37 bits in, 32-bit words out); the partial-word structure and the 16-bit
// chunk limit of this design's grouping are its own. The default DEPTH of
// 128 words fills one 4096-bit block RAM.
// Pushing while full is a caller error and is caught by an assertion.
// The assertions sample rst_n on the clock (disable iff) while the
// registers reset asynchronously; lint notes the two uses of rst_n.
module var_fifo
  import spiht_pkg::*;
#(
  parameter int DEPTH = 128
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clr,
  input  logic                        push,
  input  logic [CHUNK_W-1:0]          in_bits,
  input  logic [4:0]                  in_cnt,
  input  logic                        flush,
  input  logic                        pop,
  output logic [WORD_W-1:0]           rd_word,
  output logic [$clog2(DEPTH+1)-1:0]  count,
  output logic [31:0]                 bits
);
  localparam int PW = $clog2(DEPTH);
  logic [WORD_W-1:0]  mem [DEPTH];
  logic [PW-1:0]      wp, rp;
  logic [WORD_W-1:0]  part;
  logic [5:0]         fill;
  logic [47:0]        ext;
  logic [CHUNK_W-1:0] aligned;
  logic [6:0]         tot;
  logic               emit;
  logic [WORD_W-1:0]  emit_word;

  always_comb begin
    aligned = in_bits << (5'(CHUNK_W) - in_cnt);
    ext     = {part, 16'b0} | ({aligned, 32'b0} >> fill);
    tot     = 7'(fill) + 7'(in_cnt);
    emit      = 1'b0;
    emit_word = ext[47:16];
    if (push && tot >= 7'd32) emit = 1'b1;
    if (flush && fill != 0) begin emit = 1'b1; emit_word = part; end
  end

  assign rd_word = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0; part <= '0; fill <= '0; bits <= '0;
    end else if (clr) begin
      wp <= '0; rp <= '0; count <= '0; part <= '0; fill <= '0; bits <= '0;
    end else begin
      if (push) begin
        bits <= bits + 32'(in_cnt);
        if (tot >= 7'd32) begin
          part <= {ext[15:0], 16'b0};
          fill <= 6'(tot - 7'd32);
        end else begin
          part <= ext[47:16];
          fill <= 6'(tot);
        end
      end else if (flush) begin
        part <= '0;
        fill <= '0;
      end
      if (emit) wp <= wp + 1;
      if (pop) rp <= rp + 1;
      count <= count + (emit ? 1 : 0) - (pop ? 1 : 0);
    end
  end

  always_ff @(posedge clk)
    if (emit && !clr) mem[wp] <= emit_word;

  assert property (@(posedge clk) disable iff (!rst_n) !(emit && !pop && count == ($clog2(DEPTH+1))'(DEPTH)))
    else $error("var_fifo: overflow");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && count == 0))
    else $error("var_fifo: pop while empty");
endmodule

// tb_var_fifo: the variable FIFO. A random stream of 0..16-bit chunks is
// pushed (never when count >= DEPTH-2, as the coder guarantees) while words
// are popped at random; at the end the FIFO is flushed and drained. Every
// popped word is compared with the pushed bit stream cut into 32-bit words
// (the last one zero padded); the bit total and the word count are checked,
// and the FIFO must have reached its stall level at least once.
module tb_var_fifo;
  import spiht_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0, clr = 0, push = 0, flush = 0, pop = 0;
  always #5 clk = ~clk;
  logic [15:0] in_bits = '0;
  logic [4:0] in_cnt = '0;
  logic [31:0] rd_word, bits;
  logic [3:0] count;
  int checks = 0, failures = 0, nfull = 0, nwords = 0;
  bit stream [$];

  var_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .clr, .push, .in_bits, .in_cnt, .flush, .pop, .rd_word, .count, .bits);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic take_word();
    logic [31:0] e;
    e = '0;
    for (int b = 0; b < 32; b++) if (32 * nwords + b < stream.size()) e[31 - b] = stream[32 * nwords + b];
    checks++;
    if (rd_word != e) begin
      failures++;
      if (failures < 10) $display("FAIL word %0d: %h expected %h", nwords, rd_word, e);
    end
    nwords++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      push = 0; pop = 0;
      if (count >= 4'(DEPTH - 2)) nfull++;
      if (count < 4'(DEPTH - 2) && $urandom_range(0, 3) != 0) begin
        int k;
        k = $urandom_range(0, 16);
        push = 1; in_cnt = 5'(k); in_bits = 16'($urandom()) & 16'((1 << k) - 1);
        for (int b = k - 1; b >= 0; b--) stream.push_back(in_bits[b]);
      end
      if (count > 0 && $urandom_range(0, 2) == 0) begin
        pop = 1; #1; take_word();
      end
      @(negedge clk);
    end
    push = 0; pop = 0;
    flush = 1; @(negedge clk); flush = 0;
    while (count > 0) begin
      pop = 1; #1; take_word(); @(negedge clk);
    end
    pop = 0;
    checks++;
    if (nwords != (stream.size() + 31) / 32) begin failures++; $display("FAIL %0d words, expected %0d", nwords, (stream.size() + 31) / 32); end
    checks++;
    if (bits != 32'(stream.size())) begin failures++; $display("FAIL bit total %0d expected %0d", bits, stream.size()); end
    checks++;
    if (nfull == 0) begin failures++; $display("stall level never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

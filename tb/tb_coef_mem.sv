// tb_coef_mem: the four-lane coefficient memory. Writes a 16x16 array four
// horizontally adjacent coefficients per clock (the transposed DWT write),
// reads it back four vertically adjacent ones per clock (the DWT read) and
// two adjacent ones per clock (the magnitude read), and checks every value
// and the one-clock read latency.
module tb_coef_mem;
  import spiht_pkg::*;
  localparam int LOG2N = 4, N = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [3:0] re = '0, we = '0;
  logic [3:0][LOG2N-1:0] rr, rc, wr, wc;
  logic [3:0][15:0] rd, wd;
  int checks = 0, failures = 0;
  logic [15:0] ref_m [N][N];

  coef_mem #(.LOG2N(LOG2N)) dut (.clk, .rd_en(re), .rd_row(rr), .rd_col(rc), .rd_data(rd),
    .wr_en(we), .wr_row(wr), .wr_col(wc), .wr_data(wd));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rr = '0; rc = '0; wr = '0; wc = '0; wd = '0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) ref_m[r][c] = 16'($urandom());
    @(negedge clk);
    for (int r = 0; r < N; r++) for (int g = 0; g < N / 4; g++) begin
      for (int i = 0; i < 4; i++) begin
        we[i] = 1; wr[i] = LOG2N'(r); wc[i] = LOG2N'(4 * g + i); wd[i] = ref_m[r][4 * g + i];
      end
      @(negedge clk);
    end
    we = '0;
    for (int g = 0; g < N / 4; g++) for (int c = 0; c < N; c++) begin
      for (int i = 0; i < 4; i++) begin re[i] = 1; rr[i] = LOG2N'(4 * g + i); rc[i] = LOG2N'(c); end
      @(negedge clk);
      re = '0;
      // move the addresses on: read data must follow the address of the read
      for (int i = 0; i < 4; i++) begin rr[i] = LOG2N'($urandom()); rc[i] = LOG2N'($urandom()); end
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (rd[i] !== ref_m[4 * g + i][c]) begin
          failures++;
          if (failures < 10) $display("FAIL column read (%0d,%0d): %h vs %h", 4*g+i, c, rd[i], ref_m[4*g+i][c]);
        end
      end
    end
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c += 2) begin
      for (int i = 0; i < 2; i++) begin re[i] = 1; rr[i] = LOG2N'(r); rc[i] = LOG2N'(c + i); end
      @(negedge clk);
      re = '0;
      // move the addresses on: read data must follow the address of the read
      for (int i = 0; i < 4; i++) begin rr[i] = LOG2N'($urandom()); rc[i] = LOG2N'($urandom()); end
      #1;
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (rd[i] !== ref_m[r][c + i]) begin
          failures++;
          if (failures < 10) $display("FAIL pair read (%0d,%0d)", r, c + i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

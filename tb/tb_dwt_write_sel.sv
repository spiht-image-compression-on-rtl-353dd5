// tb_dwt_write_sel: the transposing write-address logic. For every output
// position of rows of several lengths and every row group, low-pass outputs
// must go to row n/2 and high-pass outputs to row M/2 + (n-1)/2, lane i to
// column 4g+i, with the lane data unchanged and the enables following valid.
module tb_dwt_write_sel;
  localparam int LOG2N = 6;
  logic v;
  logic [LOG2N:0] n, m;
  logic [LOG2N-3:0] g;
  logic [3:0][15:0] y, wd;
  logic [3:0] we;
  logic [3:0][LOG2N-1:0] wr, wc;
  int checks = 0, failures = 0;

  dwt_write_sel #(.LOG2N(LOG2N)) dut (.in_valid(v), .in_n(n), .in_m(m), .in_g(g), .in_y(y),
    .wr_en(we), .wr_row(wr), .wr_col(wc), .wr_data(wd));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int lm = 3; lm <= LOG2N; lm++)
      for (int gg = 0; gg < (1 << lm) / 4; gg++)
        for (int nn = 0; nn < (1 << lm); nn++) begin
          int er;
          v = ($urandom_range(0, 7) != 0); n = (LOG2N+1)'(nn); m = (LOG2N+1)'(1 << lm); g = (LOG2N-2)'(gg);
          for (int i = 0; i < 4; i++) y[i] = 16'($urandom());
          #1;
          er = (nn % 2 == 0) ? nn / 2 : (1 << lm) / 2 + (nn - 1) / 2;
          for (int i = 0; i < 4; i++) begin
            checks++;
            if (we[i] != v || int'(wr[i]) != er || int'(wc[i]) != 4 * gg + i || wd[i] != y[i]) begin
              failures++;
              if (failures < 10) $display("FAIL M %0d g %0d n %0d lane %0d: row %0d col %0d", 1 << lm, gg, nn, i, wr[i], wc[i]);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

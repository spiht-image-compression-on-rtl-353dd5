// tb_fifo_sched: the dynamic scheduler. Random FIFO fill levels (many ties,
// many all-empty cases) are compared with a reference pick of the fullest
// FIFO, lowest index on a tie, and valid low when everything is empty.
module tb_fifo_sched;
  localparam int NUM = 44, CW = 4;
  logic [NUM-1:0][CW-1:0] counts;
  logic valid;
  logic [5:0] sel;
  int checks = 0, failures = 0;

  fifo_sched #(.NUM(NUM), .CW(CW)) dut (.counts, .valid, .sel);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int best, bi, lim;
      best = 0; bi = 0; lim = $urandom_range(0, 8);
      for (int i = 0; i < NUM; i++) begin
        counts[i] = ($urandom_range(0, 3) == 0) ? CW'($urandom_range(0, lim)) : '0;
        if (int'(counts[i]) > best) begin best = counts[i]; bi = i; end
      end
      #1;
      checks++;
      if (valid != (best > 0) || (best > 0 && int'(sel) != bi)) begin
        failures++;
        if (failures < 10) $display("FAIL valid=%0d sel=%0d expected %0d %0d", valid, sel, best > 0, bi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

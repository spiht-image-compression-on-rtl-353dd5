// tb_sram: the simple memory. Random writes, then reads of every address
// with the data checked one clock after the read request; a write and a
// read of another address in the same clock must not disturb each other.
module tb_sram;
  localparam int W = 24, AW = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic re = 0, we = 0;
  logic [AW-1:0] ra = '0, wa = '0;
  logic [W-1:0] rd, wd = '0;
  logic [W-1:0] m [1 << AW];
  int checks = 0, failures = 0;

  sram #(.W(W), .AW(AW)) dut (.clk, .rd_en(re), .rd_addr(ra), .rd_data(rd), .wr_en(we), .wr_addr(wa), .wr_data(wd));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < (1 << AW); a++) begin
      m[a] = W'($urandom());
      we = 1; wa = AW'(a); wd = m[a];
      @(negedge clk);
    end
    we = 0;
    for (int a = 0; a < (1 << AW); a++) begin
      re = 1; ra = AW'(a);
      we = 1; wa = AW'(a + 1); m[AW'(a + 1)] = W'($urandom()); wd = m[AW'(a + 1)];
      @(negedge clk);
      re = 0; we = 0;
      checks++;
      if (rd !== m[a]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d: %h vs %h", a, rd, m[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for data_latch_fixed. f and the CLK_R falling-edge enables are
// driven as the receiver would (f for 44 cycles, a falling edge every 8
// cycles from cycle 8); the data input changes every cycle. The output must be
// loaded exactly once per frame, at the 5th falling edge, with the data then
// present, CLK_latch must be HIGH from then until f drops, and the output must
// hold between frames.
module tb_data_latch_fixed;
  logic clk = 0, rst_n = 0, f = 0, fall = 0;
  logic [3:0] d, q, exp;
  logic clk_latch, latch_en;
  int checks = 0, failures = 0, loads;

  data_latch_fixed #(.DATA_BITS(4), .CNT_W(4)) dut (.clk8(clk), .rst_n(rst_n), .f(f),
      .clkr_fall(fall), .d(d), .q(q), .clk_latch(clk_latch), .latch_en(latch_en));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp = '0;
    d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 50; fr++) begin
      @(negedge clk);
      f = 1;
      loads = 0;
      for (int c = 1; c <= 44; c++) begin
        d = 4'($urandom);
        fall = (c % 8) == 0;
        @(posedge clk);
        if (c == 40) exp = d;
        #1;
        if (latch_en === 1'b0 && c == 40) ;  // latch_en is sampled before the edge below
        checks++;
        if (q !== exp) begin failures++; $display("FAIL c=%0d q=%h expected %h", c, q, exp); end
        checks++;
        if (clk_latch !== (c >= 40 && c < 48)) begin failures++; $display("FAIL clk_latch=%b at c=%0d", clk_latch, c); end
        @(negedge clk);
      end
      f = 0;
      fall = 0;
      repeat (1 + $urandom % 20) begin
        d = 4'($urandom);
        @(posedge clk);
        #1;
        checks++;
        if (q !== exp || clk_latch) begin failures++; $display("FAIL idle q=%h clk_latch=%b", q, clk_latch); end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for data_latch_prog. For random n in 1..12 the register is
// written while f is LOW; f and the CLK_R falling-edge enables are driven as
// the generalized receiver would (f for 108 cycles, a falling edge every 8
// cycles from cycle 8). The output must be loaded at the (n+1)-th falling
// edge with the top n bits of the data input, right-aligned, and hold
// otherwise.
module tb_data_latch_prog;
  logic clk = 0, rst_n = 0, f = 0, fall = 0, we = 0;
  logic [3:0] n, nq;
  logic [11:0] d, q, exp;
  logic clk_latch, latch_en;
  int checks = 0, failures = 0;

  data_latch_prog #(.W(12), .CNT_W(4)) dut (.clk8(clk), .rst_n(rst_n), .f(f), .clkr_fall(fall),
      .cfg_we(we), .cfg_n(n), .d(d), .q(q), .n_plus_1(nq), .clk_latch(clk_latch), .latch_en(latch_en));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nn;
    exp = '0;
    d = '0;
    n = 4'd1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (nq !== 4'd13) begin failures++; $display("FAIL reset n+1=%0d", nq); end
    for (int fr = 0; fr < 60; fr++) begin
      nn = 1 + $urandom % 12;
      @(negedge clk);
      n = 4'(nn); we = 1;
      @(negedge clk);
      we = 0;
      @(negedge clk);   // the counter reloads while f is LOW
      checks++;
      if (nq !== 4'(nn + 1)) begin failures++; $display("FAIL n+1=%0d for n=%0d", nq, nn); end
      f = 1;
      for (int c = 1; c <= 108; c++) begin
        d = 12'($urandom);
        fall = (c % 8) == 0;
        @(posedge clk);
        if (c == 8 * (nn + 1)) exp = d >> (12 - nn);
        #1;
        checks++;
        if (q !== exp) begin failures++; $display("FAIL n=%0d c=%0d q=%h expected %h", nn, c, q, exp); end
        checks++;
        if (clk_latch !== (c >= 8 * (nn + 1) && c < 8 * (nn + 2))) begin
          failures++; $display("FAIL n=%0d clk_latch=%b at c=%0d", nn, clk_latch, c);
        end
        @(negedge clk);
      end
      f = 0;
      fall = 0;
      repeat (1 + $urandom % 10) begin
        d = 12'($urandom);
        @(posedge clk);
        #1;
        checks++;
        if (q !== exp) begin failures++; $display("FAIL idle q=%h", q); end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

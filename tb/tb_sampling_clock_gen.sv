// Testbench for sampling_clock_gen: f is held HIGH for random lengths with LOW
// gaps. While f is HIGH, after the k-th oscillator edge CLK_R must be HIGH for
// k mod 8 in 4..7 (first rise 4 cycles after f, then period 8), the rise and
// fall enables must flag the edges at k mod 8 == 3 and 7, and while f is LOW
// CLK_R must be LOW.
module tb_sampling_clock_gen;
  logic clk = 0, rst_n = 0, f = 0;
  logic clk_r, rise_en, fall_en;
  int checks = 0, failures = 0;
  int k, rises;

  sampling_clock_gen dut (.clk8(clk), .rst_n(rst_n), .f(f), .clk_r(clk_r),
                          .rise_en(rise_en), .fall_en(fall_en));

  always #5 clk = ~clk;

  task automatic chk(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s k=%0d got %b expected %b", what, k, got, exp); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    rises = 0;
    for (int fr = 0; fr < 60; fr++) begin
      int len;
      len = 3 + $urandom % 60;
      @(negedge clk);
      f = 1;
      k = 0;
      for (int c = 0; c < len; c++) begin
        #1;
        chk(rise_en, (k % 8) === 3, "rise_en");
        chk(fall_en, (k % 8) === 7, "fall_en");
        if (rise_en) rises++;
        @(posedge clk);
        k++;
        #1;
        chk(clk_r, (k % 8) >= 4, "clk_r");
        @(negedge clk);
      end
      f = 0;
      #1;
      chk(clk_r, 1'b0, "clk_r low with f low");
      repeat ($urandom % 5 + 1) begin
        @(posedge clk);
        #1;
        chk(clk_r, 1'b0, "clk_r idle");
        chk(rise_en | fall_en, 1'b0, "no enables idle");
      end
    end
    checks++;
    if (rises == 0) begin failures++; $display("FAIL no sampling edge seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

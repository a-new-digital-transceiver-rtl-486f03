// Testbench for sipo: random bits with random shift enables; the register must
// equal a reference built by inserting at the top, and hold when not enabled.
module tb_sipo;
  localparam int W = 4;
  logic clk = 0, rst_n = 0, en = 0, sr = 1;
  logic [W-1:0] q, model;
  int checks = 0, failures = 0;

  sipo #(.W(W)) dut (.clk8(clk), .rst_n(rst_n), .shift_en(en), .sr(sr), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      en = ($urandom % 2) == 1;
      sr = ($urandom % 2) == 1;
      @(posedge clk);
      if (en) model = {sr, model[W-1:1]};
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%b expected %b", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

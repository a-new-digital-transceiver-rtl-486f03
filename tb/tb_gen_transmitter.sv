// Testbench for gen_transmitter: for random n in 1..12, random data and a
// random send flag, each 16-bit frame on the line must be a LOW start bit,
// data[n-1:0] least significant bit first and HIGH stop bits, or all ones
// when send is LOW.
module tb_gen_transmitter;
  logic clk = 0, rst_n = 0, send = 0;
  logic [3:0] n = 4'd1;
  logic [11:0] data = '0;
  logic serial, load;
  int checks = 0, failures = 0;

  gen_transmitter dut (.tx_clk(clk), .rst_n(rst_n), .send(send), .n(n), .data(data),
                       .serial(serial), .load(load));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp, got;
    int nn;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 150; k++) begin
      while (!load) @(negedge clk);
      nn   = 1 + $urandom % 12;
      n    = 4'(nn);
      data = 12'($urandom);
      send = (k % 5) != 0;
      exp  = '1;
      if (send) begin
        exp[0] = 1'b0;
        for (int i = 0; i < nn; i++) exp[i + 1] = data[i];
      end
      for (int b = 0; b < 16; b++) begin
        @(posedge clk);
        #1;
        got[b] = serial;
      end
      checks++;
      if (got !== exp) begin failures++; $display("FAIL n=%0d frame %b expected %b", nn, got, exp); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

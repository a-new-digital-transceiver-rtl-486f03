// Testbench for piso: random frames are offered, the serial output is
// collected for FRAME_BITS cycles after each load, and the received bits must
// equal the frame sampled at the load. The line must be HIGH right after reset.
module tb_piso;
  localparam int FB = 8;
  logic clk = 0, rst_n = 0;
  logic [FB-1:0] frame;
  logic serial, load;
  int checks = 0, failures = 0;

  piso #(.FRAME_BITS(FB)) dut (.clk(clk), .rst_n(rst_n), .frame(frame), .serial(serial), .load(load));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [FB-1:0] sent, got;
    frame = '1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (serial !== 1'b1) begin failures++; $display("FAIL line not idle after reset"); end
    rst_n = 1;
    for (int k = 0; k < 100; k++) begin
      // wait for the cycle in which the frame is sampled
      while (!load) @(negedge clk);
      frame = FB'($urandom);
      sent  = frame;
      @(posedge clk);
      #1;
      frame = FB'($urandom);   // changes after the load must not matter
      for (int b = 0; b < FB; b++) begin
        got[b] = serial;
        if (b < FB - 1) begin
          checks++;
          if (load !== (b == FB - 1)) begin failures++; $display("FAIL load pulse at bit %0d", b); end
          @(posedge clk);
          #1;
        end
      end
      checks++;
      if (got !== sent) begin failures++; $display("FAIL frame %h got %h", sent, got); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

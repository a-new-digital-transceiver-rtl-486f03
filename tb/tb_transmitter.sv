// Testbench for transmitter: with no switch pressed the line stays HIGH; with
// one or more switches pressed every 8-bit frame is a LOW start bit, the
// highest pressed index least significant bit first, and three HIGH stop
// bits.
module tb_transmitter;
  logic clk = 0, rst_n = 0;
  logic [15:0] sw_n = '1;
  logic serial, start, load;
  logic [3:0] code;
  int checks = 0, failures = 0;

  transmitter dut (.tx_clk(clk), .rst_n(rst_n), .sw_n(sw_n), .serial(serial),
                   .code(code), .start(start), .load(load));

  always #5 clk = ~clk;

  function automatic logic [7:0] ref_frame(logic [15:0] s);
    logic [3:0] c = 4'hF;
    for (int i = 15; i >= 0; i--) if (!s[i]) begin c = 4'(i); break; end
    return {3'b111, c, &s};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp, got;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 120; k++) begin
      while (!load) @(negedge clk);
      case (k % 4)
        0: sw_n = '1;
        1, 2: sw_n = ~(16'h1 << ($urandom % 16));
        default: sw_n = 16'($urandom) | 16'h0001;
      endcase
      exp = ref_frame(sw_n);
      for (int b = 0; b < 8; b++) begin
        @(posedge clk);
        #1;
        got[b] = serial;
      end
      checks++;
      if (got !== exp) begin failures++; $display("FAIL sw_n=%h frame %b expected %b", sw_n, got, exp); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

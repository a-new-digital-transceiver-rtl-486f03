// Testbench for decoder_4to16: all 16 codes give exactly the matching output.
module tb_decoder_4to16;
  logic [3:0]  code;
  logic [15:0] onehot;
  int checks = 0, failures = 0;

  decoder_4to16 dut (.code(code), .onehot(onehot));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      code = 4'(i);
      #1;
      checks++;
      if (onehot !== (16'h1 << i)) begin
        failures++;
        $display("FAIL code=%0d onehot=%h", i, onehot);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for priority_encoder: every single pressed switch, no switch, and
// random sets of pressed switches, against a reference that scans from the
// highest index down.
module tb_priority_encoder;
  logic [15:0] sw_n;
  logic [3:0]  code;
  int checks = 0, failures = 0;

  priority_encoder dut (.sw_n(sw_n), .code(code));

  function automatic logic [3:0] ref_code(logic [15:0] s);
    for (int i = 15; i >= 0; i--) if (!s[i]) return 4'(i);
    return 4'hF;
  endfunction

  task automatic check(logic [15:0] s);
    sw_n = s;
    #1;
    checks++;
    if (code !== ref_code(s)) begin
      failures++;
      $display("FAIL sw_n=%h code=%h expected=%h", s, code, ref_code(s));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'hFFFF);
    for (int i = 0; i < 16; i++) check(~(16'h1 << i));
    for (int k = 0; k < 500; k++) check(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

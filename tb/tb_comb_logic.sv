// Testbench for comb_logic. The sampling clock is modelled in the testbench: a
// CLK_R rising edge is flagged every 8 oscillator cycles, the first 4 cycles
// after f rises. At every cycle f is compared with the printed truth table
// (indexed by In and the low three counter bits), the counter with a
// reference count of sampling edges, and for full frames f must stay HIGH for
// exactly 44 oscillator cycles (5.5 bits). LOW pulses shorter than half a bit
// must be rejected.
module tb_comb_logic;
  logic clk = 0, rst_n = 0, in = 1, rise;
  logic f;
  logic [3:0] q;
  int checks = 0, failures = 0;
  int k, qm, fhigh, frames, rejects;
  // f for index {In, Q2, Q1, Q0}
  localparam logic [15:0] TABLE = 16'h3E3F;

  comb_logic #(.CNT_W(4), .F_END(6)) dut (.clk8(clk), .rst_n(rst_n), .in(in),
                                          .clkr_rise(rise), .f(f), .q(q));

  always #5 clk = ~clk;

  // Sampling-clock model: counts cycles since f rose.
  always_ff @(posedge clk) begin
    if (!f) k <= 0;
    else    k <= k + 1;
  end
  assign rise = f && ((k % 8) == 3);

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (f !== TABLE[{in, q[2:0]}] || q[3] !== 1'b0) begin
      failures++; $display("FAIL table in=%b q=%b f=%b", in, q, f);
    end
    checks++;
    if (32'(q) !== qm) begin failures++; $display("FAIL q=%0d expected %0d", q, qm); end
  end

  // Reference count of sampling edges.
  always @(posedge clk) begin
    if (!rst_n || !f) qm <= 0;
    else if (rise)    qm <= qm + 1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frames = 0; rejects = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    for (int fr = 0; fr < 60; fr++) begin
      @(negedge clk);
      if (fr % 5 == 4) begin
        // glitch: LOW for 1..3 cycles only
        in = 0;
        repeat (1 + $urandom % 3) @(negedge clk);
        in = 1;
        #1;
        checks++;
        if (f) begin failures++; $display("FAIL glitch accepted"); end else rejects++;
        repeat (10) @(negedge clk);
      end else begin
        // start bit, then random data for 4 bits, then stop bits
        in = 0;
        fhigh = 0;
        for (int c = 0; c < 80; c++) begin
          if (c == 8)  in = 1'($urandom);
          if (c == 16) in = 1'($urandom);
          if (c == 24) in = 1'($urandom);
          if (c == 32) in = 1'($urandom);
          if (c == 40) in = 1;
          @(posedge clk);
          if (f) fhigh++;
          @(negedge clk);
        end
        checks++;
        if (fhigh != 44) begin failures++; $display("FAIL f high for %0d cycles, expected 44", fhigh); end
        else frames++;
      end
    end
    checks++;
    if (frames == 0 || rejects == 0) begin failures++; $display("FAIL frames=%0d rejects=%0d", frames, rejects); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// End-to-end testbench for transceiver_top at its default sizes.
//
// The transmitter clock runs 0.75% slower than one eighth of the receiver
// oscillator, with an arbitrary phase. Link A: switches are pressed (single,
// several at once, switch 15 whose code equals the idle code) and released;
// the received code and the one-hot outputs must match the highest pressed
// switch, and must hold while no switch is pressed. Link B: n is changed
// between bursts (1..12, programmed at both ends while the line is idle) and
// the received word must equal the n data bits sent. Every frame must keep f
// HIGH for 5.5 bits (link A) or 13.5 bits (link B), with 5 or 13 sampling
// clock cycles. Each mechanism is counted and must have occurred.
module tb_transceiver_top;
  import async_link_pkg::*;

  localparam int PER   = 100;   // receiver oscillator period
  localparam int TXPER = 806;   // transmitter bit period, nominal 800

  logic tx_clk = 0, rx_clk8 = 0, rst_n = 0;
  logic [15:0] sw_n = '1;
  logic line_a, f_a, clk_r_a, line_b, f_b, clk_r_b;
  logic [3:0] code_a;
  logic [15:0] leds_a, leds_b;
  logic send_b = 0, cfg_we_b = 0;
  logic [3:0] tx_n_b = 4'd12, cfg_n_b = 4'd12;
  logic [11:0] tx_data_b = '0, rx_data_b;

  int checks = 0, failures = 0;
  int frames_a, frames_b, b2b_a, idle_hold_a, prio_a, sw15_a, n_switch_b, full_b;
  longint tfa, tfb, last_fall_a;
  int nra, nrb;

  transceiver_top dut (
    .tx_clk(tx_clk), .rx_clk8(rx_clk8), .rst_n(rst_n),
    .sw_n(sw_n), .line_a(line_a), .code_a(code_a), .leds_a(leds_a), .f_a(f_a), .clk_r_a(clk_r_a),
    .send_b(send_b), .tx_n_b(tx_n_b), .tx_data_b(tx_data_b), .cfg_we_b(cfg_we_b), .cfg_n_b(cfg_n_b),
    .line_b(line_b), .rx_data_b(rx_data_b), .leds_b(leds_b), .f_b(f_b), .clk_r_b(clk_r_b));

  always #(PER/2) rx_clk8 = ~rx_clk8;
  initial begin
    #(137);
    forever #(TXPER/2) tx_clk = ~tx_clk;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  function automatic int cyc(longint t0);
    return int'(($time - t0 + PER - 1) / PER);
  endfunction

  // Link A frame timing
  always @(posedge f_a) if (rst_n) begin
    if (frames_a > 0 && ($time - last_fall_a) < 4 * TXPER) b2b_a++;
    tfa = $time; nra = 0;
  end
  always @(posedge clk_r_a) if (rst_n) nra++;
  always @(negedge f_a) if (rst_n) begin
    chk(cyc(tfa) === 44, $sformatf("link A f HIGH %0d cycles", cyc(tfa)));
    chk(nra === 5, $sformatf("link A %0d CLK_R cycles", nra));
    frames_a++;
    last_fall_a = $time;
  end
  // Link B frame timing
  always @(posedge f_b) if (rst_n) begin tfb = $time; nrb = 0; end
  always @(posedge clk_r_b) if (rst_n) nrb++;
  always @(negedge f_b) if (rst_n) begin
    chk(cyc(tfb) === 108, $sformatf("link B f HIGH %0d cycles", cyc(tfb)));
    chk(nrb === 13, $sformatf("link B %0d CLK_R cycles", nrb));
    frames_b++;
  end

  function automatic logic [3:0] top_switch(logic [15:0] s);
    for (int i = 15; i >= 0; i--) if (!s[i]) return 4'(i);
    return 4'hF;
  endfunction

  initial begin
    #(PER * 1000000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Link A stimulus
  initial begin
    logic [3:0] exp, held;
    frames_a = 0; b2b_a = 0; idle_hold_a = 0; prio_a = 0; sw15_a = 0;
    tfa = 0; nra = 0; last_fall_a = 0;
    // hold reset over several edges of both clocks
    #(TXPER * 3);
    rst_n = 1;
    #(TXPER * 20);
    held = code_a;
    for (int k = 0; k < 60; k++) begin
      case (k % 6)
        0, 1, 2: sw_n = ~(16'h1 << ($urandom % 16));
        3:       sw_n = ~(16'h1 << 15);
        4:       sw_n = ~((16'h1 << ($urandom % 16)) | (16'h1 << ($urandom % 16)) | 16'h1);
        default: sw_n = 16'($urandom) & 16'h7FFE;
      endcase
      exp = top_switch(sw_n);
      // hold for 2..4 frames (frames repeat every 8 bit periods)
      #(TXPER * 8 * (2 + $urandom % 3));
      chk(code_a === exp, $sformatf("link A code %h expected %h (sw_n=%h)", code_a, exp, sw_n));
      chk(leds_a === (16'h1 << exp), "link A one-hot output");
      if ($countones(~sw_n) > 1 && code_a == exp) prio_a++;
      if (exp == 4'hF && code_a == exp) sw15_a++;
      // release and stay idle
      sw_n = '1;
      #(TXPER * (20 + $urandom % 20));
      chk(code_a === exp && !f_a, "link A holds last code while idle");
      idle_hold_a++;
    end
  end

  // Link B stimulus
  initial begin
    int nn;
    logic [11:0] d;
    n_switch_b = 0; full_b = 0; tfb = 0; nrb = 0; frames_b = 0;
    #(TXPER * 28);
    for (int k = 0; k < 30; k++) begin
      nn = (k == 0) ? 12 : (k == 1) ? 1 : 1 + $urandom % 12;
      // program n at both ends while the line is idle
      @(negedge rx_clk8);
      cfg_n_b = 4'(nn);
      cfg_we_b = 1;
      @(negedge rx_clk8);
      cfg_we_b = 0;
      tx_n_b = 4'(nn);
      n_switch_b++;
      d = 12'($urandom);
      @(negedge tx_clk);
      tx_data_b = d;
      send_b = 1;
      #(TXPER * 16 * (2 + $urandom % 2));
      send_b = 0;
      #(TXPER * 40);
      chk(rx_data_b === (d & ((12'h1 << nn) - 1)), $sformatf("link B n=%0d data %h expected %h", nn, rx_data_b, d & ((12'h1 << nn) - 1)));
      chk(leds_b === (16'h1 << rx_data_b[3:0]), "link B one-hot output");
      if (nn == 12) full_b++;
    end
    #(TXPER * 300);
    chk(frames_a > 0, "link A frames received");
    chk(frames_b > 0, "link B frames received");
    chk(b2b_a > 0, "back-to-back frames on link A");
    chk(idle_hold_a > 0, "link A output held through idle");
    chk(prio_a > 0, "priority among several pressed switches");
    chk(sw15_a > 0, "switch 15 (code equal to idle code) received");
    chk(n_switch_b > 1, "data length changed on link B");
    chk(full_b > 0, "link B with 12 data bits");
    $display("frames A=%0d B=%0d back-to-back=%0d idle holds=%0d priority=%0d sw15=%0d n changes=%0d",
             frames_a, frames_b, b2b_a, idle_hold_a, prio_a, sw15_a, n_switch_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

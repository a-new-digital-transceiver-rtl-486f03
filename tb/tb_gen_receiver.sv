// Testbench for gen_receiver (16-bit frames, n data bits).
//
// Before each burst of frames a random n in 1..12 is written while the line is
// idle (n = 1 and n = 12 are forced at the start). A line model then sends
// 16-bit frames (start, n data bits LSB first, stop bits) with a bit period
// up to 1.5% off nominal and random phase. Checked against timing worked out
// from the oscillator period: f HIGH for 108 cycles (13.5 bits) with 13 CLK_R
// cycles whatever n is, CLK_latch rising 8(n+1) cycles after f, and the
// output then equal to the n data bits sent, right-aligned.
module tb_gen_receiver;
  logic clk = 0, rst_n = 0, in = 1, we = 0;
  logic [3:0] cfg_n = 4'd12, nq;
  logic [11:0] data;
  logic [15:0] leds;
  logic f, clk_r, clk_latch, latch_en;
  int checks = 0, failures = 0;
  longint t_f;
  int nrise, cur_n, frames_sent, frames_latched, n_changes;
  logic [11:0] expq[$];
  logic [11:0] last;
  bit seen_n[13];

  localparam int PER = 100;

  gen_receiver dut (.clk8(clk), .rst_n(rst_n), .in(in), .cfg_we(we), .cfg_n(cfg_n),
                    .data(data), .leds(leds), .n_plus_1(nq), .f(f), .clk_r(clk_r),
                    .clk_latch(clk_latch), .latch_en(latch_en));

  always #(PER/2) clk = ~clk;

  function automatic int cyc_since_f();
    return int'(($time - t_f + PER - 1) / PER);
  endfunction

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  always @(posedge f) if (rst_n) begin t_f = $time; nrise = 0; end
  always @(posedge clk_r) if (rst_n) begin
    nrise++;
    chk(cyc_since_f() === 4 + 8 * (nrise - 1), $sformatf("CLK_R edge %0d at cycle %0d", nrise, cyc_since_f()));
  end
  always @(negedge f) if (rst_n) begin
    chk(cyc_since_f() === 108, $sformatf("f HIGH for %0d cycles", cyc_since_f()));
    chk(nrise === 13, $sformatf("%0d CLK_R cycles in a frame", nrise));
  end
  always @(posedge clk_latch) if (rst_n) begin
    chk(cyc_since_f() === 8 * (cur_n + 1), $sformatf("n=%0d latch at cycle %0d", cur_n, cyc_since_f()));
    #1;
    if (expq.size() === 0) chk(0, "latch without a frame");
    else begin
      last = expq.pop_front();
      chk(data === last, $sformatf("n=%0d data %h expected %h", cur_n, data, last));
      chk(leds === (16'h1 << last[3:0]), "decoder output");
      frames_latched++;
    end
  end

  task automatic off_edge();
    if (($time % (PER / 2)) == 0) #1;
  endtask

  task automatic send_frame(logic [11:0] d, int nbits, int bit_t);
    logic [15:0] fr;
    fr = '1;
    fr[0] = 1'b0;
    for (int i = 0; i < nbits; i++) fr[i + 1] = d[i];
    expq.push_back(d & ((12'h1 << nbits) - 1));
    frames_sent++;
    for (int b = 0; b < 16; b++) begin
      off_edge();
      in = fr[b];
      #(bit_t);
    end
  endtask

  initial begin
    #(PER * 400000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bit_t;
    frames_sent = 0; frames_latched = 0; n_changes = 0;
    t_f = 0; nrise = 0; cur_n = 12;
    #(PER * 3 + 7);
    rst_n = 1;
    #(PER * 10);
    chk(nq === 4'd13, "reset value of n+1");
    for (int burst = 0; burst < 40; burst++) begin
      cur_n = (burst == 0) ? 1 : (burst == 1) ? 12 : 1 + $urandom % 12;
      seen_n[cur_n] = 1;
      @(negedge clk);
      cfg_n = 4'(cur_n);
      we = 1;
      @(negedge clk);
      we = 0;
      n_changes++;
      #(PER * 3 + 13);
      chk(nq === 4'(cur_n + 1), "n+1 register");
      repeat (1 + $urandom % 4) begin
        bit_t = 8 * PER + int'($urandom % 25) - 12;
        send_frame(12'($urandom), cur_n, bit_t);
        #($urandom % (bit_t * 3));
      end
      #(PER * 20);
    end
    #(PER * 200);
    chk(frames_latched === frames_sent, $sformatf("%0d frames sent, %0d latched", frames_sent, frames_latched));
    chk(seen_n[1] && seen_n[12] && n_changes > 1, "n range exercised");
    $display("frames=%0d n changes=%0d", frames_latched, n_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for receiver (basic link, 4 data bits, 8-bit frames).
//
// A line model sends frames of random codes with a bit period up to 3% off
// the nominal 8 oscillator cycles and at random phase, with random idle gaps
// (including none, i.e. back-to-back frames) and occasional short LOW glitches.
// Checked against the frame timing worked out from the oscillator period:
//  * f stays HIGH for 44 oscillator cycles (5.5 bits) per frame;
//  * CLK_R first rises 4 cycles after f and then every 8, 5 times per frame;
//  * CLK_latch rises 40 cycles after f, and then the output holds the code
//    sent, and the decoder output its one-hot;
//  * glitches shorter than half a bit leave f LOW and the output unchanged;
//  * the output holds while the line is idle.
module tb_receiver;
  logic clk = 0, rst_n = 0, in = 1;
  logic [3:0]  data;
  logic [15:0] leds;
  logic f, clk_r, clk_latch, latch_en;
  int checks = 0, failures = 0;
  longint t_f;
  int nrise, frames_sent, frames_latched, glitches, back2back, idle_holds;
  logic [3:0] expq[$];
  logic [3:0] last;

  localparam int PER = 100;  // oscillator period

  receiver dut (.clk8(clk), .rst_n(rst_n), .in(in), .data(data), .leds(leds),
                .f(f), .clk_r(clk_r), .clk_latch(clk_latch), .latch_en(latch_en));

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
  // A glitch shorter than half a bit drops f before the first sampling edge.
  always @(negedge f) if (rst_n && !(nrise == 0 && cyc_since_f() < 4)) begin
    chk(cyc_since_f() === 44, $sformatf("f HIGH for %0d cycles", cyc_since_f()));
    chk(nrise === 5, $sformatf("%0d CLK_R cycles in a frame", nrise));
  end
  always @(posedge clk_latch) if (rst_n) begin
    chk(cyc_since_f() === 40, $sformatf("latch at cycle %0d", cyc_since_f()));
    #1;
    if (expq.size() === 0) chk(0, "latch without a frame");
    else begin
      last = expq.pop_front();
      chk(data === last, $sformatf("data %h expected %h", data, last));
      chk(leds === (16'h1 << last), "decoder output");
      frames_latched++;
    end
  end

  task automatic off_edge();
    if (($time % (PER / 2)) == 0) #1;
  endtask

  task automatic send_frame(logic [3:0] code, int bit_t);
    logic [7:0] fr;
    fr = {3'b111, code, 1'b0};
    expq.push_back(code);
    frames_sent++;
    for (int b = 0; b < 8; b++) begin
      off_edge();
      in = fr[b];
      #(bit_t);
    end
  endtask

  initial begin
    #(PER * 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bit_t, gap;
    frames_sent = 0; frames_latched = 0; glitches = 0; back2back = 0; idle_holds = 0;
    t_f = 0; nrise = 0;
    #(PER * 3 + 7);
    rst_n = 1;
    #(PER * 10);
    for (int k = 0; k < 200; k++) begin
      bit_t = 8 * PER + int'($urandom % 49) - 24;
      send_frame(4'($urandom), bit_t);
      gap = $urandom % 4;
      if (gap == 0) back2back++;
      else if (gap == 3) begin
        // short glitch: LOW for less than half a bit
        #($urandom % 500 + 10);
        off_edge();
        in = 0;
        #($urandom % 250 + 20);
        off_edge();
        in = 1;
        #1;
        chk(!f, "glitch raised f");
        glitches++;
        #(bit_t * 2);
      end else begin
        #($urandom % (bit_t * 6) + 3);
        chk(data === last, "output held while idle");
        idle_holds++;
      end
    end
    #(PER * 100);
    chk(frames_latched === frames_sent, $sformatf("%0d frames sent, %0d latched", frames_sent, frames_latched));
    chk(back2back > 0 && glitches > 0 && idle_holds > 0, "all situations exercised");
    $display("frames=%0d back-to-back=%0d glitches=%0d idle holds=%0d", frames_latched, back2back, glitches, idle_holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

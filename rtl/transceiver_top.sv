// Digital transceiver for asynchronous frames: top level.
//
// Two links stand side by side, sharing the transmitter bit clock tx_clk and
// the receiver oscillator rx_clk8 (nominally 8 times tx_clk, with any phase):
//  * Link A, the basic link: 16 active-low switches are encoded into 4-bit
//    codes and sent in 8-bit frames; the receiver recovers the code and
//    lights one of 16 outputs.
//  * Link B, the generalized link: a host supplies n (1..12) data bits that
//    are sent in 16-bit frames; the generalized receiver, told n through its
//    register, recovers them.
// Each serial line is wired from transmitter to receiver and also brought
// out. All receiver-side outputs are synchronous to rx_clk8, all transmitter
// inputs are sampled on tx_clk.
//
// Both links and their frame formats follow the original design. Placing the
// two links in one top with shared clocks, and the host-side ports of link B
// (send, n, data, register write), are this design's choices; the host
// processor itself, the oscillator, switches and indicator LEDs are outside.
module transceiver_top
  import async_link_pkg::*;
(
  input  logic                     tx_clk,      // transmitter bit clock
  input  logic                     rx_clk8,     // receiver oscillator, 8x tx_clk
  input  logic                     rst_n,       // asynchronous active-low reset
  // Link A
  input  logic [NUM_SWITCHES-1:0]  sw_n,        // active-low switches
  output logic                     line_a,      // serial line A
  output logic [DATA_BITS-1:0]     code_a,      // received code
  output logic [NUM_SWITCHES-1:0]  leds_a,      // one-hot received code
  output logic                     f_a,         // frame detect, link A
  output logic                     clk_r_a,     // sampling clock, link A
  // Link B
  input  logic                     send_b,      // transmit while HIGH
  input  logic [CNT_W-1:0]         tx_n_b,      // data bits per frame at the transmitter
  input  logic [GEN_MAX_DATA-1:0]  tx_data_b,   // data to send
  input  logic                     cfg_we_b,    // write receiver n
  input  logic [CNT_W-1:0]         cfg_n_b,     // receiver n
  output logic                     line_b,      // serial line B
  output logic [GEN_MAX_DATA-1:0]  rx_data_b,   // received data, right-aligned
  output logic [15:0]              leds_b,      // one-hot of rx_data_b[3:0]
  output logic                     f_b,         // frame detect, link B
  output logic                     clk_r_b      // sampling clock, link B
);

  logic unused_a, unused_b;
  logic clk_latch_a, latch_en_a, clk_latch_b, latch_en_b, load_a, load_b, start_a;
  logic [DATA_BITS-1:0] tx_code_a;
  logic [CNT_W-1:0] n_plus_1_b;

  transmitter u_tx_a (
    .tx_clk (tx_clk),
    .rst_n  (rst_n),
    .sw_n   (sw_n),
    .serial (line_a),
    .code   (tx_code_a),
    .start  (start_a),
    .load   (load_a)
  );

  receiver u_rx_a (
    .clk8      (rx_clk8),
    .rst_n     (rst_n),
    .in        (line_a),
    .data      (code_a),
    .leds      (leds_a),
    .f         (f_a),
    .clk_r     (clk_r_a),
    .clk_latch (clk_latch_a),
    .latch_en  (latch_en_a)
  );

  gen_transmitter u_tx_b (
    .tx_clk (tx_clk),
    .rst_n  (rst_n),
    .send   (send_b),
    .n      (tx_n_b),
    .data   (tx_data_b),
    .serial (line_b),
    .load   (load_b)
  );

  gen_receiver u_rx_b (
    .clk8      (rx_clk8),
    .rst_n     (rst_n),
    .in        (line_b),
    .cfg_we    (cfg_we_b),
    .cfg_n     (cfg_n_b),
    .data      (rx_data_b),
    .leds      (leds_b),
    .n_plus_1  (n_plus_1_b),
    .f         (f_b),
    .clk_r     (clk_r_b),
    .clk_latch (clk_latch_b),
    .latch_en  (latch_en_b)
  );

  // Observation-only signals of the sub-blocks are not brought out.
  assign unused_a = ^{clk_latch_a, latch_en_a, load_a, start_a, tx_code_a};
  assign unused_b = ^{clk_latch_b, latch_en_b, load_b, n_plus_1_b};

endmodule

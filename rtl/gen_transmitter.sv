// Transmitter of the generalized link: n data bits in a 16-bit frame.
//
// While `send` is HIGH, each frame slot carries a LOW start bit, the n low
// bits of `data` least significant bit first, and 16-n-1 HIGH stop bits.
// While `send` is LOW, the frame is all ones and the line idles HIGH. The
// parallel-to-serial converter sends one bit per tx_clk cycle and samples a
// new frame every 16 cycles (`load`), so inputs must be stable at that cycle.
//
// The frame format follows the original design; the `send` control and the
// port widths are this design's choices (the original leaves the source of
// the data, a 16-bit processor, outside the design).
module gen_transmitter
  import async_link_pkg::*;
#(
  parameter int unsigned F_BITS   = GEN_FRAME_BITS,
  parameter int unsigned MAX_DATA = GEN_MAX_DATA,
  parameter int unsigned NW       = CNT_W
) (
  input  logic                tx_clk,  // transmitter bit clock
  input  logic                rst_n,   // asynchronous active-low reset
  input  logic                send,    // transmit frames while HIGH
  input  logic [NW-1:0]       n,       // data bits per frame, 1..MAX_DATA
  input  logic [MAX_DATA-1:0] data,    // data, bit 0 sent first
  output logic                serial,  // serial line
  output logic                load     // frame sampled this cycle
);

  logic [F_BITS-1:0] frame;

  always_comb begin
    frame    = '1;
    frame[0] = !send;
    for (int unsigned i = 0; i < MAX_DATA; i++) begin
      if (send && (i < 32'(n))) frame[i + 1] = data[i];
    end
  end

  piso #(.FRAME_BITS(F_BITS)) u_ps (
    .clk    (tx_clk),
    .rst_n  (rst_n),
    .frame  (frame),
    .serial (serial),
    .load   (load)
  );

endmodule

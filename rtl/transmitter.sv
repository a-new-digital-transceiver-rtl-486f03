// Transmitter of the basic link: 16 switches to an 8-bit serial frame.
//
// The switches are active LOW. A 16-to-4 priority encoder turns the pressed
// switch into a 4-bit code, and the start bit is the AND of all switch
// inputs, so it is HIGH while no switch is pressed and drops to LOW as soon as
// one is. The frame is {3 stop bits (HIGH), code[3:0], start bit}, sent start
// bit first and code least significant bit first by the parallel-to-serial
// converter at one bit per tx_clk cycle. With no switch pressed every frame
// is all ones, so the line idles HIGH.
//
// The encoder, start-bit AND, tied-high stop bits and P/S follow the original
// design. The bit order on the line and the free-running framing of the P/S
// are this design's choices.
module transmitter
  import async_link_pkg::*;
#(
  parameter int unsigned N_SW   = NUM_SWITCHES,
  parameter int unsigned D_BITS = DATA_BITS,
  parameter int unsigned F_BITS = FRAME_BITS
) (
  input  logic              tx_clk,  // transmitter bit clock
  input  logic              rst_n,   // asynchronous active-low reset
  input  logic [N_SW-1:0]   sw_n,    // active-low switches
  output logic              serial,  // serial line
  output logic [D_BITS-1:0] code,    // encoder output
  output logic              start,   // start bit (LOW when a switch is pressed)
  output logic              load     // P/S samples a frame this cycle
);

  logic [F_BITS-1:0] frame;

  priority_encoder #(.N(N_SW), .OUT_W(D_BITS)) u_enc (
    .sw_n (sw_n),
    .code (code)
  );

  assign start = &sw_n;
  assign frame = {{(F_BITS - D_BITS - 1){1'b1}}, code, start};

  piso #(.FRAME_BITS(F_BITS)) u_ps (
    .clk    (tx_clk),
    .rst_n  (rst_n),
    .frame  (frame),
    .serial (serial),
    .load   (load)
  );

endmodule

// Parallel-to-serial converter (P/S) of the transmitter.
//
// A free-running bit counter divides the transmitter clock into frame slots of
// FRAME_BITS bits. At the first bit of every slot the parallel frame is
// loaded, and its bits are then sent one per clock, bit 0 first. The serial
// output is registered, so it changes only on the rising edge of tx_clk.
// Because an idle frame is all ones, the line simply stays HIGH between
// frames; a held input is resent in every slot.
//
// Interface: frame[0] is the first bit on the line (the start bit). `load`
// pulses in the cycle in which the frame is sampled. After reset the line is
// HIGH and the first frame is sampled in the first cycle.
//
// The original design specifies only a P/S converter clocked by the
// transmitter clock; the free-running slot counter is this design's choice.
module piso #(
  parameter int unsigned FRAME_BITS = 8
) (
  input  logic                  clk,     // transmitter bit clock
  input  logic                  rst_n,   // asynchronous active-low reset
  input  logic [FRAME_BITS-1:0] frame,   // frame to send, bit 0 first
  output logic                  serial,  // serial line, idles HIGH
  output logic                  load     // frame sampled in this cycle
);

  localparam int unsigned CW = (FRAME_BITS > 1) ? $clog2(FRAME_BITS) : 1;

  logic [CW-1:0]         bit_cnt;
  logic [FRAME_BITS-1:0] sreg;

  assign load = (bit_cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_cnt <= '0;
      sreg    <= '1;
      serial  <= 1'b1;
    end else begin
      if (bit_cnt == CW'(FRAME_BITS - 1)) bit_cnt <= '0;
      else                                bit_cnt <= bit_cnt + 1'b1;
      if (load) begin
        serial <= frame[0];
        sreg   <= {1'b1, frame[FRAME_BITS-1:1]};
      end else begin
        serial <= sreg[0];
        sreg   <= {1'b1, sreg[FRAME_BITS-1:1]};
      end
    end
  end

endmodule

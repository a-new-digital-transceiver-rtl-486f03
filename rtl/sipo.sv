// Serial-to-parallel shift register of the receiver.
//
// The serial line enters at the serial input SR, i.e. at the most significant
// bit, and the register shifts toward bit 0 on every rising edge of the
// sampling clock CLK_R. After the start bit and n data bits have been shifted
// into a register of n bits, the start bit has left it and bit 0 holds the
// first data bit received.
//
// Timing: shifts at the clk8 edge flagged by shift_en (the CLK_R rising edge).
// The input at the MSB and the shift on CLK_R rising edges follow the original
// design; the clock-enable form and the reset to all ones (the idle line
// level) are this design's choices.
module sipo #(
  parameter int unsigned W = 4
) (
  input  logic         clk8,      // local oscillator
  input  logic         rst_n,     // asynchronous active-low reset
  input  logic         shift_en,  // CLK_R rising edge
  input  logic         sr,        // serial input
  output logic [W-1:0] q          // parallel output, q[W-1] is the newest bit
);

  always_ff @(posedge clk8 or negedge rst_n) begin
    if (!rst_n)        q <= '1;
    else if (shift_en) q <= (W > 1) ? {sr, q[W-1:1]} : W'(sr);
  end

endmodule

// Data latching circuit of the basic receiver.
//
// A counter of CLK_R falling edges is held at zero while f is LOW. By the
// (DATA_BITS+1)-th falling edge the shift register has taken in the start bit
// and all DATA_BITS data bits. That edge moves the counter into state
// DATA_BITS+1 (4'b0101 for 4 data bits), the decoded latch clock CLK_latch
// goes HIGH, and on that transition the shift register contents are stored in
// the quad D latch. The stored word is held until the next frame is latched,
// so the outputs keep the last received data while the line is idle.
//
// Timing: the counter and the latch are updated at the clk8 edge flagged by
// fall_en when the counter is at DATA_BITS, which is the clock edge on which
// CLK_latch rises; clk_latch is the decoded counter state. The counter, its
// clear by f and the state that clocks the latch follow the original design.
// Storing on the rising edge of CLK_latch (an edge-triggered register rather
// than a transparent latch) and the zero reset value are this design's
// choices.
module data_latch_fixed #(
  parameter int unsigned DATA_BITS = 4,
  parameter int unsigned CNT_W     = 4
) (
  input  logic                 clk8,       // local oscillator
  input  logic                 rst_n,      // asynchronous active-low reset
  input  logic                 f,          // frame-detect signal (active-low clear)
  input  logic                 clkr_fall,  // CLK_R falls at the next clk8 edge
  input  logic [DATA_BITS-1:0] d,          // shift register outputs
  output logic [DATA_BITS-1:0] q,          // latched data
  output logic                 clk_latch,  // decoded latch clock
  output logic                 latch_en    // q is loaded at the next clk8 edge
);

  localparam logic [CNT_W-1:0] LATCH_STATE = CNT_W'(DATA_BITS + 1);

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk8 or negedge rst_n) begin
    if (!rst_n)         cnt <= '0;
    else if (!f)        cnt <= '0;
    else if (clkr_fall) cnt <= cnt + 1'b1;
  end

  assign clk_latch = (cnt == LATCH_STATE);
  assign latch_en  = f && clkr_fall && (cnt == LATCH_STATE - 1'b1);

  always_ff @(posedge clk8 or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (latch_en) q <= d;
  end

endmodule

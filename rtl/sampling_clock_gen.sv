// Sampling clock generator of the receiver.
//
// A mod-OSR counter runs on the local oscillator CLK_8 (OSR = 8 times the bit
// rate) and is held at zero while the frame-detect signal f is LOW. Its most
// significant bit is the sampling clock CLK_R. When f rises at the leading
// edge of a start bit, the counter starts from zero, so CLK_R first rises
// OSR/2 oscillator cycles later, in the middle of the start bit, and then
// every OSR cycles, in the middle of each following bit. When f falls the
// counter is cleared and CLK_R returns LOW at once; gating CLK_R with f
// hides the one-cycle pulse that the final sampling edge would otherwise leave,
// so each frame shows exactly (F_END - 1) full CLK_R cycles.
//
// This design runs everything from CLK_8: CLK_R is brought out as a signal,
// and its rising and falling edges are given as one-cycle enables (rise_en,
// fall_en) in the CLK_8 cycle whose clock edge makes CLK_R rise or fall. The
// clear by f is therefore synchronous to CLK_8, where the original circuit
// uses the counter's asynchronous clear; the timing in CLK_8 cycles is the
// same. The counter, its clear by f and CLK_R taken from its MSB follow the
// original design.
module sampling_clock_gen #(
  parameter int unsigned OSR = 8   // oscillator cycles per bit, a power of two
) (
  input  logic clk8,     // local oscillator, OSR times the bit rate
  input  logic rst_n,    // asynchronous active-low reset
  input  logic f,        // frame-detect signal, active-high enable / active-low clear
  output logic clk_r,    // sampling clock CLK_R
  output logic rise_en,  // next clk8 edge is a rising edge of CLK_R
  output logic fall_en   // next clk8 edge is a falling edge of CLK_R
);

  localparam int unsigned W = $clog2(OSR);

  if (OSR < 2 || (1 << W) != OSR) begin : g_bad_osr
    $error("sampling_clock_gen: OSR must be a power of two of at least 2");
  end

  logic [W-1:0] cnt;

  always_ff @(posedge clk8 or negedge rst_n) begin
    if (!rst_n)  cnt <= '0;
    else if (!f) cnt <= '0;
    else         cnt <= cnt + 1'b1;
  end

  assign clk_r   = cnt[W-1] && f;
  assign rise_en = f && (cnt == W'(OSR / 2 - 1));
  assign fall_en = f && (cnt == W'(OSR - 1));

endmodule

// Programmable data latching circuit of the generalized receiver.
//
// The number of data bits n per frame is set through a register that a host
// processor writes (cfg_we, cfg_n); the register holds n+1. While the
// frame-detect signal f is LOW, a down counter is loaded from it. Each CLK_R
// falling edge counts it down, and when it reaches zero, after n+1 falling
// edges, the latch clock CLK_latch goes HIGH and the shift register contents
// are stored. By then the start bit and n data bits have been shifted in, so
// the data occupy the top n bits of the W-bit shift register; they are stored
// right-aligned (first received bit in bit 0, unused upper bits zero).
//
// Timing: all updates happen at clk8 edges flagged by clkr_fall; the store
// happens on the edge that brings the counter to zero. n may change between
// frames only; a value written while f is HIGH takes effect at the next frame
// for the counter but is used at once for the alignment.
//
// The register loading n+1, the down counter loaded while f is LOW and the
// zero-state latch clock follow the original design. The write port, the
// reset value (n = W), the right alignment and the edge-triggered store are
// this design's choices.
module data_latch_prog #(
  parameter int unsigned W     = 12,  // shift register width = largest n
  parameter int unsigned CNT_W = 4
) (
  input  logic             clk8,       // local oscillator
  input  logic             rst_n,      // asynchronous active-low reset
  input  logic             f,          // frame-detect signal (active-low load)
  input  logic             clkr_fall,  // CLK_R falls at the next clk8 edge
  input  logic             cfg_we,     // write n
  input  logic [CNT_W-1:0] cfg_n,      // data bits per frame, 1..W
  input  logic [W-1:0]     d,          // shift register outputs
  output logic [W-1:0]     q,          // latched data, right-aligned
  output logic [CNT_W-1:0] n_plus_1,   // register contents
  output logic             clk_latch,  // decoded latch clock
  output logic             latch_en    // q is loaded at the next clk8 edge
);

  localparam int unsigned SW = $clog2(W + 1);

  if (W + 1 >= (1 << CNT_W)) begin : g_bad_w
    $error("data_latch_prog: W+1 must fit in the counter");
  end

  logic [CNT_W-1:0] cnt;
  logic [SW-1:0]    shamt;

  always_ff @(posedge clk8 or negedge rst_n) begin
    if (!rst_n)      n_plus_1 <= CNT_W'(W + 1);
    else if (cfg_we) n_plus_1 <= cfg_n + 1'b1;
  end

  always_ff @(posedge clk8 or negedge rst_n) begin
    if (!rst_n)         cnt <= CNT_W'(W + 1);
    else if (!f)        cnt <= n_plus_1;
    else if (clkr_fall) cnt <= cnt - 1'b1;
  end

  assign clk_latch = f && (cnt == '0);
  assign latch_en  = f && clkr_fall && (cnt == CNT_W'(1));

  // n = n_plus_1 - 1 data bits sit in d[W-1 -: n]; shift them down by W - n.
  assign shamt = SW'(W + 1) - SW'(n_plus_1);

  always_ff @(posedge clk8 or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (latch_en) q <= d >> shamt;
  end

  a_cfg_range : assert property (@(posedge clk8) disable iff (!rst_n)
    cfg_we |-> (cfg_n >= 1 && cfg_n <= CNT_W'(W)));

endmodule

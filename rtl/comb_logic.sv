// Combinational logic block: the frame-detect signal f.
//
// A counter of CLK_R rising edges is held at zero while f is LOW. In the idle
// state the counter is zero and the line In is HIGH, so f is LOW. A LOW on In
// (the start bit) makes f HIGH at once; the sampling clock then starts and the
// counter counts its rising edges. f stays HIGH until the counter reaches
// F_END, which happens on the F_END-th sampling edge, (F_END - 1/2) bit
// periods after the start bit began. Then f drops, both receiver counters are
// cleared and the receiver waits for the next start bit.
//
//   f = (!In | Q != 0) & !((Q & F_END) == F_END)
//
// For F_END = 6 this is the function of the original 4-bit truth table,
// f = (!In + Q2 + Q1 + Q0)(!Q2 + !Q1), with Q3 unused. For the generalized
// receiver F_END = 14 gives f = (!In + Q3 + Q2 + Q1 + Q0)(!Q3 + !Q2 + !Q1).
// Because Q counts up from zero, (Q & F_END) == F_END first holds at
// Q == F_END. If In rises again before the first sampling edge (a LOW pulse
// shorter than half a bit), f drops and no frame is received.
//
// Timing: the counter advances in the CLK_8 cycle flagged by clkr_rise, and
// its clear by f is synchronous to CLK_8 (the original uses the counter's
// asynchronous clear and clocks it from CLK_R). f itself is combinational from
// In and the counter, as in the original.
module comb_logic #(
  parameter int unsigned CNT_W = 4,
  parameter int unsigned F_END = 6   // CLK_R edges after which f drops
) (
  input  logic             clk8,       // local oscillator
  input  logic             rst_n,      // asynchronous active-low reset
  input  logic             in,         // serial line In
  input  logic             clkr_rise,  // CLK_R rises at the next clk8 edge
  output logic             f,          // frame-detect signal
  output logic [CNT_W-1:0] q           // counter of CLK_R edges
);

  localparam logic [CNT_W-1:0] END_MASK = CNT_W'(F_END);

  if (F_END < 2 || F_END >= (1 << CNT_W)) begin : g_bad_end
    $error("comb_logic: F_END must fit in the counter and be at least 2");
  end

  assign f = (!in || (q != '0)) && !((q & END_MASK) == END_MASK);

  always_ff @(posedge clk8 or negedge rst_n) begin
    if (!rst_n)         q <= '0;
    else if (!f)        q <= '0;
    else if (clkr_rise) q <= q + 1'b1;
  end

  // While f is HIGH the counter never passes F_END.
  a_q_bounded : assert property (@(posedge clk8) disable iff (!rst_n)
    f |-> (q < END_MASK));

endmodule

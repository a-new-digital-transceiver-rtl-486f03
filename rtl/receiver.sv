// Receiver of the basic link (4 data bits in an 8-bit frame).
//
// Built only from counters, gates and registers, with no timing set by
// resistors or capacitors. Three parts share the frame-detect signal f:
//  * the combinational logic block raises f at the leading edge of a start
//    bit and drops it DATA_BITS + 1.5 bit periods later;
//  * the sampling clock generator, released by f, produces the sampling clock
//    CLK_R from the 8x oscillator CLK_8, rising in the middle of each bit;
//  * the data latching circuit shifts the line into a shift register on CLK_R
//    rising edges, counts CLK_R falling edges and, on the (DATA_BITS+1)-th,
//    stores the data bits in the output register.
// A 4-to-16 decoder turns the stored code into one-hot outputs.
//
// Interface: `in` is the serial line, asynchronous to clk8 (see below);
// `data` holds the code of the last frame and changes DATA_BITS+1 bit periods
// after the start bit began. f, clk_r and clk_latch are brought out for
// observation.
//
// Everything runs from clk8; CLK_R and CLK_latch are rendered as clock-enables
// (see sampling_clock_gen). The line goes straight into f with no
// synchronizer, as in the original circuit, which keeps the first sampling
// edge exactly four oscillator cycles after f rises. A chip that takes `in`
// from a pad should add a synchronizer and accept the later sampling point.
module receiver
  import async_link_pkg::*;
#(
  parameter int unsigned OSR_P  = OSR,
  parameter int unsigned D_BITS = DATA_BITS,
  parameter int unsigned CW     = CNT_W
) (
  input  logic                   clk8,       // local oscillator, OSR_P x bit rate
  input  logic                   rst_n,      // asynchronous active-low reset
  input  logic                   in,         // serial line
  output logic [D_BITS-1:0]      data,       // last received code
  output logic [(1<<D_BITS)-1:0] leds,       // one-hot decode of data
  output logic                   f,          // frame-detect signal
  output logic                   clk_r,      // sampling clock
  output logic                   clk_latch,  // latch clock
  output logic                   latch_en    // data updates at the next clk8 edge
);

  logic             rise_en, fall_en;
  logic [CW-1:0]    fq;
  logic [D_BITS-1:0] sr_q;

  comb_logic #(.CNT_W(CW), .F_END(f_end_count(D_BITS))) u_comb (
    .clk8      (clk8),
    .rst_n     (rst_n),
    .in        (in),
    .clkr_rise (rise_en),
    .f         (f),
    .q         (fq)
  );

  sampling_clock_gen #(.OSR(OSR_P)) u_clk (
    .clk8    (clk8),
    .rst_n   (rst_n),
    .f       (f),
    .clk_r   (clk_r),
    .rise_en (rise_en),
    .fall_en (fall_en)
  );

  sipo #(.W(D_BITS)) u_sr (
    .clk8     (clk8),
    .rst_n    (rst_n),
    .shift_en (rise_en),
    .sr       (in),
    .q        (sr_q)
  );

  data_latch_fixed #(.DATA_BITS(D_BITS), .CNT_W(CW)) u_latch (
    .clk8      (clk8),
    .rst_n     (rst_n),
    .f         (f),
    .clkr_fall (fall_en),
    .d         (sr_q),
    .q         (data),
    .clk_latch (clk_latch),
    .latch_en  (latch_en)
  );

  // The f counter is internal to the combinational logic block.
  logic unused_fq;
  assign unused_fq = ^fq;

  decoder_4to16 #(.IN_W(D_BITS)) u_dec (
    .code   (data),
    .onehot (leds)
  );

endmodule

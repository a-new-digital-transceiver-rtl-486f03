// Generalized receiver for 16-bit frames carrying n data bits.
//
// The receiver is split into a fixed and a variable part. The fixed part, the
// combinational logic block and the sampling clock generator, is built for the
// longest frame content, MAX_DATA = 12 data bits: f stays HIGH for 13.5 bit
// periods after a start bit whatever n is, so the frame must leave at least
// one stop bit after that (16-bit frame: 1 start, up to 12 data, >= 3 stop).
// The variable part, the programmable data latching circuit, counts n+1
// falling edges of the sampling clock from a host-written register and then
// stores the n data bits. n can therefore be changed by writing a register,
// with no change to the logic.
//
// Interface: `in` is the serial line; cfg_we/cfg_n write n (1..MAX_DATA);
// `data` holds the last frame's data right-aligned, and `leds` is the one-hot
// decode of its low four bits. It changes n+1 bit periods after the start bit
// began. Clocking and the unsynchronized line input are as in `receiver`.
//
// F_END, the sampling edge at which f drops, defaults to MAX_DATA+2 = 14,
// which gives the 12 + 1.5 bit periods that the original design states; the
// closed form printed with it, which decodes the all-ones counter state,
// would correspond to F_END = 15 and also works with 16-bit frames.
module gen_receiver
  import async_link_pkg::*;
#(
  parameter int unsigned OSR_P    = OSR,
  parameter int unsigned MAX_DATA = GEN_MAX_DATA,
  parameter int unsigned CW       = CNT_W,
  parameter int unsigned F_END    = f_end_count(GEN_MAX_DATA),
  parameter int unsigned DEC_W    = 4
) (
  input  logic                  clk8,       // local oscillator, OSR_P x bit rate
  input  logic                  rst_n,      // asynchronous active-low reset
  input  logic                  in,         // serial line
  input  logic                  cfg_we,     // write the number of data bits
  input  logic [CW-1:0]         cfg_n,      // data bits per frame, 1..MAX_DATA
  output logic [MAX_DATA-1:0]   data,       // last received data, right-aligned
  output logic [(1<<DEC_W)-1:0] leds,       // one-hot decode of data[DEC_W-1:0]
  output logic [CW-1:0]         n_plus_1,   // programmed n+1
  output logic                  f,          // frame-detect signal
  output logic                  clk_r,      // sampling clock
  output logic                  clk_latch,  // latch clock
  output logic                  latch_en    // data updates at the next clk8 edge
);

  logic                rise_en, fall_en;
  logic [CW-1:0]       fq;
  logic [MAX_DATA-1:0] sr_q;

  comb_logic #(.CNT_W(CW), .F_END(F_END)) u_comb (
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

  sipo #(.W(MAX_DATA)) u_sr (
    .clk8     (clk8),
    .rst_n    (rst_n),
    .shift_en (rise_en),
    .sr       (in),
    .q        (sr_q)
  );

  data_latch_prog #(.W(MAX_DATA), .CNT_W(CW)) u_latch (
    .clk8      (clk8),
    .rst_n     (rst_n),
    .f         (f),
    .clkr_fall (fall_en),
    .cfg_we    (cfg_we),
    .cfg_n     (cfg_n),
    .d         (sr_q),
    .q         (data),
    .n_plus_1  (n_plus_1),
    .clk_latch (clk_latch),
    .latch_en  (latch_en)
  );

  // The f counter is internal to the combinational logic block.
  logic unused_fq;
  assign unused_fq = ^fq;

  decoder_4to16 #(.IN_W(DEC_W)) u_dec (
    .code   (data[DEC_W-1:0]),
    .onehot (leds)
  );

endmodule

// Shared constants of the asynchronous serial link.
//
// The link sends fixed-length frames over one wire: a LOW start bit, the data
// bits least significant bit first, and HIGH stop bits that pad the frame. The
// line idles HIGH. The receiver runs from a local oscillator at OSR times the
// bit rate and needs no knowledge of the transmitter clock phase.
//
// Two configurations are defined. The basic link carries 4 data bits in an
// 8-bit frame (1 start, 4 data, 3 stop). The generalized link carries n data
// bits (1 <= n <= 12) in a 16-bit frame (1 start, n data, 16-n-1 stop). All
// of these numbers are those of the original design; the package itself is
// only a convenient home for them.
package async_link_pkg;

  // Receiver oscillator runs at 8 times the transmitter bit clock.
  localparam int unsigned OSR = 8;

  // Basic link: 16 switches encoded to 4 bits, 8-bit frame.
  localparam int unsigned NUM_SWITCHES = 16;
  localparam int unsigned DATA_BITS    = 4;
  localparam int unsigned FRAME_BITS   = 8;

  // Generalized link: 16-bit frame, receiver fixed part sized for 12 data bits.
  localparam int unsigned GEN_FRAME_BITS = 16;
  localparam int unsigned GEN_MAX_DATA   = 12;

  // Width of the 4-bit counters used throughout the receiver.
  localparam int unsigned CNT_W = 4;

  // Number of CLK_R rising edges after which the frame-detect signal f drops:
  // f stays HIGH for (data bits + 1 + 1/2) bit periods, i.e. until the
  // (data bits + 2)-th sampling edge.
  function automatic int unsigned f_end_count(int unsigned data_bits);
    return data_bits + 2;
  endfunction

endpackage

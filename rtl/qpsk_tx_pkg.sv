// qpsk_tx_pkg: types and constants shared by the QPSK transmitter.
//
// Holds the packet format (26 preamble bits followed by 174 scrambled data
// bits), the fixed-point sample type (signed 16-bit, 15 fraction bits, for I
// and Q), the preamble and data table contents, and the root-raised-cosine
// (RRC) interpolation filter taps.
//
// The packet lengths and the up-sampling factor of 4 follow the source
// design. The word formats, the data contents and the filter roll-off/span
// are this design's own choices:
//   * preamble: the 13-bit Barker code 1111100110101 with each bit sent twice;
//   * data: packet m carries the 7-bit ASCII text "Hello world mmm" (105
//     bits, MSB first) followed by 69 zero bits, for m = 0 .. NUM_MSG-1;
//   * RRC taps: roll-off 0.5, 4 samples per symbol, span 10 symbols (41
//     taps), scaled to unit energy and rounded to Q1.15:
//       h(t) = [sin(pi t (1-b)) + 4 b t cos(pi t (1+b))] / [pi t (1 - (4 b t)^2)],
//       t = (n - 20)/4 symbols, h(0) = 1 - b + 4b/pi,
//       taps = round(32768 * h / sqrt(sum h^2)).
package qpsk_tx_pkg;

  localparam int unsigned PREAMBLE_LEN = 26;   // preamble bits per packet
  localparam int unsigned DATA_LEN     = 174;  // data bits per packet
  localparam int unsigned PACKET_LEN   = PREAMBLE_LEN + DATA_LEN;
  localparam int unsigned MSG_CHARS    = 15;   // "Hello world mmm"
  localparam int unsigned MSG_BITS     = 7 * MSG_CHARS;

  localparam int unsigned INTERP       = 4;    // samples per symbol
  localparam int unsigned NTAPS        = 41;   // RRC taps
  localparam int unsigned TAPS_PER_PH  = (NTAPS + INTERP - 1) / INTERP;  // 11

  localparam int unsigned SAMPLE_W     = 16;   // I/Q word width
  localparam int unsigned SAMPLE_FRAC  = 15;   // fraction bits
  localparam int unsigned COEF_W       = 16;
  localparam int unsigned COEF_FRAC    = 15;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0]   coef_t;

  // One complex baseband sample: in-phase and quadrature parts.
  typedef struct packed {
    sample_t i;
    sample_t q;
  } iq_t;

  // 1/sqrt(2) in Q1.15, the QPSK constellation amplitude.
  localparam sample_t QPSK_AMP = 16'sd23170;

  // 13-bit Barker code, first bit in the MSB.
  localparam logic [12:0] BARKER13 = 13'b1111100110101;

  // Preamble bit at position addr (0 = first sent): Barker bit addr/2.
  function automatic logic preamble_bit(input int unsigned addr);
    return BARKER13[12 - (addr / 2)];
  endfunction

  // Data bit at position pos of packet msg: 7-bit ASCII of "Hello world mmm"
  // then zeros.
  function automatic logic data_bit(input int unsigned msg, input int unsigned pos);
    logic [7:0] ch;
    int unsigned c;
    if (pos >= MSG_BITS) return 1'b0;
    c = pos / 7;
    case (c)
      0:  ch = "H";
      1:  ch = "e";
      2:  ch = "l";
      3:  ch = "l";
      4:  ch = "o";
      5:  ch = " ";
      6:  ch = "w";
      7:  ch = "o";
      8:  ch = "r";
      9:  ch = "l";
      10: ch = "d";
      11: ch = " ";
      12: ch = 8'("0" + (msg / 100) % 10);
      13: ch = 8'("0" + (msg / 10) % 10);
      default: ch = 8'("0" + msg % 10);
    endcase
    return ch[6 - (pos % 7)];
  endfunction

  // RRC taps (see formula above), symmetric about tap 20.
  localparam coef_t RRC_TAPS [NTAPS] = '{
    -16'sd11,    16'sd97,    16'sd82,   -16'sd63,  -16'sd166,   -16'sd63,
     16'sd176,   16'sd270,   16'sd50,  -16'sd270,  -16'sd246,    16'sd253,
     16'sd695,   16'sd253, -16'sd1229, -16'sd2570, -16'sd1738,   16'sd2570,
     16'sd9481,  16'sd15967, 16'sd18623, 16'sd15967, 16'sd9481,   16'sd2570,
    -16'sd1738, -16'sd2570, -16'sd1229,  16'sd253,   16'sd695,    16'sd253,
    -16'sd246,  -16'sd270,   16'sd50,    16'sd270,   16'sd176,   -16'sd63,
    -16'sd166,  -16'sd63,    16'sd82,    16'sd97,   -16'sd11
  };

endpackage

// sensor_link_pkg: constants, types and the bit-serial CRC step shared by
// the transmitter and receiver halves of the sensor link.
//
// The HDLC flag pattern (01111110), the zero insertion after five ones and
// the idle fill of eight ones are the framing rules the design follows. The
// 16-bit FCS polynomial (x^16 + x^12 + x^5 + 1, preset to all ones, sent
// complemented, least significant bit first) is the usual HDLC choice and is
// this design's assumption; the same holds for the RLE word layout, which
// puts the run count in the upper byte and the symbol in the lower byte.
package sensor_link_pkg;

  localparam int unsigned SAMPLE_W    = 8;          // ADC resolution
  localparam logic [7:0]  HDLC_FLAG   = 8'h7E;      // 01111110
  localparam logic [7:0]  HDLC_IDLE   = 8'hFF;      // eight ones between frames
  localparam int unsigned STUFF_RUN   = 5;          // ones before a zero is inserted
  localparam logic [15:0] CRC_INIT    = 16'hFFFF;
  localparam logic [15:0] CRC_POLY_R  = 16'h8408;   // bit-reversed 0x1021
  localparam logic [15:0] CRC_GOOD    = 16'hF0B8;   // residue over data plus FCS

  // One compressed run: {count, symbol}, count in the upper byte.
  typedef struct packed {
    logic [7:0] count;
    logic [7:0] symbol;
  } rle_word_t;

  // One bit of a serial frame stream between HDLC stages.
  typedef struct packed {
    logic bit_val;   // the bit
    logic last;      // last bit of the frame content at this stage
  } hdlc_bit_t;

  // Advance the CRC by one serial bit (LSB-first, reflected register).
  function automatic logic [15:0] crc16_step(input logic [15:0] crc, input logic b);
    logic fb;
    fb = crc[0] ^ b;
    return fb ? ((crc >> 1) ^ CRC_POLY_R) : (crc >> 1);
  endfunction

endpackage

// pcm_pkg: types and constants shared by the PCM1024Z transmitter and receiver.
//
// A PCM1024Z frame carries four 16-bit datapackets. Each datapacket holds two
// aux bits, a 4-bit delta code for one channel and a 10-bit absolute position
// for another. An 8-bit CRC is appended (24-bit pcm_packet), the pcm_packet is
// cut into four 6-bit chunks and every chunk is sent as a 10-bit word without
// isolated 0s or 1s (6to10 code). Preamble, an 18-bit sync run and an odd/even
// frame code bring a full frame to 190 bits of 150 us each.
//
// The tables below (CRC XOR values, 6to10 code words, delta codes and jumps)
// are those of the format itself. Timing (bits of 150 us) is handled by the
// modules that use the line, with a clock assumed to run at 1 MHz.
package pcm_pkg;

  localparam int POS_W     = 10;   // absolute position width
  localparam int DELTA_W   = 4;    // delta code width
  localparam int AUX_W     = 2;    // aux bits per datapacket
  localparam int DATA_W    = 16;   // datapacket width
  localparam int CRC_W     = 8;    // CRC width
  localparam int PKT_W     = 24;   // pcm_packet width (datapacket + CRC)
  localparam int CHUNK_W   = 6;    // 6to10 input chunk
  localparam int CODE_W    = 10;   // 6to10 radio word
  localparam int NPKT      = 4;    // datapackets per frame
  localparam int NWORD     = 4;    // radio words per pcm_packet
  localparam int PKT_BITS  = NWORD * CODE_W;   // 40 line bits per pcm_packet
  localparam int DATA_BITS = NPKT * PKT_BITS;  // 160 coded bits per frame
  localparam int SYNC_LEN  = 18;   // sync run length
  localparam int HDR_BITS  = 30;   // preamble + sync + frame code
  localparam int FRAME_BITS = HDR_BITS + DATA_BITS;  // 190
  localparam int NPROP     = 8;    // proportional channels 1..8
  localparam int NCHNR     = 32;   // channel memory entries (5-bit chnr)
  localparam logic [POS_W-1:0] POS_CENTER = 10'd512;

  typedef logic [POS_W-1:0]   pos_t;
  typedef logic [DELTA_W-1:0] delta_t;
  typedef logic [4:0]         chnr_t;

  // Datapacket, most significant field first as it is sent.
  typedef struct packed {
    logic [AUX_W-1:0] aux;    // aux[1] = A1, aux[0] = A0
    delta_t           delta;
    pos_t             pos;
  } datapacket_t;

  // Channel memory addresses (chnr) of the switch channels.
  localparam chnr_t CHNR_BFR  = 5'b01000;
  localparam chnr_t CHNR_CH9  = 5'b01001;
  localparam chnr_t CHNR_CH10 = 5'b01010;

  // Header bits, first bit sent on the left. Even: preamble 110000 + code 000011,
  // odd: preamble 1100 + code 00000011, each around 18 ones of sync.
  localparam logic [HDR_BITS-1:0] HDR_EVEN = {6'b110000, {SYNC_LEN{1'b1}}, 6'b000011};
  localparam logic [HDR_BITS-1:0] HDR_ODD  = {4'b1100,   {SYNC_LEN{1'b1}}, 8'b00000011};

  // CRC XOR values per datapacket bit, index 15 = A1 ... index 0 = P0.
  localparam logic [7:0] CRC_XOR [DATA_W] = '{
    8'h4A, 8'h25, 8'hA7, 8'hE6, 8'h73, 8'h8C, 8'h46, 8'h23,
    8'hA4, 8'h52, 8'h29, 8'hA1, 8'hE5, 8'hC7, 8'hD6, 8'h6B
  };

  // 6to10 code words, index = 6-bit chunk value, bit 9 sent first.
  localparam logic [CODE_W-1:0] CODE6TO10 [64] = '{
    10'b1111111000, 10'b1111110011, 10'b1111100011, 10'b1111100111,
    10'b1111000111, 10'b1111001111, 10'b1110001111, 10'b1110011111,
    10'b0011111111, 10'b0001111111, 10'b0000111111, 10'b1100111111,
    10'b1100011111, 10'b1100001111, 10'b1110000111, 10'b1111000011,
    10'b0011111100, 10'b0011110011, 10'b0011100111, 10'b0011001111,
    10'b1111001100, 10'b1110011100, 10'b1100111100, 10'b1100110011,
    10'b1111110000, 10'b1111100000, 10'b1110000011, 10'b1100000111,
    10'b1100011100, 10'b1110011000, 10'b1110001100, 10'b1100111000,
    10'b0011000111, 10'b0001110011, 10'b0001100111, 10'b0011100011,
    10'b0011111000, 10'b0001111100, 10'b0000011111, 10'b0000001111,
    10'b0011001100, 10'b0011000011, 10'b0001100011, 10'b0000110011,
    10'b1100110000, 10'b1100011000, 10'b1100001100, 10'b1100000011,
    10'b0000111100, 10'b0001111000, 10'b0011110000, 10'b0011100000,
    10'b0011000000, 10'b1111000000, 10'b1110000000, 10'b1100000000,
    10'b0001100000, 10'b0001110000, 10'b0000110000, 10'b0000111000,
    10'b0000011000, 10'b0000011100, 10'b0000001100, 10'b0000000111
  };

  // Delta codes: lowest difference of each code's range and the jump the
  // receiver applies for it.
  localparam int DELTA_LOW  [16] = '{-1023, -115, -87, -63, -43, -27, -15, -7,
                                        -3,    5,    9,  17,  29,  45,  65, 88};
  localparam int DELTA_JUMP [16] = '{ -116,  -88, -64, -44, -28, -16,  -8, -4,
                                         0,    5,    9,  17,  29,  45,  65, 88};

endpackage

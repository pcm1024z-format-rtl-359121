// pcm_frame_tx: channel coder and serializer of PCM1024Z full frames.
//
// From the four datapackets of a frame it forms the 190-bit full frame:
//   preamble (even 110000, odd 1100), sync (18 ones),
//   frame code (even 000011, odd 00000011),
//   4 x pcm_packet, each {datapacket, CRC} cut into four 6-bit chunks (most
//   significant first) and 6to10 coded, 160 bits in all.
// The preamble ends in 00 so that the sync is exactly 18 ones whatever the
// previous frame ended with, and the two preamble lengths make up for the
// two frame code lengths. With invert set, every bit of the frame, preamble
// and sync included, is sent inverted (DC removal).
//
// Timing: one line bit every BIT_CYCLES clocks (150 at the assumed 1 MHz
// clock, 150 us per bit, 28.5 ms per frame). pkts, odd and invert are sampled
// at the first bit of a frame. frame_end pulses for one clock with the bit
// tick that sends a frame's last bit; the next frame's inputs must be stable
// by the next bit tick, BIT_CYCLES clocks later.
module pcm_frame_tx
  import pcm_pkg::*;
#(
  parameter int unsigned BIT_CYCLES = 150
) (
  input  logic        clk,
  input  logic        rst,
  input  datapacket_t pkts [NPKT],
  input  logic        odd,
  input  logic        invert,
  output logic        tx_bit,
  output logic        frame_end
);

  localparam int DIV_W = $clog2(BIT_CYCLES);

  logic [CRC_W-1:0]      crc   [NPKT];
  logic [PKT_W-1:0]      ppkt  [NPKT];
  logic [PKT_BITS-1:0]   coded [NPKT];
  logic [FRAME_BITS-1:0] frame_vec;
  logic [FRAME_BITS-1:0] sr;
  logic [DIV_W-1:0]      div;
  logic [7:0]            bitcnt;
  logic                  tick;

  for (genvar k = 0; k < NPKT; k++) begin : g_pkt
    pcm_crc8 u_crc (.data(pkts[k]), .crc(crc[k]));
    assign ppkt[k] = {pkts[k], crc[k]};
    for (genvar w = 0; w < NWORD; w++) begin : g_word
      pcm_6to10_enc u_enc (
        .data6 (ppkt[k][PKT_W-1-CHUNK_W*w -: CHUNK_W]),
        .code10(coded[k][PKT_BITS-1-CODE_W*w -: CODE_W])
      );
    end
  end

  assign frame_vec = {odd ? HDR_ODD : HDR_EVEN, coded[0], coded[1], coded[2], coded[3]}
                     ^ {FRAME_BITS{invert}};

  assign tick = (div == DIV_W'(BIT_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      div       <= '0;
      bitcnt    <= '0;
      sr        <= '0;
      tx_bit    <= 1'b0;
      frame_end <= 1'b0;
    end else begin
      frame_end <= 1'b0;
      div       <= tick ? '0 : div + 1'b1;
      if (tick) begin
        if (bitcnt == 8'd0) begin
          tx_bit <= frame_vec[FRAME_BITS-1];
          sr     <= frame_vec << 1;
        end else begin
          tx_bit <= sr[FRAME_BITS-1];
          sr     <= sr << 1;
        end
        if (bitcnt == 8'(FRAME_BITS - 1)) begin
          bitcnt    <= '0;
          frame_end <= 1'b1;
        end else begin
          bitcnt <= bitcnt + 1'b1;
        end
      end
    end
  end

endmodule

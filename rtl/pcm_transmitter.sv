// pcm_transmitter: PCM1024Z transmit side, channel values to line bits.
//
// Frames alternate even, odd, even, odd from reset; the first two frames are
// sent straight, the next two inverted, and so on (a 2-bit frame counter:
// bit 0 is the parity, bit 1 the inversion). At every frame boundary the
// scheduler decides whether failsafe data goes into the next frame and the
// packet builder samples the channel inputs; the serializer then sends the
// frame. The result is the unmodulated bit stream that a transmitter puts on
// its trainer port and hands to its FSK modulator.
//
// Interface: ch_pos, bfr, ch9, ch10 are the realtime channels, fs_pos and
// fs_mode the failsafe settings of channels 1..8, fs_update requests a
// failsafe burst. They are sampled once per frame, one bit period before the
// frame starts. tx_line is the line bit, frame_start pulses when a frame's
// packets are built; odd and invert report that frame.
module pcm_transmitter
  import pcm_pkg::*;
#(
  parameter int unsigned BIT_CYCLES    = 150,
  parameter int unsigned START_FRAMES  = 210,
  parameter int unsigned PERIOD_FRAMES = 2105
) (
  input  logic        clk,
  input  logic        rst,
  input  pos_t        ch_pos  [NPROP],
  input  logic        bfr,
  input  logic        ch9,
  input  logic        ch10,
  input  pos_t        fs_pos  [NPROP],
  input  logic [NPROP-1:0] fs_mode,
  input  logic        fs_update,
  output logic        tx_line,
  output logic        frame_start,
  output logic        odd,
  output logic        invert,
  output logic        inject
);

  logic [1:0]  fcnt;         // frame about to be built
  logic        first;        // build the first frame right after reset
  logic        frame_end;
  logic        b2;
  datapacket_t pkts [NPKT];

  assign frame_start = first | frame_end;

  pcm_nrt_scheduler #(
    .START_FRAMES (START_FRAMES),
    .PERIOD_FRAMES(PERIOD_FRAMES)
  ) u_sched (
    .clk, .rst,
    .frame_tick(frame_start),
    .odd       (fcnt[0]),
    .fs_update,
    .inject,
    .b2
  );

  pcm_packet_builder u_build (
    .clk, .rst,
    .build (frame_start),
    .odd   (fcnt[0]),
    .inject,
    .b2,
    .ch_pos, .bfr, .ch9, .ch10, .fs_pos, .fs_mode,
    .pkts
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      fcnt   <= '0;
      first  <= 1'b1;
      odd    <= 1'b0;
      invert <= 1'b0;
    end else begin
      first <= 1'b0;
      if (frame_start) begin
        fcnt   <= fcnt + 1'b1;
        odd    <= fcnt[0];
        invert <= fcnt[1];
      end
    end
  end

  pcm_frame_tx #(.BIT_CYCLES(BIT_CYCLES)) u_ser (
    .clk, .rst,
    .pkts,
    .odd,
    .invert,
    .tx_bit   (tx_line),
    .frame_end
  );

endmodule

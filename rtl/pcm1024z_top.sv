// pcm1024z_top: PCM1024Z transmitter and receiver side by side.
//
// The transmitter turns eight 10-bit proportional channels, three switch
// channels and the failsafe settings of channels 1..8 into the 190-bit,
// 28.5 ms full frames of the format, on tx_line. The receiver takes such a
// bit stream on rx_line and recovers the channels and failsafe settings,
// applying radio and battery failsafe. The radio link between the two
// (FSK modulation, the receiver's demodulator) is outside this design:
// connect tx_line to rx_line for a loop-back, or insert a channel model.
//
// All timing is in clock cycles of an assumed 1 MHz clock (150 per bit).
module pcm1024z_top
  import pcm_pkg::*;
#(
  parameter int unsigned BIT_CYCLES        = 150,
  parameter int unsigned START_FRAMES      = 210,
  parameter int unsigned PERIOD_FRAMES     = 2105,
  parameter int unsigned BAD_HALF_FRAMES   = 70,
  parameter int unsigned HALF_FRAME_CYCLES = 14250,
  parameter int unsigned BFR_HOLD_CYCLES   = 30_000_000
) (
  input  logic             clk,
  input  logic             rst,
  // transmitter
  input  pos_t             tx_ch_pos  [NPROP],
  input  logic             tx_bfr,
  input  logic             tx_ch9,
  input  logic             tx_ch10,
  input  pos_t             tx_fs_pos  [NPROP],
  input  logic [NPROP-1:0] tx_fs_mode,
  input  logic             tx_fs_update,
  output logic             tx_line,
  output logic             tx_frame_start,
  output logic             tx_odd,
  output logic             tx_invert,
  output logic             tx_inject,
  // receiver
  input  logic             rx_line,
  input  logic             rx_batt_low,
  output pos_t             rx_servo   [NPROP],
  output logic             rx_bfr,
  output logic             rx_ch9,
  output logic             rx_ch10,
  output pos_t             rx_fs_pos  [NPROP],
  output logic [NPROP-1:0] rx_fs_mode,
  output logic             rx_radio_fs,
  output logic             rx_batt_fs,
  output logic             rx_pkt_good,
  output logic             rx_pkt_bad
);

  pcm_transmitter #(
    .BIT_CYCLES   (BIT_CYCLES),
    .START_FRAMES (START_FRAMES),
    .PERIOD_FRAMES(PERIOD_FRAMES)
  ) u_tx (
    .clk, .rst,
    .ch_pos     (tx_ch_pos),
    .bfr        (tx_bfr),
    .ch9        (tx_ch9),
    .ch10       (tx_ch10),
    .fs_pos     (tx_fs_pos),
    .fs_mode    (tx_fs_mode),
    .fs_update  (tx_fs_update),
    .tx_line,
    .frame_start(tx_frame_start),
    .odd        (tx_odd),
    .invert     (tx_invert),
    .inject     (tx_inject)
  );

  pcm_receiver #(
    .BIT_CYCLES       (BIT_CYCLES),
    .BAD_HALF_FRAMES  (BAD_HALF_FRAMES),
    .HALF_FRAME_CYCLES(HALF_FRAME_CYCLES),
    .BFR_HOLD_CYCLES  (BFR_HOLD_CYCLES)
  ) u_rx (
    .clk, .rst,
    .rx_line,
    .batt_low(rx_batt_low),
    .servo   (rx_servo),
    .bfr     (rx_bfr),
    .ch9     (rx_ch9),
    .ch10    (rx_ch10),
    .fs_pos  (rx_fs_pos),
    .fs_mode (rx_fs_mode),
    .radio_fs(rx_radio_fs),
    .batt_fs (rx_batt_fs),
    .pkt_good(rx_pkt_good),
    .pkt_bad (rx_pkt_bad)
  );

endmodule

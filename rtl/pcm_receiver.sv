// pcm_receiver: PCM1024Z receive side, line bits to servo positions.
//
// Chain: bit recovery (pcm_bit_sync) -> deframer with 6to10 decoding and CRC
// check (pcm_frame_rx) -> address decoder (pcm_channel_decoder) -> channel
// memory (pcm_channel_mem) -> failsafe output stage (pcm_failsafe_ctrl).
// Positions are updated once per frame, every 28.5 ms: the absolute position
// of a channel in one frame and a delta for it in the next.
//
// Interface: rx_line is the demodulated bit stream, batt_low the battery
// comparator. servo holds channels 1..8 after failsafe handling; bfr, ch9,
// ch10 the switch channels; fs_pos/fs_mode the failsafe settings received.
// pkt_good/pkt_bad pulse for every datapacket accepted or rejected.
module pcm_receiver
  import pcm_pkg::*;
#(
  parameter int unsigned BIT_CYCLES        = 150,
  parameter int unsigned BAD_HALF_FRAMES   = 70,
  parameter int unsigned HALF_FRAME_CYCLES = 14250,
  parameter int unsigned BFR_HOLD_CYCLES   = 30_000_000
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             rx_line,
  input  logic             batt_low,
  output pos_t             servo  [NPROP],
  output logic             bfr,
  output logic             ch9,
  output logic             ch10,
  output pos_t             fs_pos [NPROP],
  output logic [NPROP-1:0] fs_mode,
  output logic             radio_fs,
  output logic             batt_fs,
  output logic             pkt_good,
  output logic             pkt_bad
);

  logic        bit_val, bit_stb;
  logic        pkt_valid, pkt_ok, odd, inverted;
  datapacket_t pkt;
  logic [1:0]  pkt_idx;
  logic [2:0]  we;
  chnr_t       waddr [3];
  pos_t        wdata [3];
  logic        fsm_we, fsm_val;
  logic [2:0]  fsm_idx;
  logic        half_valid, half_ok;
  pos_t        mem  [NCHNR];
  pos_t        live [NPROP];

  pcm_bit_sync #(.BIT_CYCLES(BIT_CYCLES)) u_bits (
    .clk, .rst, .rx_line, .bit_val, .bit_stb
  );

  pcm_frame_rx u_deframe (
    .clk, .rst, .bit_val, .bit_stb,
    .pkt_valid, .pkt, .pkt_ok, .pkt_idx, .odd, .inverted
  );

  pcm_channel_decoder u_dec (
    .clk, .rst, .pkt_valid, .pkt, .pkt_ok, .pkt_idx, .odd, .mem,
    .we, .waddr, .wdata, .fsm_we, .fsm_idx, .fsm_val, .half_valid, .half_ok
  );

  pcm_channel_mem u_mem (
    .clk, .rst, .we, .waddr, .wdata, .fsm_we, .fsm_idx, .fsm_val, .mem, .fs_mode
  );

  always_comb begin
    for (int i = 0; i < NPROP; i++) begin
      live[i]   = mem[i];
      fs_pos[i] = mem[NCHNR/2 + i];
    end
  end
  assign bfr  = mem[CHNR_BFR][0];
  assign ch9  = mem[CHNR_CH9][0];
  assign ch10 = mem[CHNR_CH10][0];
  assign pkt_good = pkt_valid && pkt_ok;
  assign pkt_bad  = pkt_valid && !pkt_ok;

  pcm_failsafe_ctrl #(
    .BAD_HALF_FRAMES  (BAD_HALF_FRAMES),
    .HALF_FRAME_CYCLES(HALF_FRAME_CYCLES),
    .BFR_HOLD_CYCLES  (BFR_HOLD_CYCLES)
  ) u_fs (
    .clk, .rst, .half_valid, .half_ok, .batt_low, .bfr, .live, .fs_pos, .fs_mode,
    .servo, .radio_fs, .batt_fs
  );

endmodule

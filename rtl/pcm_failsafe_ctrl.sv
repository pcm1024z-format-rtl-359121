// pcm_failsafe_ctrl: failsafe output stage of the PCM1024Z receiver.
//
// Radio failsafe: every packet pair (half frame) that arrives with an error,
// and every HALF_FRAME_CYCLES without any packet pair at all, counts as a bad
// half frame. After BAD_HALF_FRAMES bad half frames in a row the receiver is
// in radio failsafe; the next good half frame ends it. In radio failsafe each
// of channels 1..8 either holds its last position (failsafe mode 0, normal)
// or goes to its failsafe position (mode 1, preset).
//
// Battery failsafe: while batt_low is high (receiver battery below 3.8 V, from
// an external comparator) the throttle, channel 3, is treated the same way;
// the other channels keep working. A 0-to-1 change of the BFR switch channel
// suspends battery failsafe for BFR_HOLD_CYCLES (30 s at the assumed 1 MHz).
//
// "Last position" is the live value from the cycle before failsafe began.
// The way radio failsafe ends, and the counting of missing half frames, are
// this design's choices.
//
// Interface: live and failsafe positions and modes from the channel memory,
// half frame results from the decoder; servo outputs and two status flags.
// Timing: servo is combinational from the registered state.
module pcm_failsafe_ctrl
  import pcm_pkg::*;
#(
  parameter int unsigned BAD_HALF_FRAMES   = 70,
  parameter int unsigned HALF_FRAME_CYCLES = 14250,
  parameter int unsigned BFR_HOLD_CYCLES   = 30_000_000
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             half_valid,
  input  logic             half_ok,
  input  logic             batt_low,
  input  logic             bfr,
  input  pos_t             live    [NPROP],
  input  pos_t             fs_pos  [NPROP],
  input  logic [NPROP-1:0] fs_mode,
  output pos_t             servo   [NPROP],
  output logic             radio_fs,
  output logic             batt_fs
);

  localparam int BAD_W  = $clog2(BAD_HALF_FRAMES + 1);
  localparam int GAP_W  = $clog2(HALF_FRAME_CYCLES + 1);
  localparam int HOLD_W = $clog2(BFR_HOLD_CYCLES + 1);
  localparam int THROTTLE = 2;   // channel 3

  logic [BAD_W-1:0]  bad_cnt;
  logic [GAP_W-1:0]  gap;
  logic [HOLD_W-1:0] bfr_hold;
  logic [1:0]        batt_sync;
  logic              bfr_q;
  logic              gap_out;
  pos_t              held [NPROP];
  logic [NPROP-1:0]  fs_active;

  assign gap_out  = (gap == GAP_W'(HALF_FRAME_CYCLES - 1));
  assign radio_fs = (bad_cnt == BAD_W'(BAD_HALF_FRAMES));
  assign batt_fs  = batt_sync[1] && (bfr_hold == '0);

  always_comb begin
    for (int i = 0; i < NPROP; i++) begin
      fs_active[i] = radio_fs || (i == THROTTLE && batt_fs);
      servo[i]     = !fs_active[i] ? live[i] : (fs_mode[i] ? fs_pos[i] : held[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bad_cnt   <= '0;
      gap       <= '0;
      bfr_hold  <= '0;
      batt_sync <= '0;
      bfr_q     <= 1'b0;
      for (int i = 0; i < NPROP; i++) held[i] <= POS_CENTER;
    end else begin
      batt_sync <= {batt_sync[0], batt_low};
      bfr_q     <= bfr;

      if (half_valid || gap_out) gap <= '0;
      else                       gap <= gap + 1'b1;

      if (half_valid && half_ok)             bad_cnt <= '0;
      else if ((half_valid || gap_out) && !radio_fs) bad_cnt <= bad_cnt + 1'b1;

      if (bfr && !bfr_q)        bfr_hold <= HOLD_W'(BFR_HOLD_CYCLES);
      else if (bfr_hold != '0)  bfr_hold <= bfr_hold - 1'b1;

      for (int i = 0; i < NPROP; i++) begin
        if (!fs_active[i]) held[i] <= live[i];
      end
    end
  end

endmodule

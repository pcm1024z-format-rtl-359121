// pcm_nrt_scheduler: timing of the non-realtime (failsafe) data in PCM1024Z.
//
// Failsafe settings of channels 1..8 are not sent in frames of their own but
// injected into four consecutive realtime frames, two failsafe channels per
// frame. A burst is started START_FRAMES frames after reset, then every
// PERIOD_FRAMES frames, and also after an fs_update request (a failsafe mode
// set to preset). A burst always begins on an even frame and follows the
// order even/B2=0, odd/B2=0, even/B2=1, odd/B2=1, which together carry
// failsafe channels 1,5 / 2,6 / 3,7 / 4,8.
//
// Interface: frame_tick pulses once per frame, at the moment the next frame's
// packets are built; odd is that frame's parity. inject and b2 are
// combinational and valid for that frame; the state advances on frame_tick.
// The power-on delay (6 s) and the one-minute period are given in frames of
// 28.5 ms; the exact delay within the 4 to 8 s window is this design's choice.
module pcm_nrt_scheduler #(
  parameter int unsigned START_FRAMES  = 210,
  parameter int unsigned PERIOD_FRAMES = 2105
) (
  input  logic clk,
  input  logic rst,
  input  logic frame_tick,
  input  logic odd,
  input  logic fs_update,
  output logic inject,
  output logic b2
);

  localparam int CNT_W = $clog2(START_FRAMES > PERIOD_FRAMES ? START_FRAMES + 1 : PERIOD_FRAMES + 1);

  logic [CNT_W-1:0] timer;
  logic             pending;
  logic             busy;
  logic [1:0]       step;   // frame of the burst that is next, 1..3 while busy

  always_comb begin
    inject = 1'b0;
    b2     = 1'b0;
    if (busy) begin
      inject = 1'b1;
      b2     = step[1];
    end else if (pending && !odd) begin
      inject = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      timer   <= CNT_W'(START_FRAMES - 1);
      pending <= 1'b0;
      busy    <= 1'b0;
      step    <= '0;
    end else begin
      if (fs_update) pending <= 1'b1;
      if (frame_tick) begin
        if (busy) begin
          step <= step + 1'b1;
          if (step == 2'd3) busy <= 1'b0;
        end else if (pending && !odd) begin
          busy    <= 1'b1;
          step    <= 2'd1;
          pending <= fs_update;
        end
        if (timer == '0) begin
          pending <= 1'b1;
          timer   <= CNT_W'(PERIOD_FRAMES - 1);
        end else begin
          timer <= timer - 1'b1;
        end
      end
    end
  end

  // A burst alternates parity: its first frame is even.
  property p_burst_even;
    @(posedge clk) disable iff (rst) (frame_tick && inject && !busy) |-> !odd;
  endproperty
  assert property (p_burst_even);

endmodule

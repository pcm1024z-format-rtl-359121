// pcm_channel_decoder: moves received datapackets into the channel memory.
//
// Decoding is a pure address computation. With F the frame parity and
// P1 P0 the packet number within the frame:
//   position target  {FS, 0, P1, P0,  F}
//   delta target     { 0, 0, P1, P0, ~F}
//   B0 target        { 0, 1, 0,  F, P1}   (BFR, ch9, ch10, unused)
// The aux bits of the first packet of a pair (P0 = 0) are B3 B2 and are kept
// for the second packet; those of the second packet are B1 B0. FS is set when
// B3 = 0 (failsafe data injected) and B2 = P0 (B2 selects which packet of the
// pair carries it), so the position goes to the failsafe half of the memory.
// B1 of that pair is then the failsafe mode of channel {P1, B2, F}.
// The delta target is read, moved by the delta jump (clamped to 0..1023) and
// written back.
//
// Packets whose code words or CRC failed are dropped. If the first packet of
// a pair failed, the second packet's position is dropped too, because its
// B3/B2 are unknown; these two rules are this design's choice.
//
// Interface: packet stream from the deframer; memory write ports and read
// bus. half_valid/half_ok pulse one clock after each second packet of a
// pair: half_ok is high when both packets of the pair were good.
// Timing: the write ports are combinational from the one-clock pkt_valid
// pulse, so the memory is updated at the next clock edge.
module pcm_channel_decoder
  import pcm_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        pkt_valid,
  input  datapacket_t pkt,
  input  logic        pkt_ok,
  input  logic [1:0]  pkt_idx,
  input  logic        odd,
  input  pos_t        mem   [NCHNR],
  output logic [2:0]  we,
  output chnr_t       waddr [3],
  output pos_t        wdata [3],
  output logic        fsm_we,
  output logic [2:0]  fsm_idx,
  output logic        fsm_val,
  output logic        half_valid,
  output logic        half_ok
);

  localparam int WP_POS = 0, WP_DELTA = 1, WP_B0 = 2;

  logic       b3_q, b2_q, first_ok_q;
  logic       b3, b2, p1, p0, fs;
  logic signed [POS_W:0] jump;
  pos_t       dnext;

  assign p1 = pkt_idx[1];
  assign p0 = pkt_idx[0];
  assign b3 = p0 ? b3_q : pkt.aux[1];
  assign b2 = p0 ? b2_q : pkt.aux[0];
  assign fs = ~b3 & (b2 == p0);

  pcm_delta_dec u_delta (
    .code   (pkt.delta),
    .pos_in (mem[waddr[WP_DELTA]]),
    .jump,
    .pos_out(dnext)
  );

  always_comb begin
    waddr[WP_POS]   = {fs, 1'b0, p1, p0, odd};
    waddr[WP_DELTA] = {2'b00, p1, p0, ~odd};
    waddr[WP_B0]    = {3'b010, odd, p1};
    wdata[WP_POS]   = pkt.pos;
    wdata[WP_DELTA] = dnext;
    wdata[WP_B0]    = {{(POS_W-1){1'b0}}, pkt.aux[0]};

    we              = '0;
    we[WP_POS]      = pkt_valid && pkt_ok && (!p0 || first_ok_q);
    we[WP_DELTA]    = pkt_valid && pkt_ok;
    we[WP_B0]       = pkt_valid && pkt_ok && p0;

    fsm_we  = pkt_valid && pkt_ok && p0 && first_ok_q && !b3;
    fsm_idx = {p1, b2, odd};
    fsm_val = pkt.aux[1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      b3_q       <= 1'b1;
      b2_q       <= 1'b0;
      first_ok_q <= 1'b0;
      half_valid <= 1'b0;
      half_ok    <= 1'b0;
    end else begin
      half_valid <= 1'b0;
      if (pkt_valid) begin
        if (!p0) begin
          b3_q       <= pkt.aux[1];
          b2_q       <= pkt.aux[0];
          first_ok_q <= pkt_ok;
        end else begin
          half_valid <= 1'b1;
          half_ok    <= first_ok_q && pkt_ok;
        end
      end
    end
  end

endmodule

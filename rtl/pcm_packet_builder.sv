// pcm_packet_builder: source coder of PCM1024Z, the four datapackets of a frame.
//
// Datapacket k of a frame (k = {P1,P0}) carries the absolute position of
// channel {P1,P0,F}+1 and the delta code of its partner channel
// {P1,P0,~F}+1, where F is 1 for odd frames. Channels 1/2, 3/4, 5/6 and 7/8
// therefore swap roles every frame, and each channel gets a position and a
// delta in turn. Aux bits: the first packet of each pair carries B3 B2, the
// second B1 B0. B3 = 1 marks a normal frame. B0 carries a switch channel: BFR
// (even, first pair), ch9 (even, second pair), ch10 (odd, first pair).
//
// With inject set, B3 = 0 and B2 = b2: the position of the first packet of
// each pair (b2 = 0) or of the second (b2 = 1) is replaced by the failsafe
// position of the channel it would have carried, and B1 carries that
// channel's failsafe mode.
//
// The delta is computed against the value the receiver is expected to hold,
// which this block tracks in 'model': a sent position sets it, a sent delta
// moves it by the jump the receiver will apply. A channel whose position slot
// was taken by failsafe data thus catches up through later deltas.
//
// Timing: on build, pkts are registered for the frame described by odd,
// inject and b2; the inputs are sampled in that cycle.
module pcm_packet_builder
  import pcm_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        build,
  input  logic        odd,
  input  logic        inject,
  input  logic        b2,
  input  pos_t        ch_pos  [NPROP],
  input  logic        bfr,
  input  logic        ch9,
  input  logic        ch10,
  input  pos_t        fs_pos  [NPROP],
  input  logic [NPROP-1:0] fs_mode,
  output datapacket_t pkts    [NPKT]
);

  pos_t model [NPROP];

  logic [2:0]           pos_ch   [NPKT];
  logic [2:0]           dlt_ch   [NPKT];
  logic                 pos_fs   [NPKT];
  logic signed [POS_W:0] diff    [NPKT];
  delta_t               dcode    [NPKT];
  logic signed [POS_W:0] djump   [NPKT];
  pos_t                 dnext    [NPKT];
  datapacket_t          nxt      [NPKT];

  for (genvar k = 0; k < NPKT; k++) begin : g_pkt
    pcm_delta_enc u_enc (.diff(diff[k]), .code(dcode[k]));
    pcm_delta_dec u_dec (.code(dcode[k]), .pos_in(model[dlt_ch[k]]), .jump(djump[k]), .pos_out(dnext[k]));
  end

  always_comb begin
    for (int k = 0; k < NPKT; k++) begin
      logic p1, p0;
      p1 = k[1];
      p0 = k[0];
      pos_ch[k] = {p1, p0, odd};
      dlt_ch[k] = {p1, p0, ~odd};
      pos_fs[k] = inject && (b2 == p0);
      diff[k]   = $signed({1'b0, ch_pos[dlt_ch[k]]}) - $signed({1'b0, model[dlt_ch[k]]});

      nxt[k].pos   = pos_fs[k] ? fs_pos[pos_ch[k]] : ch_pos[pos_ch[k]];
      nxt[k].delta = dcode[k];
      if (!p0) begin
        nxt[k].aux = {~inject, inject & b2};                 // B3 B2
      end else begin
        nxt[k].aux[1] = inject & fs_mode[{p1, b2, odd}];     // B1
        unique case ({odd, p1})                              // B0
          2'b00:   nxt[k].aux[0] = bfr;
          2'b01:   nxt[k].aux[0] = ch9;
          2'b10:   nxt[k].aux[0] = ch10;
          default: nxt[k].aux[0] = 1'b0;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NPROP; i++) model[i] <= POS_CENTER;
      for (int k = 0; k < NPKT; k++) pkts[k] <= '0;
    end else if (build) begin
      for (int k = 0; k < NPKT; k++) begin
        pkts[k] <= nxt[k];
        if (!pos_fs[k]) model[pos_ch[k]] <= ch_pos[pos_ch[k]];
        model[dlt_ch[k]] <= dnext[k];
      end
    end
  end

endmodule

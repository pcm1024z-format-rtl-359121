// pcm_channel_mem: channel memory of the PCM1024Z receiver.
//
// 32 entries of 10 bits addressed by a 5-bit channel number (chnr):
//   00000..00111  channels 1..8 (proportional)
//   01000 BFR, 01001 ch9, 01010 ch10 (switches, value in bit 0)
//   01011..01111  unused
//   1xxxx         failsafe positions of the 0xxxx channels
// plus one failsafe mode bit per channel 1..8 (0 normal/hold, 1 preset).
//
// Three write ports serve the three fields of one datapacket (position,
// delta, B0), which always go to three different entries. All entries are
// read in parallel, as servo outputs need them all at once.
//
// Timing: writes take effect at the clock edge; reads are combinational.
// Reset: proportional entries and their failsafe positions to 512 (centre),
// everything else to 0; this reset state is this design's choice.
module pcm_channel_mem
  import pcm_pkg::*;
#(
  parameter int NWR = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [NWR-1:0]   we,
  input  chnr_t            waddr [NWR],
  input  pos_t             wdata [NWR],
  input  logic             fsm_we,
  input  logic [2:0]       fsm_idx,
  input  logic             fsm_val,
  output pos_t             mem   [NCHNR],
  output logic [NPROP-1:0] fs_mode
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int a = 0; a < NCHNR; a++) mem[a] <= (a[3] == 1'b0) ? POS_CENTER : '0;
      fs_mode <= '0;
    end else begin
      for (int p = 0; p < NWR; p++) begin
        if (we[p]) mem[waddr[p]] <= wdata[p];
      end
      if (fsm_we) fs_mode[fsm_idx] <= fsm_val;
    end
  end

  // The write ports of one packet never address the same entry.
  for (genvar p = 0; p < NWR; p++) begin : g_chk
    for (genvar q = p + 1; q < NWR; q++) begin : g_pair
      assert property (@(posedge clk) disable iff (rst)
                       (we[p] && we[q]) |-> (waddr[p] != waddr[q]));
    end
  end

endmodule

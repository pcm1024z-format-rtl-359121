// pcm_6to10_enc: 6to10 line encoder of PCM1024Z.
//
// Every 6-bit chunk of a pcm_packet is replaced by a 10-bit radio word in
// which every run of equal bits is at least two long, so the line never shows
// an isolated 0 or 1. Every word also begins and ends with a run of two or
// more, so the property survives the concatenation of words. No run inside
// the coded data reaches the 18 bits of the sync pulse.
//
// Interface: data6 in, code10 out (bit 9 is sent first). Combinational.
module pcm_6to10_enc
  import pcm_pkg::*;
(
  input  logic [CHUNK_W-1:0] data6,
  output logic [CODE_W-1:0]  code10
);

  assign code10 = CODE6TO10[data6];

endmodule

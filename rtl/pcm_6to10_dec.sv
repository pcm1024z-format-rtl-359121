// pcm_6to10_dec: 6to10 line decoder of PCM1024Z.
//
// Inverts the 6to10 code: the received 10-bit word is compared with all 64
// code words in parallel and the index of the match is the 6-bit chunk. Only
// 64 of the 1024 possible words are code words, so most line errors give a
// word that matches none; valid is then low and data6 is 0.
//
// Interface: code10 in (bit 9 received first), data6 and valid out.
// Combinational.
module pcm_6to10_dec
  import pcm_pkg::*;
(
  input  logic [CODE_W-1:0]  code10,
  output logic [CHUNK_W-1:0] data6,
  output logic               valid
);

  always_comb begin
    data6 = '0;
    valid = 1'b0;
    for (int i = 0; i < 64; i++) begin
      if (code10 == CODE6TO10[i]) begin
        data6 = CHUNK_W'(i);
        valid = 1'b1;
      end
    end
  end

endmodule

// pcm_delta_enc: delta code of a PCM1024Z position difference.
//
// The delta field of a datapacket tells the receiver how far a channel moved
// since the value it holds. The 11-bit signed difference is quantized into
// one of 16 codes with ranges that widen away from zero: -3..4 is code 8,
// 5..8 is code 9, ... 88 and more is code 15, -116 and less is code 0.
//
// Interface: diff (signed, -1023..1023) in, code out. Combinational.
module pcm_delta_enc
  import pcm_pkg::*;
(
  input  logic signed [POS_W:0] diff,
  output delta_t                code
);

  always_comb begin
    code = '0;
    for (int k = 1; k < 16; k++) begin
      if (int'(diff) >= DELTA_LOW[k]) code = DELTA_W'(k);
    end
  end

endmodule

// pcm_delta_dec: applies a PCM1024Z delta code to a channel position.
//
// Each code stands for a range of differences; the receiver moves by the
// smallest step of that range (code 8 is no move, code 15 is +88, code 0 is
// -116). The result is clamped to the 10-bit position range 0..1023; the
// clamping is this design's choice.
//
// Interface: code and pos_in in; jump (signed) and pos_out out.
// Combinational.
module pcm_delta_dec
  import pcm_pkg::*;
(
  input  delta_t                code,
  input  pos_t                  pos_in,
  output logic signed [POS_W:0] jump,
  output pos_t                  pos_out
);

  int sum;

  always_comb begin
    jump = (POS_W+1)'(DELTA_JUMP[code]);
    sum  = int'(pos_in) + DELTA_JUMP[code];
    if (sum < 0)                   pos_out = '0;
    else if (sum > (1<<POS_W) - 1) pos_out = '1;
    else                           pos_out = POS_W'(sum);
  end

endmodule

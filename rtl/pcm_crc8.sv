// pcm_crc8: 8-bit error detection code of one PCM1024Z datapacket.
//
// The code is the XOR of a fixed 8-bit value for every datapacket bit that is
// 1. This is the same as dividing by x^8+x^6+x^5+x^3+x+1, but the table form
// needs no shift register and settles in one combinational pass.
//
// Interface: data = {aux[1:0], delta[3:0], pos[9:0]}, crc = bits 7..0.
// Timing: purely combinational.
//
// The default table assigns 6B to A1 and 4A to P0, the order in which the
// format is usually given. A second, bit-reversed order (A1 -> 4A, A0 -> 25,
// ...) has also been reported to work with some equipment; REVERSED_TABLE = 1
// selects it. Which order a given receiver expects is not settled.
module pcm_crc8
  import pcm_pkg::*;
#(
  parameter bit REVERSED_TABLE = 1'b0
) (
  input  logic [DATA_W-1:0] data,
  output logic [CRC_W-1:0]  crc
);

  always_comb begin
    crc = '0;
    for (int i = 0; i < DATA_W; i++) begin
      if (data[i]) crc ^= REVERSED_TABLE ? CRC_XOR[DATA_W-1-i] : CRC_XOR[i];
    end
  end

endmodule

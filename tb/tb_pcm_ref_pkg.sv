// tb_pcm_ref_pkg: reference models used by the PCM1024Z testbenches.
//
// These functions compute the expected values independently of the RTL
// modules: the CRC as a bit-serial division by x^8+x^6+x^5+x^3+x+1 (no
// XOR table), the delta code and jump from the ranges written out as
// comparisons, the line property of the 6to10 words, and complete 190-bit
// full frames. Only the 6to10 code table itself is shared with the RTL; its
// contents are checked on their own in tb_pcm_6to10_enc.
package tb_pcm_ref_pkg;
  import pcm_pkg::*;

  // CRC: the datapacket as a polynomial with A1 (bit 15) as the x^0 term and
  // P0 (bit 0) as the x^15 term, multiplied by x^8 and reduced mod g(x).
  // Coefficients are fed highest degree first into a shift register.
  function automatic logic [7:0] crc_ref(logic [15:0] d);
    logic [7:0] r = '0;
    logic fb;
    for (int i = 0; i < 16; i++) begin
      fb = r[7] ^ d[i];
      r  = {r[6:0], 1'b0};
      if (fb) r ^= 8'h6B;
    end
    return r;
  endfunction

  function automatic logic [3:0] delta_code_ref(int d);
    if (d <= -116) return 4'd0;
    if (d <= -88)  return 4'd1;
    if (d <= -64)  return 4'd2;
    if (d <= -44)  return 4'd3;
    if (d <= -28)  return 4'd4;
    if (d <= -16)  return 4'd5;
    if (d <= -8)   return 4'd6;
    if (d <= -4)   return 4'd7;
    if (d <= 4)    return 4'd8;
    if (d <= 8)    return 4'd9;
    if (d <= 16)   return 4'd10;
    if (d <= 28)   return 4'd11;
    if (d <= 44)   return 4'd12;
    if (d <= 64)   return 4'd13;
    if (d <= 87)   return 4'd14;
    return 4'd15;
  endfunction

  function automatic int jump_ref(logic [3:0] c);
    case (c)
      4'd0: return -116;  4'd1: return -88;  4'd2: return -64;  4'd3: return -44;
      4'd4: return -28;   4'd5: return -16;  4'd6: return -8;   4'd7: return -4;
      4'd8: return 0;     4'd9: return 5;    4'd10: return 9;   4'd11: return 17;
      4'd12: return 29;   4'd13: return 45;  4'd14: return 65;  default: return 88;
    endcase
  endfunction

  function automatic int clamp_ref(int v);
    if (v < 0) return 0;
    if (v > 1023) return 1023;
    return v;
  endfunction

  // Every run of equal bits of a 10-bit word is at least two bits long.
  function automatic bit no_isolated(logic [9:0] w);
    int run = 1;
    for (int i = 8; i >= 0; i--) begin
      if (w[i] == w[i+1]) run++;
      else begin
        if (run < 2) return 0;
        run = 1;
      end
    end
    return run >= 2;
  endfunction

  // Full frame, first bit sent in bit 189.
  function automatic logic [189:0] frame_ref(logic [15:0] p0, logic [15:0] p1,
                                             logic [15:0] p2, logic [15:0] p3,
                                             bit odd, bit inv);
    logic [189:0] f;
    logic [15:0]  p [4];
    logic [23:0]  q;
    int           pos;
    p[0] = p0; p[1] = p1; p[2] = p2; p[3] = p3;
    if (odd) f[189 -: 30] = {4'b1100, 18'h3FFFF, 8'b00000011};
    else     f[189 -: 30] = {6'b110000, 18'h3FFFF, 6'b000011};
    pos = 159;
    for (int k = 0; k < 4; k++) begin
      q = {p[k], crc_ref(p[k])};
      for (int w = 0; w < 4; w++) begin
        f[pos -: 10] = CODE6TO10[q[23-6*w -: 6]];
        pos -= 10;
      end
    end
    if (inv) f = ~f;
    return f;
  endfunction

  // Inverse 6to10 lookup; returns -1 for a word that is not a code word.
  function automatic int dec6_ref(logic [9:0] w);
    for (int i = 0; i < 64; i++) if (CODE6TO10[i] == w) return i;
    return -1;
  endfunction

  // Splits the 160 data bits of a (straightened) full frame into datapackets
  // and reports per packet whether all words decode and the CRC matches.
  function automatic void split_frame(logic [189:0] f, output logic [15:0] p [4],
                                      output bit ok [4]);
    logic [23:0] q;
    int c, pos;
    pos = 159;
    for (int k = 0; k < 4; k++) begin
      ok[k] = 1;
      for (int w = 0; w < 4; w++) begin
        c = dec6_ref(f[pos -: 10]);
        if (c < 0) begin ok[k] = 0; c = 0; end
        q[23-6*w -: 6] = 6'(c);
        pos -= 10;
      end
      p[k] = q[23:8];
      if (crc_ref(q[23:8]) != q[7:0]) ok[k] = 0;
    end
  endfunction

endpackage

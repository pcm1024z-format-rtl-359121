// tb_pcm_transmitter: runs the transmit side for 16 frames (BIT_CYCLES = 4,
// first failsafe burst after 2 frames, then every 8). Every frame read off
// the line must have the header of its parity and polarity in the sequence
// even/straight, odd/straight, even/inverted, odd/inverted, four datapackets
// with valid words and CRC, B3 = 0 exactly in the frames of a burst, the
// constant channel positions in normal position fields and the failsafe
// positions where a burst puts them.
module tb_pcm_transmitter;
  import pcm_pkg::*;
  import tb_pcm_ref_pkg::*;

  localparam int B = 4;
  logic clk = 0, rst = 1;
  pos_t ch_pos [NPROP];
  pos_t fs_pos [NPROP];
  logic bfr = 0, ch9 = 1, ch10 = 0, fs_update = 0;
  logic [NPROP-1:0] fs_mode = 8'hA5;
  logic tx_line, frame_start, odd, invert, inject;
  int checks = 0, failures = 0, n_inj = 0, n_inv = 0;

  pcm_transmitter #(.BIT_CYCLES(B), .START_FRAMES(2), .PERIOD_FRAMES(8)) dut (.*);

  always #5 clk = ~clk;

  int POSCH [2][4] = '{'{0, 2, 4, 6}, '{1, 3, 5, 7}};

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [189:0] f;
    logic [15:0]  p [4];
    bit ok [4];
    bit e_odd, e_inv, inj;
    int c;
    for (int i = 0; i < 8; i++) begin
      ch_pos[i] = 10'(100 + 50 * i);
      fs_pos[i] = 10'(900 - 7 * i);
    end
    repeat (3) @(negedge clk);
    rst = 0;
    // frame_start is high in the first cycle after reset; the first bit of the
    // frame is sent B cycles later. Line bits are sampled mid-bit, one bit
    // time apart, without a gap between frames.
    for (int n = 0; n < 16; n++) begin
      repeat (n == 0 ? B + B / 2 : B) @(negedge clk);
      e_odd = n[0];
      e_inv = n[1];
      for (int j = 0; j < 190; j++) begin
        if (j > 0) repeat (B) @(negedge clk);
        f[189 - j] = tx_line;
      end
      if (e_inv) begin f = ~f; n_inv++; end
      checks++;
      if (f[189 -: 30] !== (e_odd ? {4'b1100, 18'h3FFFF, 8'b00000011}
                                  : {6'b110000, 18'h3FFFF, 6'b000011})) begin
        failures++;
        $display("FAIL frame %0d header %b", n, f[189 -: 30]);
      end
      split_frame(f, p, ok);
      inj = !p[0][15];
      if (inj) n_inj++;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (!ok[k]) begin
          failures++;
          $display("FAIL frame %0d packet %0d bad code or CRC", n, k);
        end
        c = POSCH[n % 2][k];
        checks++;
        if (inj && (p[k - k % 2][14] == k[0])) begin
          if (p[k][9:0] !== fs_pos[c] || (k[0] && p[k][15] !== fs_mode[c])) failures++;
        end else if (p[k][9:0] !== ch_pos[c]) begin
          failures++;
          $display("FAIL frame %0d packet %0d position %0d", n, k, p[k][9:0]);
        end
      end
    end
    // bursts at frames 2..5 and 10..13
    checks++;
    if (n_inj != 8 || n_inv != 8) begin
      failures++;
      $display("FAIL %0d injected frames, %0d inverted", n_inj, n_inv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pcm1024z_full: the design at its default parameters (1 MHz clock,
// 150 clocks per bit, 28 500 clocks per frame), transmitter looped back into
// receiver. 220 frames (6.3 s) of random channel moves: a failsafe burst
// requested after the second frame, and the power-on burst 210 frames after
// reset. Every received frame is checked exactly against a model of the
// receiver's contents, the frame period against 190 bits, and the failsafe
// settings at the end.
module tb_pcm1024z_full;
  import pcm_pkg::*;
  import tb_pcm_ref_pkg::*;

  localparam int B = 150;
  localparam int NFRAMES = 220;

  logic clk = 0, rst = 1;
  pos_t tx_ch_pos [NPROP];
  pos_t tx_fs_pos [NPROP];
  logic tx_bfr = 0, tx_ch9 = 1, tx_ch10 = 0, tx_fs_update = 0;
  logic [NPROP-1:0] tx_fs_mode = 8'b1100_1010;
  logic tx_line, tx_frame_start, tx_odd, tx_invert, tx_inject;
  logic rx_line, rx_batt_low = 0;
  pos_t rx_servo [NPROP];
  pos_t rx_fs_pos [NPROP];
  logic [NPROP-1:0] rx_fs_mode;
  logic rx_bfr, rx_ch9, rx_ch10, rx_radio_fs, rx_batt_fs, rx_pkt_good, rx_pkt_bad;

  assign rx_line = tx_line;

  pcm1024z_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_good = 0, n_inject = 0;
  longint cyc = 0, last_start = -1;
  int POSCH [2][4] = '{'{0, 2, 4, 6}, '{1, 3, 5, 7}};
  int DLTCH [2][4] = '{'{1, 3, 5, 7}, '{0, 2, 4, 6}};
  int v [NFRAMES][8];
  bit inj [NFRAMES], b2 [NFRAMES], odd [NFRAMES];
  int rxm [8];

  always @(posedge clk) begin
    cyc++;
    if (rx_pkt_good) n_good++;
  end

  always @(negedge clk) if (tx_frame_start && !rst) begin
    if (last_start > 1) begin
      checks++;
      if (cyc - last_start != 190 * B) failures++;
    end
    last_start = cyc;
  end

  initial begin
    #400000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int inj_run, m, f, c, d;
    inj_run = 0;
    for (int i = 0; i < 8; i++) begin
      tx_ch_pos[i] = 10'd512; tx_fs_pos[i] = 10'(77 * i + 20); rxm[i] = 512;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < NFRAMES; n++) begin
      while (!tx_frame_start) @(negedge clk);
      for (int i = 0; i < 8; i++) v[n][i] = int'(tx_ch_pos[i]);
      inj[n] = tx_inject;
      b2[n] = tx_inject && inj_run >= 2;
      inj_run = tx_inject ? inj_run + 1 : 0;
      if (tx_inject) n_inject++;
      @(negedge clk);
      odd[n] = tx_odd;
      repeat (B + 4) @(negedge clk);
      if (n >= 1) begin
        m = n - 1;
        f = odd[m] ? 1 : 0;
        for (int k = 0; k < 4; k++) begin
          d = DLTCH[f][k];
          rxm[d] = clamp_ref(rxm[d] + jump_ref(delta_code_ref(v[m][d] - rxm[d])));
          c = POSCH[f][k];
          if (!(inj[m] && b2[m] == k[0])) rxm[c] = v[m][c];
        end
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (int'(rx_servo[i]) != rxm[i]) begin
            failures++;
            $display("FAIL frame %0d servo %0d = %0d expected %0d", m, i, rx_servo[i], rxm[i]);
          end
        end
      end
      for (int i = 0; i < 8; i++)
        tx_ch_pos[i] = 10'(clamp_ref(int'(tx_ch_pos[i]) + int'($urandom_range(200)) - 100));
      if (n == 1) begin
        tx_fs_update = 1; @(negedge clk); tx_fs_update = 0;
      end
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (rx_fs_pos[i] !== tx_fs_pos[i] || rx_fs_mode[i] !== tx_fs_mode[i]) failures++;
    end
    checks++;
    if (n_inject != 8 || n_good != 4 * (NFRAMES - 1) || rx_radio_fs || rx_batt_fs || rx_ch9 !== 1'b1) begin
      failures++;
      $display("FAIL inject=%0d good=%0d", n_inject, n_good);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

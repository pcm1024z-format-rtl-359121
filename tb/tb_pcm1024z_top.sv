// tb_pcm1024z_top: end-to-end test, transmitter looped back into receiver
// through a channel model that can flip line bits or cut the link.
// Reduced timing: BIT_CYCLES = 8, power-on failsafe burst after 3 frames,
// period 40 frames, radio failsafe after 4 bad half frames, BFR hold 5000
// clocks.
//
// 46 frames in phases:
//   0..15  random channel moves, small and large (deltas of every size),
//          power-on failsafe burst; every frame checked exactly against a
//          model of what the receiver must hold
//   16..21 constant inputs, single line-bit errors in frames 16 and 17
//   22..25 failsafe burst requested by fs_update with new settings
//   26..33 link cut for six frames (radio failsafe), then restored
//   34..45 battery low (battery failsafe on throttle), BFR pulse suspends
//          it, it returns when the hold time runs out
// Every mechanism is counted and must have happened at least once.
module tb_pcm1024z_top;
  import pcm_pkg::*;
  import tb_pcm_ref_pkg::*;

  localparam int B = 8;
  localparam int NFRAMES = 46;

  logic clk = 0, rst = 1;
  pos_t tx_ch_pos [NPROP];
  pos_t tx_fs_pos [NPROP];
  logic tx_bfr = 0, tx_ch9 = 0, tx_ch10 = 0, tx_fs_update = 0;
  logic [NPROP-1:0] tx_fs_mode = 8'b1010_0110;
  logic tx_line, tx_frame_start, tx_odd, tx_invert, tx_inject;
  logic rx_line, rx_batt_low = 0;
  pos_t rx_servo [NPROP];
  pos_t rx_fs_pos [NPROP];
  logic [NPROP-1:0] rx_fs_mode;
  logic rx_bfr, rx_ch9, rx_ch10, rx_radio_fs, rx_batt_fs, rx_pkt_good, rx_pkt_bad;

  logic flip = 0, cut = 0;
  assign rx_line = cut ? 1'b0 : (tx_line ^ flip);

  pcm1024z_top #(
    .BIT_CYCLES(B), .START_FRAMES(3), .PERIOD_FRAMES(40), .BAD_HALF_FRAMES(4),
    .HALF_FRAME_CYCLES(95 * B), .BFR_HOLD_CYCLES(5000)
  ) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_pos = 0, n_delta = 0, n_big_delta = 0, n_inject = 0, n_fs_update = 0;
  int n_bad_pkt = 0, n_radio_fs = 0, n_batt_fs = 0, n_bfr_reset = 0;
  int n_inverted = 0, n_odd = 0, n_hiccup = 0;
  longint cyc = 0, last_start = -1;

  always @(posedge clk) begin
    cyc++;
    if (rx_pkt_bad) n_bad_pkt++;
  end

  // frame rate: one frame every 190 bit times
  always @(negedge clk) if (tx_frame_start && !rst) begin
    if (last_start > 1) begin
      checks++;
      if (cyc - last_start != 190 * B) begin
        failures++;
        $display("FAIL frame period %0d", cyc - last_start);
      end
    end
    last_start = cyc;
  end

  int POSCH [2][4] = '{'{0, 2, 4, 6}, '{1, 3, 5, 7}};
  int DLTCH [2][4] = '{'{1, 3, 5, 7}, '{0, 2, 4, 6}};

  typedef struct {
    int  v [8];
    bit  odd, inv, inj, b2, ch9, ch10;
  } sent_t;
  sent_t sent [NFRAMES];
  int rxm [8];          // expected receiver contents

  task automatic check_servo(string what, int m);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (int'(rx_servo[i]) != rxm[i]) begin
        failures++;
        $display("FAIL %s frame %0d: servo %0d = %0d expected %0d", what, m, i, rx_servo[i], rxm[i]);
      end
    end
  endtask

  task automatic check_fs_settings(string what);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (rx_fs_pos[i] !== tx_fs_pos[i] || rx_fs_mode[i] !== tx_fs_mode[i]) begin
        failures++;
        $display("FAIL %s: failsafe %0d = %0d/%b", what, i, rx_fs_pos[i], rx_fs_mode[i]);
      end
    end
  endtask

  // Advance the receiver model by one correctly received frame.
  task automatic model_frame(int m);
    int f = sent[m].odd ? 1 : 0;
    int c, d, code;
    for (int k = 0; k < 4; k++) begin
      d = DLTCH[f][k];
      code = delta_code_ref(sent[m].v[d] - rxm[d]);
      if (code != 8) n_delta++;
      if (code == 0 || code == 15) n_big_delta++;
      rxm[d] = clamp_ref(rxm[d] + jump_ref(4'(code)));
      c = POSCH[f][k];
      if (sent[m].inj && sent[m].b2 == k[0]) begin
        if (rxm[c] != sent[m].v[c]) n_hiccup++;
      end else begin
        rxm[c] = sent[m].v[c];
        n_pos++;
      end
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int inj_run = 0;
    for (int i = 0; i < 8; i++) begin
      tx_ch_pos[i] = 10'd512; tx_fs_pos[i] = 10'(50 + 100 * i); rxm[i] = 512;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < NFRAMES; n++) begin
      // frame n is built in this cycle from the current inputs
      while (!tx_frame_start) @(negedge clk);
      for (int i = 0; i < 8; i++) sent[n].v[i] = int'(tx_ch_pos[i]);
      sent[n].ch9 = tx_ch9;
      sent[n].ch10 = tx_ch10;
      sent[n].inj = tx_inject;
      sent[n].b2  = tx_inject && (inj_run >= 2);
      inj_run = tx_inject ? inj_run + 1 : 0;
      @(negedge clk);
      sent[n].odd = tx_odd;
      sent[n].inv = tx_invert;
      if (tx_inject && !sent[n].b2 && !tx_odd) n_inject++;

      // line events inside frame n
      if (n == 16 || n == 17) fork
        begin
          repeat (B * (30 + 50) + B / 2) @(negedge clk);
          flip = 1; repeat (B) @(negedge clk); flip = 0;
        end
      join_none
      if (n == 26) cut = 1;
      if (n == 32) cut = 0;

      // the previous frame has now fully arrived
      repeat (B + 4) @(negedge clk);
      if (n >= 1) begin
        int m;
        m = n - 1;
        if (m <= 15 || (m >= 20 && m <= 25) || m >= 33) begin
          model_frame(m);
          if (m < 34) check_servo("frame", m);
          // switch channels: ch9 travels in even frames, ch10 in odd ones
          checks++;
          if (sent[m].odd ? (rx_ch10 !== sent[m].ch10) : (rx_ch9 !== sent[m].ch9)) begin
            failures++;
            $display("FAIL switch channel after frame %0d", m);
          end
          if (sent[m].inv) n_inverted++;
          if (sent[m].odd) n_odd++;
        end else if (m == 19 || m == 32) begin
          for (int i = 0; i < 8; i++) rxm[i] = sent[m].v[i];
        end
        if (m == 8) check_fs_settings("power-on burst");
        if (m == 26) check_fs_settings("requested burst");
        if (m == 31) begin
          // radio failsafe: preset channels at failsafe position, others hold
          checks++;
          if (!rx_radio_fs) failures++; else n_radio_fs++;
          for (int i = 0; i < 8; i++) begin
            checks++;
            if (int'(rx_servo[i]) != (tx_fs_mode[i] ? int'(tx_fs_pos[i]) : rxm[i])) begin
              failures++;
              $display("FAIL radio failsafe servo %0d = %0d", i, rx_servo[i]);
            end
          end
        end
        if (m == 33) begin
          checks++;
          if (rx_radio_fs) failures++;
        end
        if (m >= 34) begin
          // battery phase: throttle follows its failsafe mode while batt_fs
          checks++;
          if (m == 35 && !rx_batt_fs) failures++;
          if (m == 35 && rx_batt_fs) n_batt_fs++;
          if (m == 38 && rx_batt_fs) failures++;
          if (m == 38 && !rx_batt_fs) n_bfr_reset++;
          if (m == 44 && !rx_batt_fs) failures++;
          for (int i = 0; i < 8; i++) begin
            int e;
            e = rxm[i];
            if (i == 2 && rx_batt_fs) e = tx_fs_mode[2] ? int'(tx_fs_pos[2]) : held_thr;
            checks++;
            if (int'(rx_servo[i]) != e) begin
              failures++;
              $display("FAIL battery phase frame %0d servo %0d = %0d expected %0d", m, i, rx_servo[i], e);
            end
          end
        end
      end

      // inputs for the next frame
      if (n < 15 || (n >= 22 && n < 25) || (n >= 34)) begin
        for (int i = 0; i < 8; i++) begin
          if ($urandom_range(2) == 0)
            tx_ch_pos[i] = 10'($urandom);
          else
            tx_ch_pos[i] = 10'(clamp_ref(int'(tx_ch_pos[i]) + int'($urandom_range(60)) - 30));
        end
        if (n >= 21) tx_ch_pos[2] = 10'd300;   // throttle still from here on
      end
      tx_ch9 = n[2];
      tx_ch10 = n[3];
      if (n == 21) begin
        tx_ch_pos[2] = 10'd300;
        for (int i = 0; i < 8; i++) tx_fs_pos[i] = 10'(1000 - 80 * i);
        tx_fs_mode = 8'b0101_1011;
        tx_fs_update = 1; @(negedge clk); tx_fs_update = 0;
        n_fs_update++;
      end
      if (n == 33) begin
        rx_batt_low = 1;
        held_thr = 300;
      end
      if (n == 36) tx_bfr = 1;
      if (n == 38) tx_bfr = 0;
    end
    // mechanisms
    checks++;
    if (n_pos == 0 || n_delta == 0 || n_big_delta == 0 || n_inject < 2 || n_fs_update == 0 ||
        n_bad_pkt == 0 || n_radio_fs == 0 || n_batt_fs == 0 || n_bfr_reset == 0 ||
        n_inverted == 0 || n_odd == 0 || n_hiccup == 0) begin
      failures++;
    end
    $display("mechanisms: positions=%0d deltas=%0d big_deltas=%0d bursts=%0d fs_update=%0d bad_packets=%0d",
             n_pos, n_delta, n_big_delta, n_inject, n_fs_update, n_bad_pkt);
    $display("            radio_fs=%0d batt_fs=%0d bfr_reset=%0d inverted_frames=%0d odd_frames=%0d catch_up=%0d",
             n_radio_fs, n_batt_fs, n_bfr_reset, n_inverted, n_odd, n_hiccup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int held_thr = 0;
endmodule

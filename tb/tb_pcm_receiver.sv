// tb_pcm_receiver: drives the receive side with line frames built by the
// reference model (BIT_CYCLES = 8, line bits 2 % long). Frames carry fixed
// positions and "no move" deltas, switch channels, then a four-frame
// failsafe burst, then frames with line errors, then silence. Checks the
// servo and switch outputs, the received failsafe settings, the good/bad
// packet counts, and that radio failsafe sets preset channels to their
// failsafe position while normal channels hold.
module tb_pcm_receiver;
  import pcm_pkg::*;
  import tb_pcm_ref_pkg::*;

  localparam int B = 8;
  logic clk = 0, rst = 1, rx_line = 0, batt_low = 0;
  pos_t servo [NPROP];
  pos_t fs_pos [NPROP];
  logic bfr, ch9, ch10, radio_fs, batt_fs, pkt_good, pkt_bad;
  logic [NPROP-1:0] fs_mode;
  int checks = 0, failures = 0, n_good = 0, n_bad = 0;

  pcm_receiver #(.BIT_CYCLES(B), .BAD_HALF_FRAMES(6), .HALF_FRAME_CYCLES(95 * B),
                 .BFR_HOLD_CYCLES(1000)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (pkt_good) n_good++;
    if (pkt_bad) n_bad++;
  end

  int POSCH [2][4] = '{'{0, 2, 4, 6}, '{1, 3, 5, 7}};
  int val [8], fsv [8];
  bit fsm [8];
  bit sw_bfr = 0, sw9 = 1, sw10 = 0;

  // One frame of datapackets as a transmitter sends it (delta code 8: no move).
  function automatic void make_pkts(int f, bit inj, bit b2, output logic [15:0] p [4]);
    for (int k = 0; k < 4; k++) begin
      int c = POSCH[f][k];
      p[k][13:10] = 4'd8;
      p[k][9:0] = (inj && b2 == k[0]) ? 10'(fsv[c]) : 10'(val[c]);
      if (k % 2 == 0) p[k][15:14] = {!inj, inj & b2};
      else p[k][15:14] = {inj & fsm[POSCH[f][b2 ? k : k - 1]],
                          (f == 0) ? ((k == 1) ? sw_bfr : sw9) : ((k == 1) ? sw10 : 1'b0)};
    end
  endfunction

  task automatic send_frame(int n, bit inj, bit b2, int errbit);
    logic [15:0] p [4];
    logic [189:0] fr;
    make_pkts(n % 2, inj, b2, p);
    fr = frame_ref(p[0], p[1], p[2], p[3], n % 2 == 1, (n / 2) % 2 == 1);
    if (errbit >= 0) fr[errbit] = ~fr[errbit];
    for (int j = 189; j >= 0; j--) begin
      rx_line = fr[j];
      repeat (B + (j % 8 == 0 ? 1 : 0)) @(negedge clk);
    end
  endtask

  task automatic expect_servo(string what, bit fs);
    for (int i = 0; i < 8; i++) begin
      int e = (fs && fsm[i]) ? fsv[i] : val[i];
      checks++;
      if (int'(servo[i]) != e) begin
        failures++;
        $display("FAIL %s: servo %0d = %0d expected %0d", what, i, servo[i], e);
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
    int n = 0;
    for (int i = 0; i < 8; i++) begin
      val[i] = 100 + 97 * i; fsv[i] = 1000 - 33 * i; fsm[i] = i[0];
    end
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (40 * B) @(negedge clk);
    repeat (4) begin send_frame(n, 0, 0, -1); n++; end
    repeat (3 * B) @(negedge clk);
    expect_servo("normal", 0);
    checks++;
    if (bfr !== sw_bfr || ch9 !== sw9 || ch10 !== sw10 || radio_fs) begin
      failures++;
      $display("FAIL switches %b%b%b radio_fs=%b", bfr, ch9, ch10, radio_fs);
    end
    // failsafe burst, then one normal frame
    for (int s = 0; s < 4; s++) begin send_frame(n, 1, s >= 2, -1); n++; end
    send_frame(n, 0, 0, -1); n++;
    repeat (3 * B) @(negedge clk);
    expect_servo("after burst", 0);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (int'(fs_pos[i]) != fsv[i] || fs_mode[i] !== fsm[i]) begin
        failures++;
        $display("FAIL failsafe %0d: %0d/%b expected %0d/%b", i, fs_pos[i], fs_mode[i], fsv[i], fsm[i]);
      end
    end
    // line errors: one bit in packet 2 of each frame; those packets must be rejected
    for (int i = 0; i < 8; i++) val[i] = val[i] + 5;
    repeat (2) begin send_frame(n, 0, 0, 159 - 85); n++; end
    repeat (3 * B) @(negedge clk);
    checks++;
    if (n_bad != 2) begin
      failures++;
      $display("FAIL %0d bad packets, expected 2", n_bad);
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      // packet 2 is rejected, and with it the position of packet 3 whose
      // B3/B2 came in packet 2: channels 5..8 keep their old positions
      if (int'(servo[i]) != ((i >= 4) ? val[i] - 5 : val[i])) begin
        failures++;
        $display("FAIL line errors: servo %0d = %0d", i, servo[i]);
      end
    end
    // repair, then silence: radio failsafe after 6 missing half frames
    repeat (2) begin send_frame(n, 0, 0, -1); n++; end
    repeat (3 * B) @(negedge clk);
    expect_servo("repaired", 0);
    repeat (7 * 95 * B) @(negedge clk);
    checks++;
    if (!radio_fs) failures++;
    expect_servo("silence", 1);
    checks++;
    if (n_good != 4 * 13 - 2) begin
      failures++;
      $display("FAIL %0d good packets", n_good);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

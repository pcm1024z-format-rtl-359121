// tb_pcm_packet_builder: builds 200 frames from random channel values (large
// and small moves) with failsafe bursts in between, and compares every
// datapacket with a reference built from the channel assignment tables:
// even frames send positions of 1,3,5,7 and deltas of 2,4,6,8, odd frames
// the reverse; B0 carries BFR, ch9, ch10; injected frames replace the
// selected positions by failsafe positions and carry the modes in B1.
module tb_pcm_packet_builder;
  import pcm_pkg::*;
  import tb_pcm_ref_pkg::*;

  logic clk = 0, rst = 1, build = 0, odd = 0, inject = 0, b2 = 0;
  pos_t ch_pos [NPROP];
  pos_t fs_pos [NPROP];
  logic bfr = 0, ch9 = 0, ch10 = 0;
  logic [NPROP-1:0] fs_mode = '0;
  datapacket_t pkts [NPKT];
  int checks = 0, failures = 0, n_inject = 0, n_delta_big = 0;

  pcm_packet_builder dut (.*);

  always #5 clk = ~clk;

  // Channel numbers (0-based) per frame parity and packet.
  int POSCH [2][4] = '{'{0, 2, 4, 6}, '{1, 3, 5, 7}};
  int DLTCH [2][4] = '{'{1, 3, 5, 7}, '{0, 2, 4, 6}};
  int rx [8];   // what a receiver would hold

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp [4];
    int f, c, d, code, fsch;
    bit sw;
    for (int i = 0; i < 8; i++) begin ch_pos[i] = 512; fs_pos[i] = 0; rx[i] = 512; end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      f = n % 2;
      odd = f[0];
      inject = ((n / 4) % 5 == 3);
      b2 = inject && ((n % 4) >= 2);
      for (int i = 0; i < 8; i++) begin
        if ($urandom_range(3) == 0) ch_pos[i] = 10'($urandom);
        else ch_pos[i] = 10'(clamp_ref(int'(ch_pos[i]) + int'($urandom_range(40)) - 20));
        fs_pos[i] = 10'($urandom);
      end
      fs_mode = 8'($urandom);
      bfr = 1'($urandom); ch9 = 1'($urandom); ch10 = 1'($urandom);
      // reference packets
      for (int k = 0; k < 4; k++) begin
        c = POSCH[f][k];
        d = DLTCH[f][k];
        code = delta_code_ref(int'(ch_pos[d]) - rx[d]);
        if (code == 0 || code == 15) n_delta_big++;
        exp[k][13:10] = 4'(code);
        if (inject && (b2 == k[0])) exp[k][9:0] = fs_pos[c];
        else exp[k][9:0] = ch_pos[c];
        if (k % 2 == 0) exp[k][15:14] = {!inject, inject & b2};
        else begin
          fsch = POSCH[f][b2 ? k : k - 1];
          sw = (f == 0) ? ((k == 1) ? bfr : ch9) : ((k == 1) ? ch10 : 1'b0);
          exp[k][15:14] = {inject & fs_mode[fsch], sw};
        end
      end
      if (inject) n_inject++;
      build = 1; @(negedge clk); build = 0;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (pkts[k] !== exp[k]) begin
          failures++;
          $display("FAIL frame %0d pkt %0d: %h expected %h", n, k, pkts[k], exp[k]);
        end
      end
      // advance the receiver model
      for (int k = 0; k < 4; k++) begin
        c = POSCH[f][k];
        d = DLTCH[f][k];
        if (!(inject && (b2 == k[0]))) rx[c] = ch_pos[c];
        rx[d] = clamp_ref(rx[d] + jump_ref(exp[k][13:10]));
      end
      @(negedge clk);
    end
    checks++;
    if (n_inject == 0 || n_delta_big == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

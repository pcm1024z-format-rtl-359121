// tb_pcm_channel_decoder: 400 frames of random datapackets (random aux bits,
// so normal and injected pairs with B2 = 0 and 1 both occur) with some bad
// packets, decoded into a channel memory. A model written from the channel
// assignment tables (which channel's position, delta and switch each
// packet of an even or odd frame carries, and where injected failsafe data
// goes) is updated alongside and compared after every packet.
module tb_pcm_channel_decoder;
  import pcm_pkg::*;
  import tb_pcm_ref_pkg::*;

  logic clk = 0, rst = 1, pkt_valid = 0, pkt_ok = 0, odd = 0;
  datapacket_t pkt;
  logic [1:0] pkt_idx = '0;
  logic [2:0] we;
  chnr_t waddr [3];
  pos_t  wdata [3];
  logic fsm_we, fsm_val, half_valid, half_ok;
  logic [2:0] fsm_idx;
  pos_t mem [NCHNR];
  logic [NPROP-1:0] fs_mode;

  int model [NCHNR];
  bit model_fsm [NPROP];
  int checks = 0, failures = 0, n_fs = 0, n_fsm = 0, n_halves = 0, n_bad_halves = 0;

  pcm_channel_decoder dut (.*);
  pcm_channel_mem u_mem (.clk, .rst, .we, .waddr, .wdata, .fsm_we, .fsm_idx, .fsm_val,
                         .mem, .fs_mode);

  always #5 clk = ~clk;

  // 0-based channel numbers: position and delta per parity and packet, B0 target
  int POSCH [2][4] = '{'{0, 2, 4, 6}, '{1, 3, 5, 7}};
  int DLTCH [2][4] = '{'{1, 3, 5, 7}, '{0, 2, 4, 6}};
  int SWCH  [2][4] = '{'{-1, 8, -1, 9}, '{-1, 10, -1, 11}};

  always @(negedge clk) if (half_valid) n_halves++;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit b3, b2, first_ok, hok;
    int f, c;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int a = 0; a < NCHNR; a++) model[a] = (a % 16 < 8) ? 512 : 0;
    for (int i = 0; i < NPROP; i++) model_fsm[i] = 0;
    for (int n = 0; n < 400; n++) begin
      f = n % 2;
      for (int k = 0; k < 4; k++) begin
        pkt = 16'($urandom);
        if (k % 2 == 0 && $urandom_range(1)) pkt.aux[1] = 1'b1;   // mostly normal pairs
        pkt_ok = ($urandom_range(9) != 0);
        pkt_idx = 2'(k);
        odd = f[0];
        // model
        if (k % 2 == 0) begin b3 = pkt.aux[1]; b2 = pkt.aux[0]; first_ok = pkt_ok; end
        if (pkt_ok) begin
          if (k % 2 == 0 || first_ok) begin
            c = POSCH[f][k];
            if (!b3 && b2 == k[0]) begin model[16 + c] = pkt.pos; n_fs++; end
            else model[c] = pkt.pos;
          end
          c = DLTCH[f][k];
          model[c] = clamp_ref(model[c] + jump_ref(pkt.delta));
          if (k % 2 == 1) begin
            model[SWCH[f][k]] = pkt.aux[0];
            if (first_ok && !b3) begin
              model_fsm[POSCH[f][b2 ? k : k - 1]] = pkt.aux[1];
              n_fsm++;
            end
          end
        end
        hok = first_ok && pkt_ok;
        pkt_valid = 1; @(negedge clk); pkt_valid = 0;
        if (k % 2 == 1) begin
          checks++;
          if (!half_valid || half_ok !== hok) failures++;
          if (!hok) n_bad_halves++;
        end
        for (int a = 0; a < NCHNR; a++) begin
          checks++;
          if (int'(mem[a]) != model[a]) begin
            failures++;
            $display("FAIL frame %0d pkt %0d entry %0d = %0d expected %0d", n, k, a, mem[a], model[a]);
          end
        end
        for (int i = 0; i < NPROP; i++) begin
          checks++;
          if (fs_mode[i] !== model_fsm[i]) failures++;
        end
        @(negedge clk);
      end
    end
    checks++;
    if (n_fs == 0 || n_fsm == 0 || n_halves != 800 || n_bad_halves == 0) begin
      failures++;
      $display("FAIL coverage fs=%0d fsm=%0d halves=%0d", n_fs, n_fsm, n_halves);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

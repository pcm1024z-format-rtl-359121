// tb_pcm_frame_rx: feeds 24 reference frames bit by bit, in all four
// parity/polarity combinations, with single-bit errors in some packets and a
// corrupted frame code in one frame. Every packet must come out with its
// index, parity, polarity and data; corrupted packets with pkt_ok low; the
// frame with the corrupted code not at all.
module tb_pcm_frame_rx;
  import pcm_pkg::*;
  import tb_pcm_ref_pkg::*;

  typedef struct {
    logic [15:0] pkt;
    bit ok, odd, inv;
    int idx;
  } exp_t;

  logic clk = 0, rst = 1, bit_val = 0, bit_stb = 0;
  logic pkt_valid, pkt_ok, odd, inverted;
  datapacket_t pkt;
  logic [1:0] pkt_idx;
  int checks = 0, failures = 0, n_bad = 0, n_dropped = 0;
  exp_t expq [$];

  pcm_frame_rx dut (.*);

  always #5 clk = ~clk;

  always @(negedge clk) if (pkt_valid) begin
    exp_t e;
    checks++;
    if (expq.size() == 0) begin
      failures++;
      $display("FAIL unexpected packet %h", pkt);
    end else begin
      e = expq.pop_front();
      if ((e.ok && pkt !== e.pkt) || pkt_ok !== e.ok || odd !== e.odd ||
          inverted !== e.inv || int'(pkt_idx) != e.idx) begin
        failures++;
        $display("FAIL packet %h ok=%b idx=%0d odd=%b inv=%b, expected %h ok=%b idx=%0d odd=%b inv=%b",
                 pkt, pkt_ok, pkt_idx, odd, inverted, e.pkt, e.ok, e.idx, e.odd, e.inv);
      end
    end
  end

  task automatic send_bit(bit b);
    bit_val = b; bit_stb = 1;
    @(negedge clk); bit_stb = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [189:0] f;
    logic [15:0] p [4];
    int errbit;
    bit o, inv, drop;
    repeat (3) @(negedge clk);
    rst = 0;
    // some noise-free line activity before the first frame
    for (int i = 0; i < 5; i++) for (int j = 9; j >= 0; j--) send_bit(CODE6TO10[$urandom_range(63)][j]);
    for (int n = 0; n < 24; n++) begin
      o = n[0];
      inv = n[1];
      for (int k = 0; k < 4; k++) p[k] = 16'($urandom);
      f = frame_ref(p[0], p[1], p[2], p[3], o, inv);
      drop = (n == 13);
      if (drop) f[189 - 25] = ~f[189 - 25];   // a zero of the frame code
      errbit = -1;
      if (n % 3 == 2) begin
        errbit = $urandom_range(159);
        f[errbit] = ~f[errbit];
        n_bad++;
      end
      if (drop) n_dropped++;
      else for (int k = 0; k < 4; k++) begin
        exp_t e;
        e.pkt = p[k]; e.odd = o; e.inv = inv; e.idx = k;
        e.ok = !(errbit >= 0 && (159 - errbit) / 40 == k);
        expq.push_back(e);
      end
      for (int j = 189; j >= 0; j--) send_bit(f[j]);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (expq.size() != 0 || n_bad == 0 || n_dropped == 0) begin
      failures++;
      $display("FAIL %0d packets missing", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

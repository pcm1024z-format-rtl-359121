// tb_pcm_bit_sync: sends 3000 bits in runs of 2..18 equal bits, the first
// half 1.6 % slow and the second half 1.6 % fast, each edge moved by up to
// one clock at random, and checks that the recovered bits are exactly the
// bits sent, one check per bit. Without edge realignment the sampling point
// would drift out of the bit over a few runs.
module tb_pcm_bit_sync;
  localparam int B = 16;
  logic clk = 0, rst = 1, rx_line = 0;
  logic bit_val, bit_stb;
  int checks = 0, failures = 0;
  bit sent [$];
  bit got [$];
  bit collect = 0;

  pcm_bit_sync #(.BIT_CYCLES(B)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (collect && bit_stb) got.push_back(bit_val);

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit v;
    int run, diff, q, qsum, start_now, start_next, jit_now, jit_next;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5 * B) @(negedge clk);      // idle line
    v = 1;
    qsum = 0; jit_now = 0;
    while (sent.size() < 3000) begin
      run = $urandom_range(18, 2);
      for (int i = 0; i < run; i++) begin
        rx_line = v;
        if (i == 0 && sent.size() == 0) collect = 1;
        sent.push_back(v);
        // bit length in quarter clocks: 65 (slow) or 63 (fast)
        q = (sent.size() < 1500) ? 4 * B + 1 : 4 * B - 1;
        start_now = qsum / 4;
        qsum += q;
        start_next = qsum / 4;
        jit_next = int'($urandom_range(2)) - 1;
        repeat (start_next + jit_next - start_now - jit_now) @(negedge clk);
        jit_now = jit_next;
      end
      v = !v;
    end
    repeat (3) @(negedge clk);
    collect = 0;
    checks++;
    if (got.size() != sent.size()) begin
      failures++;
      $display("FAIL %0d bits recovered, %0d sent", got.size(), sent.size());
    end
    diff = 0;
    for (int i = 0; i < sent.size(); i++) begin
      checks++;
      if (i >= got.size() || got[i] != sent[i]) begin
        failures++;
        diff++;
      end
    end
    if (diff != 0) $display("FAIL %0d bits differ", diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

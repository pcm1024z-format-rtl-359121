// tb_pcm_frame_tx: sends eight frames of random datapackets with every
// parity/inversion combination and compares each of the 190 line bits with
// a reference frame (preamble, sync, frame code, CRC by polynomial division,
// 6to10 words). Also checks that frames follow each other every
// 190 * BIT_CYCLES clocks.
module tb_pcm_frame_tx;
  import pcm_pkg::*;
  import tb_pcm_ref_pkg::*;

  localparam int B = 5;
  logic clk = 0, rst = 1, odd = 0, invert = 0;
  datapacket_t pkts [NPKT];
  logic tx_bit, frame_end;
  int checks = 0, failures = 0, n_end = 0;
  longint cyc = 0, last_end = -1;

  pcm_frame_tx #(.BIT_CYCLES(B)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  always @(negedge clk) if (frame_end) begin
    if (last_end >= 0) begin
      checks++;
      if (cyc - last_end != 190 * B) begin
        failures++;
        $display("FAIL frame period %0d cycles", cyc - last_end);
      end
    end
    last_end = cyc;
    n_end++;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [189:0] exp;
    int bad;
    for (int k = 0; k < 4; k++) pkts[k] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk iff frame_end);
    for (int n = 0; n < 8; n++) begin
      odd = n[0];
      invert = n[1];
      for (int k = 0; k < 4; k++) pkts[k] = 16'($urandom);
      exp = frame_ref(pkts[0], pkts[1], pkts[2], pkts[3], odd, invert);
      bad = 0;
      // bit 0 of this frame is sampled mid-bit: 1.5 bit times after the
      // previous frame's end, i.e. one bit time after its last sample
      repeat (n == 0 ? B + B / 2 : B) @(negedge clk);
      for (int j = 0; j < 190; j++) begin
        if (j > 0) repeat (B) @(negedge clk);
        if (tx_bit !== exp[189 - j]) bad++;
      end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL frame %0d (odd=%b inv=%b): %0d bits differ", n, odd, invert, bad);
      end
    end
    checks++;
    if (n_end < 9) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pcm_nrt_scheduler: 50 frames with START_FRAMES = 5, PERIOD_FRAMES = 20
// and two failsafe-change requests. Expected bursts, worked out by hand:
// power-on at frame 6, request before odd frame 11 at frame 12, request
// during that burst at frame 16, period at frames 26 and 46. Each burst is
// four frames with B2 = 0, 0, 1, 1.
module tb_pcm_nrt_scheduler;
  logic clk = 0, rst = 1, frame_tick = 0, odd = 0, fs_update = 0;
  logic inject, b2;
  int checks = 0, failures = 0, bursts = 0;

  pcm_nrt_scheduler #(.START_FRAMES(5), .PERIOD_FRAMES(20)) dut (.*);

  always #5 clk = ~clk;

  function automatic int burst_step(int n);
    int starts [5] = '{6, 12, 16, 26, 46};
    foreach (starts[i]) if (n >= starts[i] && n < starts[i] + 4) return n - starts[i];
    return -1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 50; n++) begin
      repeat (3) @(negedge clk);
      if (n == 11 || n == 13) begin
        fs_update = 1; @(negedge clk); fs_update = 0;
      end
      odd = n[0];
      #1;
      s = burst_step(n);
      checks++;
      if (inject !== (s >= 0) || (s >= 0 && b2 !== (s >= 2))) begin
        failures++;
        $display("FAIL frame %0d inject=%b b2=%b expected step %0d", n, inject, b2, s);
      end
      if (s == 0) bursts++;
      @(negedge clk); frame_tick = 1; @(negedge clk); frame_tick = 0;
    end
    checks++;
    if (bursts != 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

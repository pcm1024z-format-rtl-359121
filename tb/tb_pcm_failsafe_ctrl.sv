// tb_pcm_failsafe_ctrl: BAD_HALF_FRAMES = 4, HALF_FRAME_CYCLES = 50,
// BFR_HOLD_CYCLES = 200. Checks: good half frames keep live outputs; three
// bad ones do not trigger radio failsafe, the fourth does; in failsafe,
// preset channels show the failsafe position and normal channels hold the
// position from held_exp, whatever the live values do; a good half frame ends
// it; a silent line triggers it after 4 x 50 cycles; battery failsafe acts
// on the throttle only and is suspended for 200 cycles by a BFR 0-to-1.
module tb_pcm_failsafe_ctrl;
  import pcm_pkg::*;

  logic clk = 0, rst = 1, half_valid = 0, half_ok = 0, batt_low = 0, bfr = 0;
  pos_t live [NPROP];
  pos_t fs_pos [NPROP];
  logic [NPROP-1:0] fs_mode = 8'b0101_0110;
  pos_t servo [NPROP];
  logic radio_fs, batt_fs;
  pos_t held_exp [NPROP];
  int checks = 0, failures = 0;

  pcm_failsafe_ctrl #(.BAD_HALF_FRAMES(4), .HALF_FRAME_CYCLES(50), .BFR_HOLD_CYCLES(200)) dut (.*);

  always #5 clk = ~clk;

  task automatic half(bit ok);
    half_valid = 1; half_ok = ok; @(negedge clk); half_valid = 0;
    repeat (10) @(negedge clk);
  endtask

  task automatic expect_out(string what, bit rfs, bit bfs);
    checks++;
    if (radio_fs !== rfs || batt_fs !== bfs) begin
      failures++;
      $display("FAIL %s: radio_fs=%b batt_fs=%b", what, radio_fs, batt_fs);
    end
    for (int i = 0; i < NPROP; i++) begin
      pos_t e;
      bit act = rfs || (bfs && i == 2);
      e = !act ? live[i] : (fs_mode[i] ? fs_pos[i] : held_exp[i]);
      checks++;
      if (servo[i] !== e) begin
        failures++;
        $display("FAIL %s: servo %0d = %0d expected %0d", what, i, servo[i], e);
      end
    end
  endtask

  task automatic new_live();
    for (int i = 0; i < NPROP; i++) live[i] = 10'($urandom);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NPROP; i++) begin live[i] = 10'(30 * i); fs_pos[i] = 10'(1000 - i); end
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) begin half(1); expect_out("good", 0, 0); new_live(); end
    half(1);
    held_exp = live;
    repeat (3) begin half(0); held_exp = live; expect_out("3 bad", 0, 0); end
    half(0);
    new_live();
    @(negedge clk);
    expect_out("4th bad", 1, 0);
    half(0); new_live(); @(negedge clk);
    expect_out("still bad", 1, 0);
    half(1); @(negedge clk);
    expect_out("recovered", 0, 0);
    // silent line
    held_exp = live;
    repeat (4 * 50 - 20) @(negedge clk);
    expect_out("short silence", 0, 0);
    repeat (30) @(negedge clk);
    new_live(); @(negedge clk);
    expect_out("long silence", 1, 0);
    half(1); @(negedge clk);
    expect_out("signal back", 0, 0);
    // battery failsafe on throttle
    repeat (3) half(1);
    held_exp = live;
    batt_low = 1;
    repeat (3) @(negedge clk);
    new_live(); @(negedge clk);
    expect_out("battery low", 0, 1);
    bfr = 1; repeat (3) @(negedge clk);
    new_live(); @(negedge clk);
    expect_out("bfr reset", 0, 0);
    repeat (9) half(1);
    held_exp = live;
    bfr = 0;
    repeat (10) half(1);
    new_live(); @(negedge clk);
    expect_out("bfr expired", 0, 1);
    batt_low = 0; repeat (3) @(negedge clk);
    expect_out("battery ok", 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

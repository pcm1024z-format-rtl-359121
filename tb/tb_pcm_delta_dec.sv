// tb_pcm_delta_dec: every code applied to edge and random positions; checks
// the jump and the clamped result.
module tb_pcm_delta_dec;
  import tb_pcm_ref_pkg::*;

  logic [3:0]         code;
  logic [9:0]         pos_in, pos_out;
  logic signed [10:0] jump;
  int checks = 0, failures = 0;

  pcm_delta_dec dut (.code, .pos_in, .jump, .pos_out);

  task automatic check(int c, int p);
    code = 4'(c); pos_in = 10'(p); #1;
    checks++;
    if (int'(jump) != jump_ref(4'(c)) || int'(pos_out) != clamp_ref(p + jump_ref(4'(c)))) begin
      failures++;
      $display("FAIL code=%0d pos=%0d -> jump=%0d pos=%0d", c, p, jump, pos_out);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      check(c, 0); check(c, 1023); check(c, 512); check(c, 3); check(c, 1020);
      check(c, 100); check(c, 950);
      for (int n = 0; n < 50; n++) check(c, int'($urandom_range(1023)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

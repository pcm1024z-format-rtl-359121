// tb_pcm_delta_enc: every difference from -1023 to 1023 against the code
// ranges written out in the reference model.
module tb_pcm_delta_enc;
  import tb_pcm_ref_pkg::*;

  logic signed [10:0] diff;
  logic [3:0]         code;
  int checks = 0, failures = 0;

  pcm_delta_enc dut (.diff, .code);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = -1023; d <= 1023; d++) begin
      diff = 11'(d); #1;
      checks++;
      if (code !== delta_code_ref(d)) begin
        failures++;
        $display("FAIL diff=%0d code=%0d expected %0d", d, code, delta_code_ref(d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

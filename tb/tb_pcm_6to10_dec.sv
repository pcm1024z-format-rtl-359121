// tb_pcm_6to10_dec: decodes all 1024 words. Exactly 64 must be valid, every
// valid word must re-encode to itself, every invalid one must give 0, and
// every chunk must round-trip through encoder and decoder.
module tb_pcm_6to10_dec;
  logic [9:0] code10, enc_out;
  logic [5:0] data6, enc_in;
  logic       valid;
  int checks = 0, failures = 0, nvalid = 0;

  pcm_6to10_dec dut (.code10, .data6, .valid);
  pcm_6to10_enc u_enc (.data6(enc_in), .code10(enc_out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      enc_in = 6'(i); #1;
      code10 = enc_out; #1;
      checks++;
      if (!valid || data6 !== 6'(i)) begin
        failures++;
        $display("FAIL round trip %0d -> %b -> %0d valid=%b", i, enc_out, data6, valid);
      end
    end
    for (int w = 0; w < 1024; w++) begin
      code10 = 10'(w); #1;
      if (valid) begin
        nvalid++;
        enc_in = data6; #1;
        checks++;
        if (enc_out !== 10'(w)) begin
          failures++;
          $display("FAIL %b decoded to %0d which encodes to %b", 10'(w), data6, enc_out);
        end
      end else begin
        checks++;
        if (data6 !== 6'd0) failures++;
      end
    end
    checks++;
    if (nvalid != 64) begin
      failures++;
      $display("FAIL %0d valid words", nvalid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

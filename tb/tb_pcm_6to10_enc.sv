// tb_pcm_6to10_enc: checks the 6to10 code: every word has no isolated bit,
// all 64 words differ, no word is all ones or all zeros, and a few words
// match their published values.
module tb_pcm_6to10_enc;
  import tb_pcm_ref_pkg::*;

  logic [5:0] data6;
  logic [9:0] code10;
  logic [9:0] seen [64];
  int checks = 0, failures = 0;

  pcm_6to10_enc dut (.data6, .code10);

  task automatic expect_code(logic [5:0] d, logic [9:0] w);
    data6 = d; #1;
    checks++;
    if (code10 !== w) begin
      failures++;
      $display("FAIL %h -> %b expected %b", d, code10, w);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      data6 = 6'(i); #1;
      seen[i] = code10;
      checks++;
      if (!no_isolated(code10) || code10 == '0 || code10 == '1) begin
        failures++;
        $display("FAIL word %0d = %b breaks the run rule", i, code10);
      end
      for (int j = 0; j < i; j++) begin
        checks++;
        if (seen[j] == code10) begin
          failures++;
          $display("FAIL words %0d and %0d equal", i, j);
        end
      end
    end
    expect_code(6'h00, 10'b1111111000);
    expect_code(6'h01, 10'b1111110011);
    expect_code(6'h08, 10'b0011111111);
    expect_code(6'h17, 10'b1100110011);
    expect_code(6'h20, 10'b0011000111);
    expect_code(6'h2A, 10'b0001100011);
    expect_code(6'h35, 10'b1111000000);
    expect_code(6'h3F, 10'b0000000111);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

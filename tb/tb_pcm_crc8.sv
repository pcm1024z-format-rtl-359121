// tb_pcm_crc8: checks the table CRC against a bit-serial polynomial division,
// for every single-bit datapacket and 3000 random ones, in both table orders.
module tb_pcm_crc8;
  import tb_pcm_ref_pkg::*;

  logic [15:0] data;
  logic [7:0]  crc, crc_rev;
  int checks = 0, failures = 0;

  pcm_crc8 dut (.data, .crc);
  pcm_crc8 #(.REVERSED_TABLE(1'b1)) dut_rev (.data, .crc(crc_rev));

  function automatic logic [15:0] bitrev16(logic [15:0] v);
    logic [15:0] r;
    for (int i = 0; i < 16; i++) r[i] = v[15-i];
    return r;
  endfunction

  task automatic check(logic [15:0] d);
    data = d;
    #1;
    checks++;
    if (crc !== crc_ref(d)) begin
      failures++;
      $display("FAIL data=%h crc=%h expected %h", d, crc, crc_ref(d));
    end
    checks++;
    if (crc_rev !== crc_ref(bitrev16(d))) begin
      failures++;
      $display("FAIL reversed data=%h crc=%h expected %h", d, crc_rev, crc_ref(bitrev16(d)));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h0000);
    for (int i = 0; i < 16; i++) check(16'h1 << i);
    // Spot values: A1 alone gives 6B, P0 alone gives 4A.
    data = 16'h8000; #1; checks++; if (crc !== 8'h6B) failures++;
    data = 16'h0001; #1; checks++; if (crc !== 8'h4A) failures++;
    for (int n = 0; n < 3000; n++) check(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pcm_channel_mem: reset values, then 2000 cycles of random writes on the
// three ports (always to three different entries) and on the mode bits,
// compared entry by entry with a model array.
module tb_pcm_channel_mem;
  import pcm_pkg::*;

  logic clk = 0, rst = 1;
  logic [2:0] we = '0;
  chnr_t waddr [3];
  pos_t  wdata [3];
  logic fsm_we = 0, fsm_val = 0;
  logic [2:0] fsm_idx = '0;
  pos_t mem [NCHNR];
  logic [NPROP-1:0] fs_mode;
  pos_t model [NCHNR];
  logic [NPROP-1:0] model_fsm;
  int checks = 0, failures = 0;

  pcm_channel_mem dut (.*);

  always #5 clk = ~clk;

  task automatic compare(string what);
    for (int a = 0; a < NCHNR; a++) begin
      checks++;
      if (mem[a] !== model[a]) begin
        failures++;
        $display("FAIL %s entry %0d = %0d expected %0d", what, a, mem[a], model[a]);
      end
    end
    checks++;
    if (fs_mode !== model_fsm) failures++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 3; p++) begin waddr[p] = '0; wdata[p] = '0; end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int a = 0; a < NCHNR; a++) model[a] = (a % 16 < 8) ? 10'd512 : 10'd0;
    model_fsm = '0;
    compare("reset");
    for (int n = 0; n < 2000; n++) begin
      we = 3'($urandom);
      waddr[0] = 5'($urandom);
      waddr[1] = waddr[0] ^ 5'd1;
      waddr[2] = waddr[0] ^ 5'd2;
      for (int p = 0; p < 3; p++) wdata[p] = 10'($urandom);
      fsm_we = 1'($urandom); fsm_idx = 3'($urandom); fsm_val = 1'($urandom);
      @(negedge clk);
      for (int p = 0; p < 3; p++) if (we[p]) model[waddr[p]] = wdata[p];
      if (fsm_we) model_fsm[fsm_idx] = fsm_val;
      compare("write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

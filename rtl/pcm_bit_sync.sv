// pcm_bit_sync: bit clock recovery for the PCM1024Z line.
//
// The line is brought into the clock domain by two flip-flops. A phase
// counter runs from 0 to BIT_CYCLES-1 and is restarted at every edge of the
// line, so each edge marks the start of a bit; the line is sampled when the
// counter passes the middle of the bit. Long runs (up to the 18-bit sync) are
// sampled by the free-running counter between edges. Because the 6to10 code
// has no isolated bits, edges are at least two bit times apart, and small
// rate differences between transmitter and receiver are corrected at every
// edge.
//
// Interface: rx_line in (asynchronous); bit_val and a one-clock bit_stb out.
// Timing: bit_stb comes 2 + BIT_CYCLES/2 clocks after the start of a bit.
module pcm_bit_sync #(
  parameter int unsigned BIT_CYCLES = 150
) (
  input  logic clk,
  input  logic rst,
  input  logic rx_line,
  output logic bit_val,
  output logic bit_stb
);

  localparam int DIV_W = $clog2(BIT_CYCLES);

  logic [2:0]       sync_ff;
  logic [DIV_W-1:0] phase;
  logic             edge_seen;

  assign edge_seen = sync_ff[2] ^ sync_ff[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_ff <= '0;
      phase   <= '0;
      bit_val <= 1'b0;
      bit_stb <= 1'b0;
    end else begin
      sync_ff <= {sync_ff[1:0], rx_line};
      bit_stb <= 1'b0;
      if (edge_seen)                              phase <= DIV_W'(1);
      else if (phase == DIV_W'(BIT_CYCLES - 1))   phase <= '0;
      else                                        phase <= phase + 1'b1;
      if (!edge_seen && phase == DIV_W'(BIT_CYCLES / 2)) begin
        bit_val <= sync_ff[2];
        bit_stb <= 1'b1;
      end
    end
  end

endmodule

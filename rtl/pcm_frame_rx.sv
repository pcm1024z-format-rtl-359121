// pcm_frame_rx: PCM1024Z deframer, line bits to checked datapackets.
//
// Hunting, it counts runs of equal bits. A run of exactly 18 that is ended by
// the opposite bit is a sync: a run of ones starts a straight frame, a run of
// zeros an inverted one, and from then on bits are un-inverted accordingly.
// The frame code follows: four zeros and then 11 mark an even frame, six
// zeros and 11 an odd frame; anything else returns to hunting. Then 160 data
// bits are shifted in. After every 40 bits the four 10-bit words are decoded
// back to 24 bits and the CRC of the 16 data bits is compared with the 8
// received ones; the datapacket is emitted with pkt_ok set only if all four
// words were code words and the CRC matched. After the fourth packet the
// block hunts for the next sync.
//
// Interface: bit_val/bit_stb from the bit recovery. Out: a one-clock
// pkt_valid with pkt, pkt_ok, pkt_idx (P1 P0, 0..3), odd (F) and inverted,
// one clock after the strobe of the packet's last bit.
module pcm_frame_rx
  import pcm_pkg::*;
#(
  parameter bit REVERSED_CRC = 1'b0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        bit_val,
  input  logic        bit_stb,
  output logic        pkt_valid,
  output datapacket_t pkt,
  output logic        pkt_ok,
  output logic [1:0]  pkt_idx,
  output logic        odd,
  output logic        inverted
);

  typedef enum logic [1:0] {HUNT, FCODE, DATA} state_t;

  state_t              state;
  logic                run_val;
  logic [4:0]          run_len;      // saturates at 31
  logic [3:0]          zeros;        // zeros of the frame code
  logic                ones;         // first 1 of the closing 11 seen
  logic [5:0]          dcnt;         // bit within the current packet, 0..39
  logic [1:0]          pidx;
  logic [PKT_BITS-1:0] sr;
  logic                emit;
  logic                b;            // un-inverted bit

  logic [CHUNK_W-1:0]  chunk [NWORD];
  logic [NWORD-1:0]    wvalid;
  logic [PKT_W-1:0]    rx_pkt;
  logic [CRC_W-1:0]    crc_calc;

  for (genvar w = 0; w < NWORD; w++) begin : g_word
    pcm_6to10_dec u_dec (
      .code10(sr[PKT_BITS-1-CODE_W*w -: CODE_W]),
      .data6 (chunk[w]),
      .valid (wvalid[w])
    );
  end
  assign rx_pkt = {chunk[0], chunk[1], chunk[2], chunk[3]};

  pcm_crc8 #(.REVERSED_TABLE(REVERSED_CRC)) u_crc (
    .data(rx_pkt[PKT_W-1 -: DATA_W]),
    .crc (crc_calc)
  );

  assign b = bit_val ^ inverted;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= HUNT;
      run_val   <= 1'b0;
      run_len   <= '0;
      zeros     <= '0;
      ones      <= 1'b0;
      dcnt      <= '0;
      pidx      <= '0;
      sr        <= '0;
      emit      <= 1'b0;
      pkt_valid <= 1'b0;
      pkt       <= '0;
      pkt_ok    <= 1'b0;
      pkt_idx   <= '0;
      odd       <= 1'b0;
      inverted  <= 1'b0;
    end else begin
      pkt_valid <= 1'b0;
      emit      <= 1'b0;
      if (emit) begin
        pkt_valid <= 1'b1;
        pkt       <= rx_pkt[PKT_W-1 -: DATA_W];
        pkt_ok    <= (&wvalid) && (crc_calc == rx_pkt[CRC_W-1:0]);
        pkt_idx   <= pidx;
        pidx      <= pidx + 1'b1;
      end
      if (bit_stb) begin
        unique case (state)
          HUNT: begin
            if (bit_val == run_val) begin
              if (run_len != 5'd31) run_len <= run_len + 1'b1;
            end else begin
              if (run_len == 5'(SYNC_LEN)) begin
                // bit_val is the first frame code bit: a 0 after un-inversion.
                inverted <= ~run_val;
                zeros    <= 4'd1;
                ones     <= 1'b0;
                state    <= FCODE;
              end
              run_val <= bit_val;
              run_len <= 5'd1;
            end
          end
          FCODE: begin
            if (!b) begin
              if (ones || zeros == 4'd6) begin
                state   <= HUNT;
                run_len <= '0;
              end else begin
                zeros <= zeros + 1'b1;
              end
            end else if (!ones) begin
              ones <= 1'b1;
              if (zeros != 4'd4 && zeros != 4'd6) begin
                state   <= HUNT;
                run_len <= '0;
              end
            end else begin
              odd   <= (zeros == 4'd6);
              dcnt  <= '0;
              pidx  <= '0;
              state <= DATA;
            end
          end
          DATA: begin
            sr <= {sr[PKT_BITS-2:0], b};
            if (dcnt == 6'(PKT_BITS - 1)) begin
              dcnt <= '0;
              emit <= 1'b1;
              if (pidx == 2'd3) begin
                state   <= HUNT;
                run_val <= bit_val;
                run_len <= 5'd1;
              end
            end else begin
              dcnt <= dcnt + 1'b1;
            end
          end
          default: state <= HUNT;
        endcase
      end
    end
  end

endmodule

// data_serializer - turns the results of 32 channels into one bitstream.
//
// After every conversion the 32 channel results (32 x 10 = 320 bits) are
// sent out on one line, one bit per clock: a 320:10 word mux picks the
// channel and a 10:1 mux picks the bit, so the 320 bits leave in 320
// cycles, channel 0 first and each result MSB first. sync is high with the
// first bit of channel 0 and marks the frame for the receiver. In the 32
// cycles after the last bit the 320:10 mux is lent to the feature-extraction
// unit: it steps through the channels once more, one per cycle, and each
// result appears on fe_word with its channel number on fe_ch and fe_valid
// high.
//
// The two-step 320:10 then 10:1 mux, the sync output and the sharing of the
// first mux with the feature-extraction unit follow the specification; the
// bit and channel order and the length of the borrowed phase are this
// design's own.
//
// Interface/timing: words holds channel k in bits [10k +: 10] and must stay
// stable for 352 cycles after frame_start (the channel registers only change
// at the end of a conversion). d and sync are registered and start two
// cycles after the frame_start pulse; fe_word/fe_ch/fe_valid follow in
// cycles 322..353 after it (N_CH*W+2 .. N_CH*(W+1)+1). With en low d and sync stay low.
module data_serializer #(
  parameter int unsigned N_CH = 32,
  parameter int unsigned W    = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N_CH*W-1:0]        words,
  input  logic                     frame_start,
  input  logic                     en,
  output logic                     d,
  output logic                     sync,
  output logic [W-1:0]             fe_word,
  output logic [$clog2(N_CH)-1:0]  fe_ch,
  output logic                     fe_valid
);
  localparam int unsigned CW = $clog2(N_CH);
  localparam int unsigned BW = $clog2(W);

  typedef enum logic [1:0] {IDLE, SER, FE} phase_e;

  phase_e          phase;
  logic [CW-1:0]   ch_cnt, ch_sel;
  logic [BW-1:0]   bit_cnt, bit_idx;
  logic [W-1:0]    word;
  logic            bit_val;

  always_comb begin
    ch_sel  = ch_cnt;
    bit_idx = BW'(W - 1) - bit_cnt;   // MSB first
  end

  word_mux #(.N(N_CH), .W(W)) u_mux_word (.din(words), .sel(ch_sel),  .dout(word));
  word_mux #(.N(W),    .W(1)) u_mux_bit  (.din(word),  .sel(bit_idx), .dout(bit_val));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= IDLE;
      ch_cnt  <= '0;
      bit_cnt <= '0;
    end else if (frame_start) begin
      phase   <= SER;
      ch_cnt  <= '0;
      bit_cnt <= '0;
    end else begin
      unique case (phase)
        SER: begin
          if (bit_cnt == BW'(W - 1)) begin
            bit_cnt <= '0;
            if (ch_cnt == CW'(N_CH - 1)) begin
              ch_cnt <= '0;
              phase  <= FE;
            end else begin
              ch_cnt <= ch_cnt + 1'b1;
            end
          end else begin
            bit_cnt <= bit_cnt + 1'b1;
          end
        end
        FE: begin
          if (ch_cnt == CW'(N_CH - 1)) phase <= IDLE;
          else ch_cnt <= ch_cnt + 1'b1;
        end
        default: phase <= IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d          <= 1'b0;
      sync       <= 1'b0;
      fe_word    <= '0;
      fe_ch      <= '0;
      fe_valid   <= 1'b0;
    end else begin
      d          <= en && phase == SER && bit_val;
      sync       <= en && phase == SER && ch_cnt == '0 && bit_cnt == '0;
      fe_word    <= word;
      fe_ch      <= ch_cnt;
      fe_valid   <= phase == FE;
    end
  end
endmodule

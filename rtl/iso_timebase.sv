// iso_timebase: derives the switch's word and control ticks from the bit clock.
//
// The switch runs on one clock, the bit clock of its serial trunks. A word of
// WORD_W bits occupies one word slot; `bit_idx` counts the bit inside the
// slot and `word_en` is high in the slot's last bit cycle, when a whole word
// has been shifted in or out. The control unit acts once every BATCH word
// slots, on `ctrl_tick`, which coincides with the last `word_en` of the batch.
// With the published figures (40-bit words, 8 words per tick, 1 Gb/s) a word
// slot is 40 ns and a control tick 320 ns, i.e. a 3.125 MHz control clock.
module iso_timebase #(
  parameter int unsigned WORD_W = 40,
  parameter int unsigned BATCH  = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  output logic [$clog2(WORD_W)-1:0]   bit_idx,
  output logic                        word_en,
  output logic                        ctrl_tick
);
  localparam int unsigned BW = $clog2(WORD_W);
  localparam int unsigned KW = (BATCH > 1) ? $clog2(BATCH) : 1;

  logic [KW-1:0] word_idx;

  assign word_en   = (bit_idx == BW'(WORD_W-1));
  assign ctrl_tick = word_en && (word_idx == KW'(BATCH-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_idx  <= '0;
      word_idx <= '0;
    end else if (word_en) begin
      bit_idx  <= '0;
      word_idx <= (word_idx == KW'(BATCH-1)) ? '0 : word_idx + 1'b1;
    end else begin
      bit_idx <= bit_idx + 1'b1;
    end
  end
endmodule

// iso_delay_module: programmable delay of an output word stream.
//
// It makes a link's total propagation delay a whole number of cycle periods,
// so that cycles start at the same time at both ends. A dual-port RAM of
// 2**DLY_AW entries holds each word with a status bit (1 = the output was busy
// and the word is real). On every word tick the incoming word is written at
// PCW and the entry at PCR is read; both pointers then advance. PCW starts at
// the Delay register's value and PCR at 0, so a word comes out Delay ticks
// after it went in, plus one tick for the output register. A read entry with
// status 0 is not transmitted.
//
// Writing the Delay register (`dly_we`, host side) restarts both pointers.
// Entries read in the first Delay ticks afterwards hold stale data and are
// reported as status 0. Delay 0 reads the word written in the same tick
// through a bypass. The restart rule, the bypass and the RAM depth are this
// design's own choices.
module iso_delay_module #(
  parameter int unsigned WORD_W = 40,
  parameter int unsigned DLY_AW = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              word_en,
  input  logic [WORD_W-1:0] in_word,
  input  logic              in_valid,
  input  logic              dly_we,
  input  logic [DLY_AW-1:0] dly_val,
  output logic [WORD_W-1:0] out_word,
  output logic              out_valid
);
  localparam int unsigned DEPTH = 1 << DLY_AW;

  logic [WORD_W:0]   ram [DEPTH];   // {status, word}
  logic [DLY_AW-1:0] delay_q, pcw, pcr;
  logic [DLY_AW:0]   primed;        // ticks since restart, saturating at Delay
  logic              ready;
  logic [WORD_W:0]   rd;

  assign ready = (primed >= {1'b0, delay_q});
  assign rd    = (pcw == pcr) ? {in_valid, in_word} : ram[pcr];

  always_ff @(posedge clk) begin
    if (word_en) ram[pcw] <= {in_valid, in_word};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      delay_q   <= '0;
      pcw       <= '0;
      pcr       <= '0;
      primed    <= '0;
      out_word  <= '0;
      out_valid <= 1'b0;
    end else if (dly_we) begin
      delay_q   <= dly_val;
      pcw       <= dly_val;
      pcr       <= '0;
      primed    <= '0;
      out_valid <= 1'b0;
    end else if (word_en) begin
      pcw       <= pcw + 1'b1;
      pcr       <= pcr + 1'b1;
      if (!ready) primed <= primed + 1'b1;
      out_word  <= rd[WORD_W-1:0];
      out_valid <= rd[WORD_W] && ready;
    end
  end
endmodule

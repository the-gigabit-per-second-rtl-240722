// iso_deserializer: serial-to-parallel conversion of one trunk.
//
// Bits arrive MSB first, one per clock, slot-aligned with the local word
// strobe. In the last bit cycle of a slot (`word_en`) the complete word is on
// `word` and `valid` is high if the carrier `ser_en` is high; the caller takes
// the word on that clock edge.
module iso_deserializer #(
  parameter int unsigned WORD_W = 40
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              word_en,
  input  logic              ser_in,
  input  logic              ser_en,
  output logic [WORD_W-1:0] word,
  output logic              valid
);
  logic [WORD_W-2:0] shreg;

  assign word  = {shreg, ser_in};
  assign valid = word_en && ser_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) shreg <= '0;
    else        shreg <= {shreg[WORD_W-3:0], ser_in};
  end
endmodule

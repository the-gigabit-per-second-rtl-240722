// iso_serializer: parallel-to-serial conversion of one trunk.
//
// On `word_en` (last bit cycle of a slot) it loads the word to send and its
// valid flag; during the following slot it drives the word MSB first on
// `ser_out`, one bit per clock, with the carrier `ser_en` high for the whole
// slot if the word is valid. An idle slot has the carrier low and zero data.
module iso_serializer #(
  parameter int unsigned WORD_W = 40
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              word_en,
  input  logic [WORD_W-1:0] word,
  input  logic              valid,
  output logic              ser_out,
  output logic              ser_en
);
  logic [WORD_W-1:0] shreg;

  assign ser_out = shreg[WORD_W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg  <= '0;
      ser_en <= 1'b0;
    end else if (word_en) begin
      shreg  <= valid ? word : '0;
      ser_en <= valid;
    end else begin
      shreg <= {shreg[WORD_W-2:0], 1'b0};
    end
  end
endmodule

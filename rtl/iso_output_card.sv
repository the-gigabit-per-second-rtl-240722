// iso_output_card: output line card of the Isoswitch (delay module followed
// by parallel-to-serial conversion).
//
// A word leaving the fabric on a word tick enters the delay module; Delay+1
// ticks later it is loaded into the serializer and sent, MSB first, in the
// following word slot with the carrier high. A Delay of 0 gives the simplified
// card with only a one-word pipeline stage.
module iso_output_card #(
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
  output logic              ser_out,
  output logic              ser_en
);
  logic [WORD_W-1:0] d_word;
  logic              d_valid;

  iso_delay_module #(.WORD_W(WORD_W), .DLY_AW(DLY_AW)) u_dly (
    .clk, .rst_n, .word_en, .in_word, .in_valid, .dly_we, .dly_val,
    .out_word(d_word), .out_valid(d_valid)
  );

  iso_serializer #(.WORD_W(WORD_W)) u_ser (
    .clk, .rst_n, .word_en, .word(d_word), .valid(d_valid), .ser_out, .ser_en
  );
endmodule

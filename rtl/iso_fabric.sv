// iso_fabric: the Isoswitch switching fabric, a full crossbar.
//
// Every output port has one N_IN:1 multiplexer connected to all input lines.
// The control unit drives each multiplexer's selection lines (`sel`) and an
// enable (`sel_en`); an output carries a valid word when it is enabled and the
// selected input has one. The fabric never looks at the data: switching
// depends only on the current band's configuration. Purely combinational.
module iso_fabric #(
  parameter int unsigned N_IN   = 4,
  parameter int unsigned N_OUT  = 4,
  parameter int unsigned WORD_W = 40,
  localparam int unsigned SW    = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic [N_IN-1:0][WORD_W-1:0]  in_word,
  input  logic [N_IN-1:0]              in_valid,
  input  logic [N_OUT-1:0][SW-1:0]     sel,
  input  logic [N_OUT-1:0]             sel_en,
  output logic [N_OUT-1:0][WORD_W-1:0] out_word,
  output logic [N_OUT-1:0]             out_valid
);
  always_comb begin
    for (int j = 0; j < N_OUT; j++) begin
      out_word[j]  = in_word[sel[j]];
      out_valid[j] = sel_en[j] && in_valid[sel[j]];
    end
  end
endmodule

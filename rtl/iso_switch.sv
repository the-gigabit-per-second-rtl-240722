// iso_switch: the electronic RDMA+ Isochronet switch (Isoswitch).
//
// An Isoswitch never looks inside the frames it carries. Time is divided into
// bands; in each band the routing trees that cross this node fix which inputs
// feed which outputs, and the configuration tables say which input has
// priority. The switch is built from:
//   * N_IN input line cards: serial-to-parallel conversion and an input queue;
//   * the switching fabric: one N_IN:1 word multiplexer per output;
//   * the control unit: configuration memory, band counter, arbitration logic
//     and the grant register that steers the multiplexers;
//   * N_OUT output line cards: programmable delay and parallel-to-serial
//     conversion.
//
// Timing. Everything runs on the trunk bit clock `clk`. A word of WORD_W bits
// fills one word slot (`word_en` marks a slot's last bit), and the control
// unit acts once every BATCH slots (`ctrl_tick`). With the published figures,
// 40-bit words, 8 words per control tick and a 1 GHz bit clock, a slot is
// 40 ns, the control clock 3.125 MHz and each port carries 1 Gb/s.
// A word that arrives while its output is free waits at most one control
// tick (320 ns) in the input queue before it is granted, then takes one slot
// in the output card's register plus Delay slots before it is serialised.
//
// Trunks are slot-aligned to `word_en` (a synchronous network), with a
// carrier line high while a word is on the wire. Attached nodes receive the
// band and cycle start pulses and the current line of the configuration table.
// The host loads tables and per-output Delay values through the ct_* and
// dly_* ports. Slot framing, the carrier line and the sync port format are
// this design's own choices.
module iso_switch
  import iso_pkg::*;
#(
  parameter int unsigned N_IN     = ISO_N_PORTS,
  parameter int unsigned N_OUT    = ISO_N_PORTS,
  parameter int unsigned WORD_W   = ISO_WORD_W,
  parameter int unsigned BATCH    = ISO_BATCH,
  parameter int unsigned EXP_W    = ISO_EXP_W,
  parameter int unsigned CT_AW    = ISO_CT_AW,
  parameter int unsigned INQ_AW   = ISO_INQ_AW,
  parameter int unsigned DLY_AW   = ISO_DLY_AW,
  parameter bit          PRI_OWNS = 1'b0,
  localparam int unsigned OW      = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // trunks
  input  logic [N_IN-1:0]             ser_in,
  input  logic [N_IN-1:0]             ser_en_in,
  output logic [N_OUT-1:0]            ser_out,
  output logic [N_OUT-1:0]            ser_en_out,
  // configuration tables (host)
  input  logic                        ct_we,
  input  logic [CT_AW-1:0]            ct_addr,
  input  logic [N_OUT-1:0][N_IN-1:0]  ct_con,
  input  logic [N_OUT-1:0][N_IN-1:0]  ct_pri,
  input  logic [EXP_W-1:0]            ct_exp,
  input  logic                        ct_bound_we,
  input  logic [CT_AW-1:0]            ct_bound,
  input  logic                        ct_commit,
  output logic                        ct_swap_pending,
  output logic                        running,
  // output delay registers (host)
  input  logic                        dly_we,
  input  logic [OW-1:0]               dly_port,
  input  logic [DLY_AW-1:0]           dly_val,
  // timing and synchronisation for attached nodes
  output logic                        word_en,
  output logic                        ctrl_tick,
  output logic                        sync_cycle,
  output logic                        sync_band,
  output logic [CT_AW-1:0]            band_idx,
  output logic [N_OUT-1:0][N_IN-1:0]  band_con,
  output logic [N_OUT-1:0][N_IN-1:0]  band_pri,
  // statistics
  output logic [N_IN-1:0][15:0]       drop_flush,
  output logic [N_IN-1:0][15:0]       drop_full
);
  localparam int unsigned SW = (N_IN > 1) ? $clog2(N_IN) : 1;

  logic [$clog2(WORD_W)-1:0]          bit_idx;
  logic [N_IN-1:0][WORD_W-1:0]        head;
  logic [N_IN-1:0]                    busy, pop;
  logic                               flush;
  logic [N_OUT-1:0][N_IN-1:0]         grant;
  logic [N_OUT-1:0][SW-1:0]           sel;
  logic [N_OUT-1:0]                   sel_en;
  logic [N_OUT-1:0][WORD_W-1:0]       f_word;
  logic [N_OUT-1:0]                   f_valid;

  iso_timebase #(.WORD_W(WORD_W), .BATCH(BATCH)) u_tb (
    .clk, .rst_n, .bit_idx, .word_en, .ctrl_tick
  );

  // An input is read when any output it is granted to takes its head word;
  // with a multicast tree the same word goes to all those outputs at once.
  always_comb begin
    for (int i = 0; i < N_IN; i++) begin
      pop[i] = 1'b0;
      for (int j = 0; j < N_OUT; j++) pop[i] |= grant[j][i];
    end
  end

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    logic [INQ_AW:0] level;
    iso_input_card #(.WORD_W(WORD_W), .INQ_AW(INQ_AW)) u_card (
      .clk, .rst_n, .word_en,
      .ser_in(ser_in[i]), .ser_en(ser_en_in[i]),
      .pop(pop[i]), .flush,
      .head(head[i]), .busy(busy[i]), .level,
      .drop_flush(drop_flush[i]), .drop_full(drop_full[i])
    );
  end

  iso_control_unit #(
    .N_IN(N_IN), .N_OUT(N_OUT), .EXP_W(EXP_W), .CT_AW(CT_AW), .PRI_OWNS(PRI_OWNS)
  ) u_cu (
    .clk, .rst_n, .ctrl_tick, .busy,
    .host_we(ct_we), .host_addr(ct_addr), .host_con(ct_con), .host_pri(ct_pri),
    .host_exp(ct_exp), .host_bound_we(ct_bound_we), .host_bound(ct_bound),
    .host_commit(ct_commit), .swap_pending(ct_swap_pending), .running,
    .grant, .sel, .sel_en, .flush,
    .band_begin(sync_band), .cycle_begin(sync_cycle), .band_idx, .band_con, .band_pri
  );

  iso_fabric #(.N_IN(N_IN), .N_OUT(N_OUT), .WORD_W(WORD_W)) u_fab (
    .in_word(head), .in_valid(busy), .sel, .sel_en, .out_word(f_word), .out_valid(f_valid)
  );

  for (genvar j = 0; j < N_OUT; j++) begin : g_out
    iso_output_card #(.WORD_W(WORD_W), .DLY_AW(DLY_AW)) u_card (
      .clk, .rst_n, .word_en,
      .in_word(f_word[j]), .in_valid(f_valid[j]),
      .dly_we(dly_we && (dly_port == OW'(j))), .dly_val,
      .ser_out(ser_out[j]), .ser_en(ser_en_out[j])
    );
  end

  logic [N_IN-1:0] lvl_unused;
  for (genvar i = 0; i < N_IN; i++) begin : g_lvl
    assign lvl_unused[i] = ^g_in[i].level;
  end

  logic unused;
  assign unused = ^{bit_idx, lvl_unused};
endmodule

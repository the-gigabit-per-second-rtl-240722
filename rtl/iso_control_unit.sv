// iso_control_unit: the Isoswitch control unit (configuration memory,
// expiration counter, arbitration logic and grant register).
//
// On each control tick (`ctrl_tick`, 320 ns with the published figures):
//   * The Counter holds the control ticks left in the current band. When it
//     reaches its last tick (or no table runs yet) the configuration memory
//     advances to the next CT line, the Counter is loaded with that line's
//     Expiration and `band_begin` (and, on line 0, `cycle_begin`) is raised
//     for one tick. A band therefore lasts Expiration ticks (0 counts as 1).
//   * At a band boundary `flush` goes high in the same cycle: under RDMA+ the
//     words still queued for the old band's trees are discarded, so Busy is
//     taken as 0 for that arbitration.
//   * The arbitration logic is evaluated on the line in effect and the input
//     Busy lines, and its result is stored in the grant register. The register
//     drives the fabric multiplexer selection lines (`sel`, `sel_en`) for the
//     BATCH word slots up to the next tick.
// A 16-bit LFSR stepped on every tick supplies the random start of the
// arbiter's search. The line in effect (`band_con`, `band_pri`, `band_idx`)
// is also registered for the attached nodes' status registers.
// The LFSR and the handling of Expiration 0 are this design's own choices.
module iso_control_unit #(
  parameter int unsigned N_IN     = 4,
  parameter int unsigned N_OUT    = 4,
  parameter int unsigned EXP_W    = 12,
  parameter int unsigned CT_AW    = 8,
  parameter bit          PRI_OWNS = 1'b0,
  localparam int unsigned SW      = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        ctrl_tick,
  input  logic [N_IN-1:0]             busy,
  // host side of the configuration memory
  input  logic                        host_we,
  input  logic [CT_AW-1:0]            host_addr,
  input  logic [N_OUT-1:0][N_IN-1:0]  host_con,
  input  logic [N_OUT-1:0][N_IN-1:0]  host_pri,
  input  logic [EXP_W-1:0]            host_exp,
  input  logic                        host_bound_we,
  input  logic [CT_AW-1:0]            host_bound,
  input  logic                        host_commit,
  output logic                        swap_pending,
  output logic                        running,
  // to the fabric and the line cards
  output logic [N_OUT-1:0][N_IN-1:0]  grant,
  output logic [N_OUT-1:0][SW-1:0]    sel,
  output logic [N_OUT-1:0]            sel_en,
  output logic                        flush,
  // synchronisation signals for attached nodes
  output logic                        band_begin,
  output logic                        cycle_begin,
  output logic [CT_AW-1:0]            band_idx,
  output logic [N_OUT-1:0][N_IN-1:0]  band_con,
  output logic [N_OUT-1:0][N_IN-1:0]  band_pri
);
  logic [EXP_W-1:0]           counter;
  logic                       advance, band_start, cycle_start, bank;
  logic [N_OUT-1:0][N_IN-1:0] cur_con, cur_pri, al_grant;
  logic [EXP_W-1:0]           cur_exp;
  logic [CT_AW-1:0]           pc, cur_idx;
  logic [N_IN-1:0]            al_busy;
  logic [15:0]                lfsr;

  assign advance = ctrl_tick && (counter <= EXP_W'(1));
  assign flush   = advance;
  assign al_busy = advance ? '0 : busy;

  iso_config_mem #(.N_IN(N_IN), .N_OUT(N_OUT), .EXP_W(EXP_W), .CT_AW(CT_AW)) u_cm (
    .clk, .rst_n, .advance,
    .host_we, .host_addr, .host_con, .host_pri, .host_exp,
    .host_bound_we, .host_bound, .host_commit,
    .cur_con, .cur_pri, .cur_exp, .pc, .cur_idx, .bank, .running, .swap_pending,
    .band_start, .cycle_start
  );

  iso_arbiter #(.N_IN(N_IN), .N_OUT(N_OUT), .PRI_OWNS(PRI_OWNS)) u_al (
    .con(cur_con), .pri(cur_pri), .busy(al_busy), .rnd(lfsr[SW-1:0]), .grant(al_grant)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      counter     <= '0;
      grant       <= '0;
      lfsr        <= 16'hACE1;
      band_begin  <= 1'b0;
      cycle_begin <= 1'b0;
      band_idx    <= '0;
      band_con    <= '0;
      band_pri    <= '0;
    end else begin
      band_begin  <= 1'b0;
      cycle_begin <= 1'b0;
      if (ctrl_tick) begin
        grant <= al_grant;
        lfsr  <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
        if (advance) begin
          counter     <= (cur_exp == '0) ? EXP_W'(1) : cur_exp;
          band_begin  <= band_start;
          cycle_begin <= cycle_start;
          band_idx    <= cur_idx;
          band_con    <= cur_con;
          band_pri    <= cur_pri;
        end else begin
          counter <= counter - 1'b1;
        end
      end
    end
  end

  // Grant register to multiplexer selection lines.
  always_comb begin
    for (int j = 0; j < N_OUT; j++) begin
      sel[j]    = '0;
      sel_en[j] = |grant[j];
      for (int i = 0; i < N_IN; i++)
        if (grant[j][i]) sel[j] = SW'(i);
    end
  end

  for (genvar j = 0; j < N_OUT; j++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant[j]))
      else $error("output %0d granted to several inputs", j);
  end

  logic unused;
  assign unused = ^{pc, bank};
endmodule

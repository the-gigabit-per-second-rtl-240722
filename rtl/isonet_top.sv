// isonet_top: an Isochronet node and, beside it, the selection box of the
// all-optical design.
//
// Electronic part: one RDMA+ Isoswitch with an interface card on each port.
// Card k sends into switch input k and receives from switch output k, and
// gets the switch's word strobe, cycle and band pulses, the current band
// number, the outputs input k is connected to in this band and whether it has
// priority. Each card's host register bus and interrupt is a port of the top;
// so are the switch's configuration-table and delay ports, which belong to
// the host that computes band allocations off-line.
//
// Optical part: the selection box stands on its own, with its sensor, filter
// and configuration-table ports brought out; the optical devices around it
// (wavelength multiplexers, broadcast link, tunable receivers and
// transmitters) are not logic. Its band tick is the switch's control tick.
//
// Everything runs on `clk`, the bit clock of the 1 Gb/s trunks; see
// iso_switch for the word and control tick timing.
module isonet_top
  import iso_pkg::*;
#(
  parameter int unsigned N_PORTS = ISO_N_PORTS,
  parameter int unsigned WORD_W  = ISO_WORD_W,
  parameter int unsigned BATCH   = ISO_BATCH,
  parameter int unsigned EXP_W   = ISO_EXP_W,
  parameter int unsigned CT_AW   = ISO_CT_AW,
  parameter int unsigned INQ_AW  = ISO_INQ_AW,
  parameter int unsigned DLY_AW  = ISO_DLY_AW,
  parameter int unsigned BUF_AW  = ISO_BUF_AW,
  parameter int unsigned N_WL    = ISO_N_WL,
  localparam int unsigned PW     = (N_PORTS > 1) ? $clog2(N_PORTS) : 1
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // switch configuration (host)
  input  logic                             ct_we,
  input  logic [CT_AW-1:0]                 ct_addr,
  input  logic [N_PORTS-1:0][N_PORTS-1:0]  ct_con,
  input  logic [N_PORTS-1:0][N_PORTS-1:0]  ct_pri,
  input  logic [EXP_W-1:0]                 ct_exp,
  input  logic                             ct_bound_we,
  input  logic [CT_AW-1:0]                 ct_bound,
  input  logic                             ct_commit,
  output logic                             ct_swap_pending,
  input  logic                             dly_we,
  input  logic [PW-1:0]                    dly_port,
  input  logic [DLY_AW-1:0]                dly_val,
  // switch status
  output logic                             running,
  output logic                             sync_cycle,
  output logic                             sync_band,
  output logic [CT_AW-1:0]                 band_idx,
  output logic [N_PORTS-1:0][15:0]         drop_flush,
  output logic [N_PORTS-1:0][15:0]         drop_full,
  // one host bus per interface card
  input  logic [N_PORTS-1:0][2:0]          bus_addr,
  input  logic [N_PORTS-1:0]               bus_wr,
  input  logic [N_PORTS-1:0][31:0]         bus_wdata,
  output logic [N_PORTS-1:0][31:0]         bus_rdata,
  output logic [N_PORTS-1:0]               irq,
  // optical selection box
  input  logic [N_WL-1:0][N_PORTS-1:0]     sb_sensor,
  output logic [N_WL-1:0][N_PORTS-1:0]     sb_filter_pass,
  output logic [N_WL-1:0]                  sb_collision,
  input  logic                             sb_ct_we,
  input  logic [CT_AW-1:0]                 sb_ct_addr,
  input  logic [N_WL-1:0][N_PORTS-1:0]     sb_ct_con,
  input  logic [N_WL-1:0][N_PORTS-1:0]     sb_ct_pri,
  input  logic [EXP_W-1:0]                 sb_ct_exp,
  input  logic                             sb_ct_bound_we,
  input  logic [CT_AW-1:0]                 sb_ct_bound,
  input  logic                             sb_ct_commit,
  output logic                             sb_ct_swap_pending,
  output logic [CT_AW-1:0]                 sb_band_idx
);
  logic [N_PORTS-1:0]              sw_ser_in, sw_ser_en_in, sw_ser_out, sw_ser_en_out;
  logic                            word_en, ctrl_tick;
  logic [N_PORTS-1:0][N_PORTS-1:0] band_con, band_pri;

  iso_switch #(
    .N_IN(N_PORTS), .N_OUT(N_PORTS), .WORD_W(WORD_W), .BATCH(BATCH), .EXP_W(EXP_W),
    .CT_AW(CT_AW), .INQ_AW(INQ_AW), .DLY_AW(DLY_AW)
  ) u_switch (
    .clk, .rst_n,
    .ser_in(sw_ser_in), .ser_en_in(sw_ser_en_in),
    .ser_out(sw_ser_out), .ser_en_out(sw_ser_en_out),
    .ct_we, .ct_addr, .ct_con, .ct_pri, .ct_exp, .ct_bound_we, .ct_bound, .ct_commit,
    .ct_swap_pending, .running,
    .dly_we, .dly_port, .dly_val,
    .word_en, .ctrl_tick, .sync_cycle, .sync_band, .band_idx, .band_con, .band_pri,
    .drop_flush, .drop_full
  );

  for (genvar k = 0; k < N_PORTS; k++) begin : g_if
    logic [N_PORTS-1:0] dest_mask, pri_mask;
    always_comb begin
      for (int j = 0; j < N_PORTS; j++) begin
        dest_mask[j] = band_con[j][k] | band_pri[j][k];
        pri_mask[j]  = band_pri[j][k];
      end
    end

    iso_interface #(.WORD_W(WORD_W), .N_OUT(N_PORTS), .CT_AW(CT_AW), .BUF_AW(BUF_AW)) u_if (
      .clk, .rst_n,
      .bus_addr(bus_addr[k]), .bus_wr(bus_wr[k]), .bus_wdata(bus_wdata[k]),
      .bus_rdata(bus_rdata[k]), .irq(irq[k]),
      .word_en, .sync_cycle, .sync_band, .cur_band(band_idx),
      .dest_mask, .has_pri(|pri_mask),
      .ser_out(sw_ser_in[k]), .ser_en_out(sw_ser_en_in[k]),
      .ser_in(sw_ser_out[k]), .ser_en_in(sw_ser_en_out[k])
    );
  end

  iso_selection_box #(.N_IN(N_PORTS), .N_WL(N_WL), .EXP_W(EXP_W), .CT_AW(CT_AW)) u_sbox (
    .clk, .rst_n, .tick(ctrl_tick),
    .sensor(sb_sensor), .filter_pass(sb_filter_pass), .collision(sb_collision),
    .ct_we(sb_ct_we), .ct_addr(sb_ct_addr), .ct_con(sb_ct_con), .ct_pri(sb_ct_pri),
    .ct_exp(sb_ct_exp), .ct_bound_we(sb_ct_bound_we), .ct_bound(sb_ct_bound),
    .ct_commit(sb_ct_commit), .ct_swap_pending(sb_ct_swap_pending), .band_idx(sb_band_idx)
  );
endmodule

// iso_selection_box: the electronic selection box of the all-optical RDMA-
// Isochronet switch.
//
// In the optical switch each band has its own wavelength, and all inputs share
// one broadcast link. Each input link runs through the box; a sensor per input
// and wavelength (`sensor[w][i]`) reports light, and a filter at the exit
// (`filter_pass[w][i]`) passes or blocks it. Only one input may feed a
// wavelength into the broadcast link, so the box grants each lit wavelength
// to one input at once and shuts the others: under RDMA- the losers' frames
// are discarded (`collision[w]` is high while a lit input of the band's tree
// is shut; light from an input outside the tree is simply blocked).
//
// The decision uses the arbitration logic of the electronic switch, one
// instance per wavelength, with that wavelength's sensors as Busy and the
// current line of a configuration table (one connection word and one priority
// word per wavelength, stepped through by expiration counts on `tick`) as Con
// and Pri. Priority bands are therefore time-divided as in the electronic
// switch, while contention bands may stay open for the whole cycle.
//
// Several trees may share a band when the box feeds N_BL broadcast links:
// every input reaches every link through its own filter, so a wavelength can
// be reused on separate links. A channel is one (link, wavelength) pair,
// numbered c = link*N_WL + wavelength; each channel has its own CT words,
// arbiter, owner and collision flag, and sees the sensors of its wavelength.
// With the default N_BL = 1 (one tree per band) a channel is a wavelength.
// An input that owns a wavelength keeps it while its light lasts, so an
// accepted frame is not cut, unless the wavelength's priority input lights up:
// that input takes over at once. The decision is combinational, effective in
// the cycle the light is sensed; ownership is held in a register. The holding
// rule and the preemption are this design's own reading of the scheme.
module iso_selection_box
  import iso_pkg::*;
#(
  parameter int unsigned N_IN  = ISO_N_PORTS,
  parameter int unsigned N_WL  = ISO_N_WL,
  parameter int unsigned N_BL  = 1,
  parameter int unsigned EXP_W = ISO_EXP_W,
  parameter int unsigned CT_AW = ISO_CT_AW
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       tick,
  input  logic [N_WL-1:0][N_IN-1:0]       sensor,
  output logic [N_BL*N_WL-1:0][N_IN-1:0]  filter_pass,  // per channel
  output logic [N_BL*N_WL-1:0]            collision,
  // configuration tables (host)
  input  logic                       ct_we,
  input  logic [CT_AW-1:0]           ct_addr,
  input  logic [N_BL*N_WL-1:0][N_IN-1:0]  ct_con,
  input  logic [N_BL*N_WL-1:0][N_IN-1:0]  ct_pri,
  input  logic [EXP_W-1:0]           ct_exp,
  input  logic                       ct_bound_we,
  input  logic [CT_AW-1:0]           ct_bound,
  input  logic                       ct_commit,
  output logic                       ct_swap_pending,
  output logic [CT_AW-1:0]           band_idx
);
  localparam int unsigned RW = (N_IN > 1) ? $clog2(N_IN) : 1;
  localparam int unsigned NC = N_BL * N_WL;   // channels

  logic [NC-1:0][N_IN-1:0]   cur_con, cur_pri, owner, pick;
  logic [EXP_W-1:0]          cur_exp, counter;
  logic                      advance, running, bank, band_start, cycle_start;
  logic [CT_AW-1:0]          pc;
  logic [15:0]               lfsr;

  assign advance = tick && (counter <= EXP_W'(1));

  iso_config_mem #(.N_IN(N_IN), .N_OUT(NC), .EXP_W(EXP_W), .CT_AW(CT_AW)) u_cm (
    .clk, .rst_n, .advance,
    .host_we(ct_we), .host_addr(ct_addr), .host_con(ct_con), .host_pri(ct_pri),
    .host_exp(ct_exp), .host_bound_we(ct_bound_we), .host_bound(ct_bound),
    .host_commit(ct_commit),
    .cur_con, .cur_pri, .cur_exp, .pc, .cur_idx(band_idx), .bank, .running,
    .swap_pending(ct_swap_pending), .band_start, .cycle_start
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      counter <= '0;
      lfsr    <= 16'h1D0F;
    end else begin
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      if (advance)   counter <= (cur_exp == '0) ? EXP_W'(1) : cur_exp;
      else if (tick) counter <= counter - 1'b1;
    end
  end

  for (genvar w = 0; w < NC; w++) begin : g_wl
    logic [N_IN-1:0] lit, lit_pri, held;
    assign lit = sensor[w % N_WL];
    // Fresh decision for this channel from the CT line and the sensors.
    iso_arbiter #(.N_IN(N_IN), .N_OUT(1)) u_al (
      .con(cur_con[w]), .pri(cur_pri[w]), .busy(lit),
      .rnd(RW'(lfsr >> ((2*w) % 15))), .grant(pick[w])
    );
    assign lit_pri = cur_pri[w] & lit;
    // The current owner, if still lit and still allowed in this band.
    assign held    = owner[w] & lit & (cur_con[w] | cur_pri[w]);

    always_comb begin
      if (lit_pri != '0)   filter_pass[w] = pick[w];   // priority input wins
      else if (held != '0) filter_pass[w] = held;
      else                 filter_pass[w] = pick[w];
    end
    assign collision[w] = (lit & (cur_con[w] | cur_pri[w]) & ~filter_pass[w]) != '0;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) owner[w] <= '0;
      else        owner[w] <= filter_pass[w];
    end

    assert property (@(posedge clk) disable iff (!rst_n) $onehot0(filter_pass[w]))
      else $error("channel %0d passed from several inputs", w);
  end

  logic unused;
  assign unused = ^{pc, bank, running, band_start, cycle_start};
endmodule

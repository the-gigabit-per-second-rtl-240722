// iso_interface: Isochronet interface card between a host machine and one
// switch port.
//
// The card has two jobs: moving frames between host and network, and passing
// the switch's synchronisation signals up to the host.
//   * Transmit buffer: the host writes words at its own pace (TXLO, then TXHI,
//     which pushes the word) and sets CONTROL.TX_GO; the card then sends one
//     word per word slot, at the full link rate, until the buffer is empty,
//     and clears TX_GO. The host schedules a frame into a band by waiting for
//     the band-begin event before it sets TX_GO.
//   * Receive buffer: every valid word from the switch is stored; the host
//     reads RXLO/RXHI and writes RXPOP to discard the oldest word.
//   * Events: cycle begin, band begin and data reception set sticky bits in
//     STATUS[2:0] when enabled in CONTROL[2:0]; the host clears them by
//     writing 1s to STATUS. `irq` is high while an event whose interrupt is
//     enabled in CONTROL[6:4] is pending. Without interrupts the host polls
//     STATUS. STATUS also shows the current band number, the outputs this
//     port may send to in the band and whether it has priority.
// The host bus is a simple synchronous 32-bit register port (addresses in
// iso_pkg::if_reg_e); `bus_rdata` follows `bus_addr` combinationally and a
// read has no side effects. The register map, bus and buffer depths are this
// design's own; the serial link follows the switch's slot framing.
module iso_interface
  import iso_pkg::*;
#(
  parameter int unsigned WORD_W = ISO_WORD_W,
  parameter int unsigned N_OUT  = ISO_N_PORTS,
  parameter int unsigned CT_AW  = ISO_CT_AW,
  parameter int unsigned BUF_AW = ISO_BUF_AW
) (
  input  logic              clk,
  input  logic              rst_n,
  // host bus
  input  logic [2:0]        bus_addr,
  input  logic              bus_wr,
  input  logic [31:0]       bus_wdata,
  output logic [31:0]       bus_rdata,
  output logic              irq,
  // synchronisation from the switch
  input  logic              word_en,
  input  logic              sync_cycle,
  input  logic              sync_band,
  input  logic [CT_AW-1:0]  cur_band,
  input  logic [N_OUT-1:0]  dest_mask,
  input  logic              has_pri,
  // serial link to the switch input and from the switch output
  output logic              ser_out,
  output logic              ser_en_out,
  input  logic              ser_in,
  input  logic              ser_en_in
);
  localparam int unsigned HW = WORD_W - 32;

  logic [2:0]        events, ev_en, irq_en;
  logic              tx_go;
  logic [31:0]       tx_lo;
  logic [WORD_W-1:0] tx_head, rx_head, rx_word;
  logic              tx_empty, tx_full, rx_empty, rx_full, tx_ovf, rx_ovf;
  logic [BUF_AW:0]   tx_count, rx_count;
  logic              tx_push, tx_pop, tx_send, rx_valid, rx_pop;
  if_reg_e           addr;

  assign addr    = if_reg_e'(bus_addr);
  assign tx_push = bus_wr && (addr == REG_TXHI);
  assign rx_pop  = bus_wr && (addr == REG_RXPOP);
  assign tx_send = tx_go && !tx_empty;
  assign tx_pop  = tx_send && word_en;

  iso_fifo #(.W(WORD_W), .AW(BUF_AW)) u_txbuf (
    .clk, .rst_n, .flush(1'b0),
    .push(tx_push), .wr_data({bus_wdata[HW-1:0], tx_lo}),
    .pop(tx_pop), .rd_data(tx_head),
    .empty(tx_empty), .full(tx_full), .overflow(tx_ovf), .count(tx_count)
  );

  iso_serializer #(.WORD_W(WORD_W)) u_ser (
    .clk, .rst_n, .word_en, .word(tx_head), .valid(tx_send), .ser_out, .ser_en(ser_en_out)
  );

  iso_deserializer #(.WORD_W(WORD_W)) u_des (
    .clk, .rst_n, .word_en, .ser_in, .ser_en(ser_en_in), .word(rx_word), .valid(rx_valid)
  );

  iso_fifo #(.W(WORD_W), .AW(BUF_AW)) u_rxbuf (
    .clk, .rst_n, .flush(1'b0),
    .push(rx_valid), .wr_data(rx_word),
    .pop(rx_pop), .rd_data(rx_head),
    .empty(rx_empty), .full(rx_full), .overflow(rx_ovf), .count(rx_count)
  );

  // Registers.
  logic [2:0] ev_set, ev_clr;
  assign ev_set = ev_en & {rx_valid, sync_band, sync_cycle};
  assign ev_clr = (bus_wr && addr == REG_STATUS) ? bus_wdata[2:0] : 3'b000;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      events <= '0;
      ev_en  <= '0;
      irq_en <= '0;
      tx_go  <= 1'b0;
      tx_lo  <= '0;
    end else begin
      events <= (events & ~ev_clr) | ev_set;
      if (bus_wr && addr == REG_TXLO) tx_lo <= bus_wdata;
      if (bus_wr && addr == REG_CONTROL) begin
        ev_en  <= bus_wdata[2:0];
        irq_en <= bus_wdata[6:4];
        tx_go  <= bus_wdata[CTL_TX_GO];
      end else if (tx_go && word_en && (tx_empty || (tx_pop && tx_count == 1))) begin
        tx_go <= 1'b0;
      end
    end
  end

  assign irq = |(events & irq_en);

  always_comb begin
    bus_rdata = '0;
    unique case (addr)
      REG_STATUS: begin
        bus_rdata[2:0]                 = events;
        bus_rdata[ST_TX_BUSY]          = tx_go;
        bus_rdata[ST_TX_FULL]          = tx_full;
        bus_rdata[ST_RX_AVAIL]         = !rx_empty;
        bus_rdata[ST_HAS_PRI]          = has_pri;
        bus_rdata[ST_DEST_LSB +: 8]    = 8'(dest_mask);
        bus_rdata[ST_BAND_LSB +: 16]   = 16'(cur_band);
      end
      REG_CONTROL: begin
        bus_rdata[2:0]       = ev_en;
        bus_rdata[6:4]       = irq_en;
        bus_rdata[CTL_TX_GO] = tx_go;
      end
      REG_RXLO:   bus_rdata = rx_head[31:0];
      REG_RXHI:   bus_rdata = 32'(rx_head[WORD_W-1:32]);
      REG_COUNTS: bus_rdata = {16'(rx_count), 16'(tx_count)};
      default:    bus_rdata = '0;
    endcase
  end

  logic unused;
  assign unused = ^{tx_ovf, rx_ovf, rx_full, bus_wdata[31:HW]};
endmodule

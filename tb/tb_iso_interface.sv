// Self-checking testbench for iso_interface (host interface card).
// The card's serial output is looped back to its serial input. The host side
// is driven through the register bus: it enables events and interrupts,
// checks that cycle and band pulses set the sticky events, raise `irq` only
// when enabled and clear on a write of 1s, reads the live band status, writes
// 12 words into the transmit buffer, starts the transmission and checks that
// the words leave at one per word slot (full link rate), come back through
// the receive buffer in order and whole, and raise the reception event.
module tb_iso_interface;
  import iso_pkg::*;
  localparam int W = 40;
  logic clk = 0, rst_n = 0;
  logic [5:0] bit_idx;
  logic word_en, ctrl_tick;
  logic [2:0]  bus_addr = '0;
  logic        bus_wr = 0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic irq, sync_cycle = 0, sync_band = 0, has_pri = 0;
  logic [7:0] cur_band = '0;
  logic [3:0] dest_mask = '0;
  logic ser_out, ser_en_out;
  int checks = 0, failures = 0;

  iso_timebase #(.WORD_W(W), .BATCH(8)) u_tb (.clk, .rst_n, .bit_idx, .word_en, .ctrl_tick);
  iso_interface #(.WORD_W(W), .N_OUT(4), .CT_AW(8), .BUF_AW(8)) dut (
    .clk, .rst_n, .bus_addr, .bus_wr, .bus_wdata, .bus_rdata, .irq,
    .word_en, .sync_cycle, .sync_band, .cur_band, .dest_mask, .has_pri,
    .ser_out, .ser_en_out, .ser_in(ser_out), .ser_en_in(ser_en_out)
  );
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  task automatic wr(if_reg_e a, logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_wr = 1; bus_wdata = d;
    @(negedge clk); bus_wr = 0;
  endtask

  task automatic rd(if_reg_e a, output logic [31:0] d);
    @(negedge clk); bus_addr = a; #1; d = bus_rdata;
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  initial begin
    logic [31:0] r, lo, hi;
    logic [W-1:0] words [12];
    int t0, t1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // events disabled: nothing recorded
    pulse(sync_band);
    rd(REG_STATUS, r); check(r[2:0] == 3'b000 && !irq, "no event while disabled");
    // enable all events, interrupt only on band begin
    wr(REG_CONTROL, 32'h0000_0027);
    rd(REG_CONTROL, r); check(r[2:0] == 3'b111 && r[6:4] == 3'b010, "control readback");
    pulse(sync_cycle);
    rd(REG_STATUS, r); check(r[EV_CYCLE] && !irq, "cycle event, no irq");
    pulse(sync_band);
    rd(REG_STATUS, r); check(r[EV_BAND] && irq, "band event raises irq");
    wr(REG_STATUS, 32'h2); rd(REG_STATUS, r);
    check(!r[EV_BAND] && r[EV_CYCLE] && !irq, "write-1-to-clear band only");
    wr(REG_STATUS, 32'h7);
    // live status
    cur_band = 8'd9; dest_mask = 4'b0101; has_pri = 1;
    rd(REG_STATUS, r);
    check(r[ST_BAND_LSB +: 16] == 16'd9 && r[ST_DEST_LSB +: 4] == 4'b0101 && r[ST_HAS_PRI], "band status");
    // fill the transmit buffer
    foreach (words[k]) begin
      words[k] = {8'($urandom), $urandom};
      wr(REG_TXLO, words[k][31:0]);
      wr(REG_TXHI, 32'(words[k][W-1:32]));
    end
    rd(REG_COUNTS, r); check(r[15:0] == 16'd12 && r[31:16] == 16'd0, "12 words queued");
    rd(REG_STATUS, r); check(!r[EV_RX], "nothing received yet");
    wr(REG_CONTROL, 32'h0000_0107);
    t0 = $time;
    bus_addr = REG_STATUS;   // watch TX busy on the bus until the buffer drains
    @(posedge clk iff !bus_rdata[ST_TX_BUSY]);
    t1 = $time;
    check((t1 - t0) / 10 <= 12 * W + W, $sformatf("sent 12 words in %0d cycles", (t1 - t0) / 10));
    check((t1 - t0) / 10 >= 11 * W, "not faster than one word per slot");
    repeat (3 * W) @(negedge clk);
    rd(REG_STATUS, r); check(r[EV_RX] && r[ST_RX_AVAIL] && !r[ST_TX_BUSY], "reception event");
    rd(REG_COUNTS, r); check(r[31:16] == 16'd12 && r[15:0] == 16'd0, $sformatf("12 words received (%0d)", r[31:16]));
    foreach (words[k]) begin
      rd(REG_RXLO, lo); rd(REG_RXHI, hi);
      check({hi[7:0], lo} == words[k], $sformatf("word %0d: %h exp %h", k, {hi[7:0], lo}, words[k]));
      wr(REG_RXPOP, 0);
    end
    rd(REG_STATUS, r); check(!r[ST_RX_AVAIL], "receive buffer drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

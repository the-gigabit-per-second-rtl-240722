// End-to-end testbench for isonet_top at its default size: a 4x4 Isoswitch
// with 40-bit words, 8 words per control tick, 256-line tables, and an
// interface card with a host on every port; plus the optical selection box.
//
// Four host processes use their cards only through the register bus and the
// band-begin interrupt, as software would. The switch table has two bands:
//   band 0 (4 ticks): hosts 0 and 1 both send to host 2 (contention, more
//                     than fits, so the rest is flushed at band end); host 3
//                     has priority to host 0;
//   band 1 (4 ticks): host 2 multicasts to hosts 1 and 3; output 1 has a
//                     Delay of 2 word slots.
// Each host waits for the band interrupt, reads STATUS to learn the band and
// its destinations, writes a frame and sets TX_GO; receivers drain their RX
// buffers. After three cycles a second table (host 1 to host 0 only) is
// loaded while the switch runs and must take over at a cycle boundary.
// Every received word is checked against the band's trees and for order and
// duplicates, and every sent word must be delivered or counted as dropped.
// The selection box gets a contention and a priority case on its sensors.
// Each mechanism is counted; one that never happens counts as a failure.
module tb_isonet_top;
  import iso_pkg::*;
  localparam int N = 4, W = 40, TICK = 320;
  logic clk = 0, rst_n = 0;
  logic ct_we = 0, ct_bound_we = 0, ct_commit = 0, ct_swap_pending;
  logic [7:0] ct_addr = '0, ct_bound = '0;
  logic [N-1:0][N-1:0] ct_con = '0, ct_pri = '0;
  logic [11:0] ct_exp = '0;
  logic dly_we = 0;
  logic [1:0] dly_port = '0;
  logic [11:0] dly_val = '0;
  logic running, sync_cycle, sync_band;
  logic [7:0] band_idx;
  logic [N-1:0][15:0] drop_flush, drop_full;
  logic [N-1:0][2:0] bus_addr = '0;
  logic [N-1:0] bus_wr = '0;
  logic [N-1:0][31:0] bus_wdata = '0, bus_rdata;
  logic [N-1:0] irq;
  logic [N-1:0][N-1:0] sb_sensor = '0, sb_filter_pass, sb_ct_con = '0, sb_ct_pri = '0;
  logic [N-1:0] sb_collision;
  logic sb_ct_we = 0, sb_ct_bound_we = 0, sb_ct_commit = 0, sb_ct_swap_pending;
  logic [7:0] sb_ct_addr = '0, sb_ct_bound = '0, sb_band_idx;
  logic [11:0] sb_ct_exp = '0;
  int checks = 0, failures = 0;

  isonet_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  // ---- host bus access, one bus per host ----
  task automatic wr(int k, if_reg_e a, logic [31:0] d);
    @(negedge clk); bus_addr[k] = a; bus_wr[k] = 1; bus_wdata[k] = d;
    @(negedge clk); bus_wr[k] = 0;
  endtask
  task automatic rd(int k, if_reg_e a, output logic [31:0] d);
    @(negedge clk); bus_addr[k] = a; #1; d = bus_rdata[k];
  endtask

  // word format: [39:38] sender, [37:36] table, [35:34] band line, [15:0] seq
  int sent [N], seq [N];
  logic [W-1:0] rxd [N][$];
  bit stop = 0;
  int tbl = 0, sent_new = 0;
  int n_band_irq = 0, n_cycle_ev = 0;

  task automatic send_frame(int k, int tb_id, int line, int len);
    for (int n = 0; n < len; n++) begin
      logic [W-1:0] w;
      w = {2'(k), 2'(tb_id), 2'(line), 18'($urandom), 16'(seq[k]++)};
      wr(k, REG_TXLO, w[31:0]);
      wr(k, REG_TXHI, 32'(w[39:32]));
    end
    sent[k] += len;
    if (tb_id == 1) sent_new += len;
    wr(k, REG_CONTROL, 32'h0000_0127);   // all events, band interrupt, TX_GO
  endtask

  task automatic host(int k);
    logic [31:0] st;
    wr(k, REG_CONTROL, 32'h0000_0027);
    while (!stop) begin
      @(negedge clk iff (irq[k] || stop));
      if (stop) break;
      rd(k, REG_STATUS, st);
      wr(k, REG_STATUS, 32'h3);          // clear cycle and band events
      if (k == 0) begin n_band_irq++; if (st[EV_CYCLE]) n_cycle_ev++; end
      // a host sends only where STATUS says its input is connected
      if (tbl == 0) begin
        if (st[ST_BAND_LSB +: 16] == 0 && (k == 0 || k == 1) && st[ST_DEST_LSB + 2]) send_frame(k, 0, 0, 20);
        if (st[ST_BAND_LSB +: 16] == 0 && k == 3 && st[ST_DEST_LSB + 0] && st[ST_HAS_PRI]) send_frame(k, 0, 0, 16);
        if (st[ST_BAND_LSB +: 16] == 1 && k == 2 && st[ST_DEST_LSB + 1] && st[ST_DEST_LSB + 3]) send_frame(k, 0, 1, 12);
      end else if (tbl == 1 && k == 1 && st[ST_DEST_LSB + 0]) begin
        send_frame(k, 1, 0, 20);
      end
    end
  endtask

  task automatic sw_line(int a, logic [N-1:0][N-1:0] c, logic [N-1:0][N-1:0] p, int e);
    @(negedge clk); ct_we = 1; ct_addr = 8'(a); ct_con = c; ct_pri = p; ct_exp = 12'(e);
    @(negedge clk); ct_we = 0;
  endtask
  task automatic sw_commit(int b);
    @(negedge clk); ct_bound_we = 1; ct_bound = 8'(b);
    @(negedge clk); ct_bound_we = 0; ct_commit = 1;
    @(negedge clk); ct_commit = 0;
  endtask

  // ---- selection box scenario ----
  int n_sb_collision = 0, n_sb_preempt = 0;
  task automatic sbox();
    logic [N-1:0] first;
    @(negedge clk); sb_ct_we = 1; sb_ct_addr = 0; sb_ct_exp = 12'd100;
    sb_ct_con = '0; sb_ct_pri = '0; sb_ct_con[0] = 4'b1111; sb_ct_con[2] = 4'b0011; sb_ct_pri[2] = 4'b1000;
    @(negedge clk); sb_ct_we = 0; sb_ct_bound_we = 1; sb_ct_bound = 0;
    @(negedge clk); sb_ct_bound_we = 0; sb_ct_commit = 1;
    @(negedge clk); sb_ct_commit = 0;
    @(negedge clk iff !sb_ct_swap_pending);
    @(negedge clk); sb_sensor[0] = 4'b0110; #1;
    check($onehot(sb_filter_pass[0]) && sb_collision[0], "selection box: one of two contenders passes");
    if (sb_collision[0]) n_sb_collision++;
    first = sb_filter_pass[0];
    repeat (20) @(negedge clk);
    check(sb_filter_pass[0] == first, "selection box: owner kept");
    sb_sensor[0] = '0;
    sb_sensor[2] = 4'b0001; #1;
    check(sb_filter_pass[2] == 4'b0001, "selection box: connected input passes");
    @(negedge clk); sb_sensor[2] = 4'b1001; #1;
    check(sb_filter_pass[2] == 4'b1000, "selection box: priority input preempts");
    if (sb_filter_pass[2] == 4'b1000) n_sb_preempt++;
    @(negedge clk); sb_sensor = '0;
  endtask

  initial begin
    logic [N-1:0][N-1:0] c, p, c2;
    int cycles;
    foreach (sent[i]) begin sent[i] = 0; seq[i] = 0; end
    repeat (5) @(negedge clk);
    rst_n = 1;
    @(negedge clk); dly_we = 1; dly_port = 1; dly_val = 12'd2; @(negedge clk); dly_we = 0;
    c = '0; p = '0; c[2] = 4'b0011; c[0] = 4'b1000; p[0] = 4'b1000;
    sw_line(0, c, p, 4);
    c = '0; p = '0; c[1] = 4'b0100; c[3] = 4'b0100;
    sw_line(1, c, p, 4);
    sw_commit(1);
    sbox();
    fork
      host(0);
      host(1);
      host(2);
      host(3);
    join_none
    // three cycles with the first table
    cycles = 0;
    while (cycles < 3) begin @(posedge clk iff sync_cycle); cycles++; end
    // reload while running
    c2 = '0; c2[0] = 4'b0010;
    sw_line(0, c2, '0, 6);
    sw_commit(0);
    check(ct_swap_pending, "second table pending");
    @(posedge clk iff sync_band);
    check(!sync_cycle && band_idx == 1 && ct_swap_pending, "old table finishes its cycle");
    @(posedge clk iff sync_band);
    check(sync_cycle && band_idx == 0 && !ct_swap_pending, "second table starts at a cycle boundary");
    tbl = 1;
    repeat (3) @(posedge clk iff sync_band);
    tbl = 2;   // no more frames; let the last one finish
    repeat (8 * TICK) @(negedge clk);
    stop = 1;
    repeat (10) @(negedge clk);
    // drain receive buffers (they hold the whole run)
    for (int k = 0; k < N; k++) begin
      logic [31:0] cnt, lo, hi, st;
      rd(k, REG_STATUS, st);
      check(st[EV_RX], $sformatf("reception event at host %0d", k));
      rd(k, REG_COUNTS, cnt);
      for (int n = 0; n < int'(cnt[31:16]); n++) begin
        rd(k, REG_RXLO, lo); rd(k, REG_RXHI, hi);
        rxd[k].push_back({hi[7:0], lo});
        wr(k, REG_RXPOP, 0);
      end
    end
    // ---- checks ----
    begin
      int delivered [N], last [N][N], contend [N], mc [N];
      int n_pri, n_new;
      bit seen [logic [W-1:0]];
      n_pri = 0; n_new = 0;
      foreach (delivered[i]) begin delivered[i] = 0; contend[i] = 0; mc[i] = 0; end
      foreach (last[i, j]) last[i][j] = -1;
      for (int j = 0; j < N; j++) begin
        foreach (rxd[j][n]) begin
          automatic logic [W-1:0] w = rxd[j][n];
          automatic int i = int'(w[39:38]), t = int'(w[37:36]), line = int'(w[35:34]), s = int'(w[15:0]);
          automatic bit ok = (t == 0 && line == 0 && ((j == 2 && i < 2) || (j == 0 && i == 3)))
                          || (t == 0 && line == 1 && i == 2 && (j == 1 || j == 3))
                          || (t == 1 && i == 1 && j == 0);
          check(ok, $sformatf("host %0d got a word of host %0d (table %0d band %0d)", j, i, t, line));
          check(s > last[i][j], $sformatf("order %0d->%0d", i, j));
          last[i][j] = s;
          if (j == 2) contend[i]++;
          if (j == 0 && i == 3) n_pri++;
          if (t == 1) n_new++;
          if (line == 1) mc[j]++;
          if (!(line == 1 && j == 3)) begin
            check(!seen.exists(w), "no duplicates");
            seen[w] = 1; delivered[i]++;
          end
        end
      end
      for (int i = 0; i < N; i++)
        check(delivered[i] + int'(drop_flush[i]) + int'(drop_full[i]) == sent[i],
              $sformatf("host %0d: sent %0d delivered %0d dropped %0d", i, sent[i], delivered[i], drop_flush[i]));
      check(sent[0] > 0 && sent[1] > 0 && sent[2] > 0 && sent[3] > 0, "all hosts sent");
      // mechanisms
      $display("mechanisms: contention %0d/%0d words, flushed %0d, priority %0d, multicast %0d/%0d, reload %0d, band irqs %0d, cycle events %0d, sbox collision %0d preempt %0d",
               contend[0], contend[1], drop_flush[0] + drop_flush[1], n_pri, mc[1], mc[3], n_new, n_band_irq, n_cycle_ev, n_sb_collision, n_sb_preempt);
      check(contend[0] > 0 && contend[1] > 0, "contention: both senders served");
      check(drop_flush[0] + drop_flush[1] > 0, "RDMA+ flush at band end happened");
      check(n_pri == sent[3], "priority flow fully delivered");
      check(mc[1] == mc[3] && mc[1] == sent[2], "multicast delivered to both hosts");
      check(n_new == sent_new && sent_new > 0, $sformatf("second table carried host 1 to host 0 (%0d of %0d)", n_new, sent_new));
      check(n_band_irq > 6 && n_cycle_ev >= 3, "band interrupts and cycle events");
      check(n_sb_collision > 0 && n_sb_preempt > 0, "selection box collision and preemption");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

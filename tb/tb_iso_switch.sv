// Self-checking testbench for iso_switch (the whole electronic Isoswitch at
// its default size: 4x4 ports, 40-bit words, 8 words per control tick).
// Serial sources and receivers written here sit on all trunks. The host loads
// a 2-band table:
//   band 0, 6 ticks: inputs 0 and 1 contend for output 2; input 3 has
//            priority to output 0; input 2 feeds output 3, whose Delay is 3;
//   band 1, 4 ticks: input 0 multicasts to outputs 0 and 1.
// Sources send on the band-begin signal; inputs 0 and 1 offer more than
// output 2 can carry, so the rest must be flushed when the band ends (RDMA+).
// Each word carries its input, band line and sequence number. Checked: band
// lengths in clocks, every word at an output allowed for its input and band,
// per-flow order, no duplicates, multicast copies on both outputs, every word
// either delivered or counted as dropped, both contenders served, latency
// from arrival to departure (3 word slots at best, at most one control tick
// more; plus 3 slots on the delayed output), and a new table loaded while
// running that takes over only at the end of a cycle.
module tb_iso_switch;
  localparam int N = 4, W = 40, BATCH = 8, TICK = W * BATCH;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] ser_in = '0, ser_en_in = '0, ser_out, ser_en_out;
  logic ct_we = 0, ct_bound_we = 0, ct_commit = 0, ct_swap_pending, running;
  logic [7:0] ct_addr = '0, ct_bound = '0, band_idx;
  logic [N-1:0][N-1:0] ct_con = '0, ct_pri = '0, band_con, band_pri;
  logic [11:0] ct_exp = '0;
  logic dly_we = 0;
  logic [1:0] dly_port = '0;
  logic [11:0] dly_val = '0;
  logic word_en, ctrl_tick, sync_cycle, sync_band;
  logic [N-1:0][15:0] drop_flush, drop_full;
  int checks = 0, failures = 0;

  iso_switch dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  // word format: [39:38] input, [37:36] table (0 first, 1 reloaded), [35:34] band line, [15:0] seq
  function automatic logic [W-1:0] mkword(int i, int tbl, int line, int seq);
    return {2'(i), 2'(tbl), 2'(line), 18'($urandom), 16'(seq)};
  endfunction

  // ---- serial sources: slot-aligned, MSB first, carrier high ----
  logic [W-1:0] txq [N][$];
  logic [W-1:0] cur [N];
  logic         cur_v [N];
  int           slot_cnt = 0;       // word strobes seen
  longint       t_done [logic [W-1:0]];
  int           bit_pos = 0;
  always @(posedge clk) begin
    if (!rst_n) bit_pos <= 0;
    else if (word_en) bit_pos <= 0;
    else bit_pos <= bit_pos + 1;
  end
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (bit_pos == 0) begin
        cur_v[i] = 0;
        if (txq[i].size() > 0) begin cur[i] = txq[i].pop_front(); cur_v[i] = 1; end
      end
      ser_en_in[i] = cur_v[i];
      ser_in[i]    = cur_v[i] ? cur[i][W-1-bit_pos] : 1'b0;
      if (cur_v[i] && bit_pos == W-1) t_done[cur[i]] = $time + 5;
    end
  end

  // ---- receivers ----
  logic [W-1:0] rx [N];
  logic         rx_ok [N];
  logic [W-1:0] got [N][$];
  longint       lat [N][$];
  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < N; j++) begin
      rx[j] = {rx[j][W-2:0], ser_out[j]};
      rx_ok[j] = (bit_pos == 0) ? ser_en_out[j] : (rx_ok[j] & ser_en_out[j]);
      if (word_en && rx_ok[j]) begin
        got[j].push_back(rx[j]);
        lat[j].push_back(t_done.exists(rx[j]) ? ($time - t_done[rx[j]]) / 10 : -1);
      end
    end
  end

  // ---- host ----
  task automatic ct_line(int a, logic [N-1:0][N-1:0] c, logic [N-1:0][N-1:0] p, int e);
    @(negedge clk); ct_we = 1; ct_addr = 8'(a); ct_con = c; ct_pri = p; ct_exp = 12'(e);
    @(negedge clk); ct_we = 0;
  endtask
  task automatic ct_finish(int b);
    @(negedge clk); ct_bound_we = 1; ct_bound = 8'(b);
    @(negedge clk); ct_bound_we = 0; ct_commit = 1;
    @(negedge clk); ct_commit = 0;
  endtask

  int sent [N];
  int seq  [N];
  int band_len [2];

  initial begin
    logic [N-1:0][N-1:0] c, p;
    longint tb_prev;
    int bands, cycles;
    int prev_line;
    foreach (sent[i]) begin sent[i] = 0; seq[i] = 0; end
    repeat (5) @(negedge clk);
    rst_n = 1;
    @(negedge clk); dly_we = 1; dly_port = 3; dly_val = 12'd3; @(negedge clk); dly_we = 0;
    c = '0; p = '0; c[2] = 4'b0011; c[0] = 4'b1000; p[0] = 4'b1000; c[3] = 4'b0100;
    ct_line(0, c, p, 6);
    c = '0; p = '0; c[0] = 4'b0001; c[1] = 4'b0001;
    ct_line(1, c, p, 4);
    ct_finish(1);
    bands = 0; cycles = 0; tb_prev = 0; prev_line = -1;
    while (cycles < 4) begin
      @(posedge clk iff sync_band);
      if (bands > 0) begin
        automatic longint len = ($time - tb_prev) / 10;
        check(len == longint'(prev_line == 0 ? 6 : 4) * TICK, $sformatf("band %0d lasted %0d clocks", prev_line, len));
      end
      tb_prev = $time; bands++;
      if (sync_cycle) cycles++;
      prev_line = band_idx;
      @(negedge clk);
      if (band_idx == 0) begin
        for (int k = 0; k < 40; k++) begin
          txq[0].push_back(mkword(0, 0, 0, seq[0]++)); txq[1].push_back(mkword(1, 0, 0, seq[1]++));
        end
        for (int k = 0; k < 30; k++) txq[3].push_back(mkword(3, 0, 0, seq[3]++));
        for (int k = 0; k < 20; k++) txq[2].push_back(mkword(2, 0, 0, seq[2]++));
        sent[0] += 40; sent[1] += 40; sent[3] += 30; sent[2] += 20;
      end else begin
        for (int k = 0; k < 16; k++) txq[0].push_back(mkword(0, 0, 1, seq[0]++));
        sent[0] += 16;
      end
      // stop sending in the last cycle, to reload the table
      if (cycles == 3 && band_idx == 1) break;
    end
    // reload: a single band, input 1 to output 3, loaded while the old table runs
    c = '0; p = '0; c[3] = 4'b0010;
    ct_line(0, c, p, 5);
    ct_finish(0);
    check(ct_swap_pending, "new table pending");
    @(posedge clk iff sync_band);
    check(sync_cycle && band_idx == 0 && band_con == c && !ct_swap_pending, "new table starts with a new cycle");
    @(negedge clk);
    for (int k = 0; k < 20; k++) txq[1].push_back(mkword(1, 1, 0, seq[1]++));
    sent[1] += 20;
    repeat (6 * TICK) @(negedge clk);

    // ---- checks on what arrived ----
    begin
      int delivered [N];
      int n_contend [N];
      int last_seq [N][N];
      bit seen [logic [W-1:0]];
      longint maxlat [N], minlat [N];
      foreach (delivered[i]) begin delivered[i] = 0; n_contend[i] = 0; end
      foreach (last_seq[i, j]) last_seq[i][j] = -1;
      for (int j = 0; j < N; j++) begin
        maxlat[j] = 0; minlat[j] = 1 << 30;
        foreach (got[j][k]) begin
          automatic logic [W-1:0] w = got[j][k];
          automatic int i = w[39:38], tbl = w[37:36], line = w[35:34], s = w[15:0];
          bit ok;
          ok = (tbl == 0 && line == 0 && ((j == 2 && (i == 0 || i == 1)) || (j == 0 && i == 3) || (j == 3 && i == 2)))
            || (tbl == 0 && line == 1 && i == 0 && (j == 0 || j == 1))
            || (tbl == 1 && i == 1 && j == 3);
          checks++;
          if (!ok) begin failures++; $display("FAIL word from input %0d table %0d band %0d at output %0d", i, tbl, line, j); end
          checks++;
          if (s <= last_seq[i][j]) begin failures++; $display("FAIL order input %0d output %0d", i, j); end
          last_seq[i][j] = s;
          if (j == 2) n_contend[i]++;
          if (!(line == 1 && j == 1)) begin
            checks++;
            if (seen.exists(w)) begin failures++; $display("FAIL duplicate word at output %0d", j); end
            seen[w] = 1; delivered[i]++;
          end
          if (lat[j][k] > maxlat[j]) maxlat[j] = lat[j][k];
          if (lat[j][k] >= 0 && lat[j][k] < minlat[j]) minlat[j] = lat[j][k];
        end
      end
      // multicast: each band-1 word of input 0 on output 0 also on output 1
      begin
        int m0 = 0, m1 = 0;
        foreach (got[0][k]) if (got[0][k][35:34] == 1) m0++;
        foreach (got[1][k]) if (got[1][k][35:34] == 1) m1++;
        check(m0 == m1 && m0 == 16 * 3, $sformatf("multicast copies %0d/%0d of %0d", m0, m1, 48));
      end
      for (int i = 0; i < N; i++)
        check(delivered[i] + int'(drop_flush[i]) + int'(drop_full[i]) == sent[i],
              $sformatf("input %0d: sent %0d delivered %0d dropped %0d+%0d", i, sent[i], delivered[i], drop_flush[i], drop_full[i]));
      check(drop_flush[0] + drop_flush[1] > 0, "contention overload flushed at band end");
      check(drop_flush[3] == 0 && drop_flush[2] == 0, "no losses on uncontended trees");
      check(n_contend[0] > 20 && n_contend[1] > 20, $sformatf("both contenders served (%0d, %0d)", n_contend[0], n_contend[1]));
      check(delivered[3] == sent[3], "priority flow fully delivered");
      check(minlat[0] >= 3 * W && maxlat[0] <= TICK + 3 * W,
            $sformatf("latency output 0: %0d..%0d clocks", minlat[0], maxlat[0]));
      // inputs 2 and 3 send in step, so the Delay of output 3 shows exactly
      check(minlat[3] - minlat[0] == 3 * W && maxlat[3] - maxlat[0] == 3 * W,
            $sformatf("delay module adds %0d..%0d clocks", minlat[3] - minlat[0], maxlat[3] - maxlat[0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

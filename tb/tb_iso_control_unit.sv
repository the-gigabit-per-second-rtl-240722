// Self-checking testbench for iso_control_unit.
// A 3-line configuration table (Expiration 3, 5 and 0) is loaded and the
// control tick is given every 4 clocks with random Busy lines. Checked on
// every tick: band and cycle pulses come exactly when a band's Expiration
// count runs out (3, 5 and 1 ticks), `flush` goes with them, the band number
// and configuration shown to attached nodes follow the table, and the grant
// register obeys the arbitration rules (busy priority input first, else one
// busy connected input, else none; nothing in the tick that starts a band)
// with selection lines that match it. It also checks that every contender of
// a contended output is chosen at some point.
module tb_iso_control_unit;
  localparam int N = 4, M = 4, EW = 12, AW = 8;
  logic clk = 0, rst_n = 0, ctrl_tick = 0;
  logic [N-1:0] busy = '0;
  logic host_we = 0, host_bound_we = 0, host_commit = 0;
  logic [AW-1:0] host_addr = '0, host_bound = '0;
  logic [M-1:0][N-1:0] host_con = '0, host_pri = '0;
  logic [EW-1:0] host_exp = '0;
  logic swap_pending, running, flush, band_begin, cycle_begin;
  logic [M-1:0][N-1:0] grant, band_con, band_pri;
  logic [M-1:0][1:0] sel;
  logic [M-1:0] sel_en;
  logic [AW-1:0] band_idx;
  int checks = 0, failures = 0;

  iso_control_unit #(.N_IN(N), .N_OUT(M), .EXP_W(EW), .CT_AW(AW)) dut (.*);
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

  logic [M-1:0][N-1:0] t_con [3], t_pri [3];
  int                  t_len [3] = '{3, 5, 1};
  logic [EW-1:0]       t_exp [3] = '{12'd3, 12'd5, 12'd0};

  initial begin
    int line, left, bands, cycles, hits [N];
    logic [N-1:0] b_prev;
    t_con[0] = '0; t_pri[0] = '0;
    t_con[0][0] = 4'b0011; t_con[0][1] = 4'b1000; t_pri[0][1] = 4'b0100;
    t_con[1] = '0; t_pri[1] = '0; t_con[1][2] = 4'b1111;
    t_con[2] = '0; t_pri[2] = '0; t_con[2][3] = 4'b0010; t_pri[2][0] = 4'b0001;
    foreach (hits[i]) hits[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 3; a++) begin
      @(negedge clk); host_we = 1; host_addr = AW'(a);
      host_con = t_con[a]; host_pri = t_pri[a]; host_exp = t_exp[a];
    end
    @(negedge clk); host_we = 0; host_bound_we = 1; host_bound = 2;
    @(negedge clk); host_bound_we = 0; host_commit = 1;
    @(negedge clk); host_commit = 0;
    line = -1; left = 0; bands = 0; cycles = 0;
    for (int t = 0; t < 400; t++) begin
      bit adv;
      repeat (3) @(negedge clk);
      busy = N'($urandom);
      b_prev = busy;
      ctrl_tick = 1;
      adv = (left <= 1);
      #1;
      check(flush == adv, $sformatf("flush=%b exp %b", flush, adv));
      @(negedge clk); ctrl_tick = 0;
      if (adv) begin
        line = (line + 1) % 3; left = t_len[line];
        bands++; if (line == 0) cycles++;
      end else left--;
      check(band_begin == adv && cycle_begin == (adv && line == 0), $sformatf("pulses band=%b cycle=%b line=%0d", band_begin, cycle_begin, line));
      check(band_idx == AW'(line) && band_con == t_con[line] && band_pri == t_pri[line], "band info");
      for (int j = 0; j < M; j++) begin
        logic [N-1:0] pb, cb;
        pb = t_pri[line][j] & b_prev;
        cb = t_con[line][j] & b_prev;
        checks++;
        if (adv) begin
          if (grant[j] != '0) begin failures++; $display("FAIL grant in band's first tick"); end
        end else if (pb != '0) begin
          if (grant[j] != pb) begin failures++; $display("FAIL priority out %0d grant=%b pri=%b", j, grant[j], pb); end
        end else if (cb != '0) begin
          if (!$onehot(grant[j]) || (grant[j] & ~cb) != '0) begin
            failures++; $display("FAIL contention out %0d grant=%b cand=%b", j, grant[j], cb);
          end
          if (line == 1 && j == 2 && cb == 4'b1111) for (int i = 0; i < N; i++) if (grant[j][i]) hits[i]++;
        end else if (grant[j] != '0) begin
          failures++; $display("FAIL idle out %0d grant=%b", j, grant[j]);
        end
        checks++;
        if (sel_en[j] != (grant[j] != '0) || (sel_en[j] && !grant[j][sel[j]])) begin
          failures++; $display("FAIL selection lines out %0d", j);
        end
      end
    end
    check(bands > 100 && cycles > 30, $sformatf("bands=%0d cycles=%0d", bands, cycles));
    check(hits[0] > 0 && hits[1] > 0 && hits[2] > 0 && hits[3] > 0,
          $sformatf("random choice hits %0d %0d %0d %0d", hits[0], hits[1], hits[2], hits[3]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

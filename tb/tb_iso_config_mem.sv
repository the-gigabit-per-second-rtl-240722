// Self-checking testbench for iso_config_mem (the two tandem CT RAMs, program
// counter, data boundary registers and decision logic).
// It loads a 3-line table, commits it and steps through two cycles, checking
// the line shown before and during each advance, the program counter, the
// wrap at the data boundary and the cycle-start flag. It then loads a 5-line
// table while the first runs and checks that the running table is untouched,
// that the switch-over waits for the end of the cycle, and that the new
// table then runs with its own boundary.
module tb_iso_config_mem;
  localparam int N = 4, M = 4, EW = 12, AW = 8;
  typedef struct packed { logic [M-1:0][N-1:0] con, pri; logic [EW-1:0] exp; } line_t;

  logic clk = 0, rst_n = 0, advance = 0;
  logic host_we = 0, host_bound_we = 0, host_commit = 0;
  logic [AW-1:0] host_addr = '0, host_bound = '0;
  logic [M-1:0][N-1:0] host_con = '0, host_pri = '0, cur_con, cur_pri;
  logic [EW-1:0] host_exp = '0, cur_exp;
  logic [AW-1:0] pc, cur_idx;
  logic bank, running, swap_pending, band_start, cycle_start;
  int checks = 0, failures = 0;

  iso_config_mem #(.N_IN(N), .N_OUT(M), .EXP_W(EW), .CT_AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  function automatic line_t rnd_line();
    line_t l;
    l.con = {$urandom, $urandom};
    l.pri = '0;
    for (int j = 0; j < M; j++) if ($urandom_range(0, 1)) l.pri[j][$urandom_range(0, N-1)] = 1'b1;
    l.exp = EW'($urandom);
    return l;
  endfunction

  task automatic load(line_t t [], int bound);
    foreach (t[a]) begin
      @(negedge clk);
      host_we = 1; host_addr = AW'(a);
      host_con = t[a].con; host_pri = t[a].pri; host_exp = t[a].exp;
    end
    @(negedge clk); host_we = 0; host_bound_we = 1; host_bound = AW'(bound);
    @(negedge clk); host_bound_we = 0; host_commit = 1;
    @(negedge clk); host_commit = 0;
  endtask

  function automatic bit same(line_t l);
    return cur_con == l.con && cur_pri == l.pri && cur_exp == l.exp;
  endfunction

  // One advance: before it, the line at expect_pc is shown; during it, the
  // next line (nxt) is shown; after it pc == nxt.
  task automatic step(line_t lc, int cur, line_t ln, int nxt, bit wrap, string tag);
    @(negedge clk);
    check(same(lc) && pc == AW'(cur), $sformatf("%s: line %0d shown before advance (pc=%0d)", tag, cur, pc));
    advance = 1; #1;
    check(same(ln) && cur_idx == AW'(nxt), $sformatf("%s: line %0d read ahead", tag, nxt));
    check(cycle_start == wrap && band_start, $sformatf("%s: cycle_start=%b exp %b", tag, cycle_start, wrap));
    @(negedge clk); advance = 0;
    check(pc == AW'(nxt), $sformatf("%s: pc=%0d exp %0d", tag, pc, nxt));
  endtask

  initial begin
    line_t a [] = new[3];
    line_t b [] = new[5];
    foreach (a[i]) a[i] = rnd_line();
    foreach (b[i]) b[i] = rnd_line();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!running && cur_con == '0 && cur_pri == '0, "idle after reset");
    // advance without a table: nothing starts
    advance = 1; #1; check(!band_start && cur_con == '0, "no table, no band"); @(negedge clk); advance = 0;
    load(a, 2);
    check(swap_pending && !running, "table A pending");
    // first advance starts table A at line 0
    @(negedge clk); advance = 1; #1;
    check(same(a[0]) && cycle_start, "start: line 0 read ahead");
    @(negedge clk); advance = 0;
    check(running && pc == 0 && !swap_pending, "A running");
    step(a[0], 0, a[1], 1, 0, "A1"); step(a[1], 1, a[2], 2, 0, "A2"); step(a[2], 2, a[0], 0, 1, "A wrap");
    // load B while A runs
    load(b, 4);
    check(swap_pending, "B pending");
    step(a[0], 0, a[1], 1, 0, "A still"); step(a[1], 1, a[2], 2, 0, "A still 2");
    // end of cycle: switch to B
    step(a[2], 2, b[0], 0, 1, "to B");
    check(!swap_pending && bank == 1'b0, "B active (A was loaded into RAM 1, B into RAM 0)");
    for (int k = 0; k < 4; k++) step(b[k], k, b[k+1], k+1, 0, "B");
    step(b[4], 4, b[0], 0, 1, "B wrap");
    // writes now go to A's RAM and leave B alone
    @(negedge clk); host_we = 1; host_addr = 0; host_con = ~b[0].con; @(negedge clk); host_we = 0;
    step(b[0], 0, b[1], 1, 0, "B untouched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

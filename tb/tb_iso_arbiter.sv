// Self-checking testbench for iso_arbiter (the arbitration logic).
// Random Con/Pri/Busy/rnd patterns are applied to a 4x4 instance with the
// default priority rule and to one with PRI_OWNS=1. Each output's grant is
// compared with a reference worked out here: the busy priority input if there
// is one; otherwise (unless the priority input owns the output) the first busy
// connected input found going round from (rnd + j) mod N; otherwise none.
// It also checks that over many rnd values every contender of a contended
// output is chosen at some point.
module tb_iso_arbiter;
  localparam int N = 4, M = 4;
  logic [M-1:0][N-1:0] con, pri, g0, g1;
  logic [N-1:0]        busy;
  logic [1:0]          rnd;
  int checks = 0, failures = 0;

  iso_arbiter #(.N_IN(N), .N_OUT(M))                 dut0 (.con, .pri, .busy, .rnd, .grant(g0));
  iso_arbiter #(.N_IN(N), .N_OUT(M), .PRI_OWNS(1'b1)) dut1 (.con, .pri, .busy, .rnd, .grant(g1));

  function automatic logic [N-1:0] ref_grant(int j, bit owns);
    logic [N-1:0] r = '0;
    int lowest = -1;
    for (int i = N-1; i >= 0; i--) if (pri[j][i] && busy[i]) lowest = i;
    if (lowest >= 0) begin r[lowest] = 1'b1; return r; end
    if (owns && pri[j] != '0) return r;
    for (int d = 0; d < N; d++) begin
      int k = (int'(rnd) + j + d) % N;
      if (con[j][k] && busy[k]) begin r[k] = 1'b1; return r; end
    end
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits [N];
    // random patterns
    for (int t = 0; t < 3000; t++) begin
      con  = M*N'($urandom) ^ {$urandom, $urandom};
      busy = N'($urandom);
      rnd  = 2'($urandom);
      pri  = '0;
      for (int j = 0; j < M; j++)
        if ($urandom_range(0, 2) == 0) pri[j][$urandom_range(0, N-1)] = 1'b1;
      #1;
      for (int j = 0; j < M; j++) begin
        checks += 2;
        if (g0[j] !== ref_grant(j, 1'b0)) begin
          failures++;
          $display("FAIL t=%0d out %0d: con=%b pri=%b busy=%b rnd=%0d grant=%b exp=%b",
                   t, j, con[j], pri[j], busy, rnd, g0[j], ref_grant(j, 1'b0));
        end
        if (g1[j] !== ref_grant(j, 1'b1)) begin
          failures++;
          $display("FAIL(owns) t=%0d out %0d: grant=%b exp=%b", t, j, g1[j], ref_grant(j, 1'b1));
        end
      end
    end
    // a directed case: idle priority input, two contenders on output 1
    con = '0; pri = '0; con[1] = 4'b1011; pri[1] = 4'b0100; busy = 4'b1001;
    foreach (hits[i]) hits[i] = 0;
    for (int r = 0; r < 4; r++) begin
      rnd = 2'(r); #1;
      for (int i = 0; i < N; i++) if (g0[1][i]) hits[i]++;
      checks++;
      if (g1[1] != '0) begin failures++; $display("FAIL: PRI_OWNS output granted while priority idle"); end
    end
    checks++;
    if (hits[0] == 0 || hits[3] == 0 || hits[1] != 0 || hits[2] != 0) begin
      failures++; $display("FAIL: random choice hits %0d %0d %0d %0d", hits[0], hits[1], hits[2], hits[3]);
    end
    // priority input busy always wins
    busy = 4'b1101; #1;
    checks++;
    if (g0[1] != 4'b0100 || g1[1] != 4'b0100) begin failures++; $display("FAIL: priority not granted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// iso_arbiter: the Isoswitch arbitration logic (AL), combinational.
//
// For every output j, independently and in parallel:
//   1. if an input with priority to j (Pri[i,j]) is busy, it is granted;
//   2. otherwise one of the busy inputs connected to j (Con[i,j]) is chosen at
//      random and granted;
//   3. otherwise the output stays idle.
// The random choice is a search over the inputs starting at (rnd + j) mod N_IN;
// the caller supplies `rnd` from a pseudo-random source. Each output costs
// O(N_IN) logic, the whole AL O(N_IN*N_OUT).
//
// Matrices are packed with output j's word at [j] and input i at bit i.
// By default an output whose priority input is idle is given to contention
// traffic (priority sources do not own their band). PRI_OWNS=1 instead keeps
// such an output idle, as the step-by-step algorithm reads literally.
module iso_arbiter #(
  parameter int unsigned N_IN     = 4,
  parameter int unsigned N_OUT    = 4,
  parameter bit          PRI_OWNS = 1'b0,
  localparam int unsigned RW      = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic [N_OUT-1:0][N_IN-1:0] con,
  input  logic [N_OUT-1:0][N_IN-1:0] pri,
  input  logic [N_IN-1:0]            busy,
  input  logic [RW-1:0]              rnd,
  output logic [N_OUT-1:0][N_IN-1:0] grant
);
  always_comb begin
    grant = '0;
    for (int j = 0; j < N_OUT; j++) begin
      logic [N_IN-1:0] pri_busy, cand;
      logic            found;
      int unsigned     start;
      pri_busy = pri[j] & busy;
      cand     = con[j] & busy;
      found    = 1'b0;
      start    = (int'(rnd) + j) % N_IN;
      if (pri_busy != '0) begin
        for (int i = 0; i < N_IN; i++) begin
          if (pri_busy[i] && !found) begin
            grant[j][i] = 1'b1;
            found       = 1'b1;
          end
        end
      end else if (!(PRI_OWNS && pri[j] != '0)) begin
        for (int s = 0; s < N_IN; s++) begin
          automatic int unsigned k = (start + s) % N_IN;
          if (cand[k] && !found) begin
            grant[j][k] = 1'b1;
            found       = 1'b1;
          end
        end
      end
    end
  end
endmodule

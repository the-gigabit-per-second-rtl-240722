// iso_config_mem: Configuration Memory holding the switch's Configuration
// Tables (CTs) in two tandem RAMs.
//
// A CT line describes one band of the Isochronet cycle:
//   con  Port Connection: N_OUT words of N_IN bits, bit i of word j set when
//        input i is connected to output j (packed as con[j][i]);
//   pri  Priority Port: same shape, at most one bit set per word;
//   exp  Expiration: how many control ticks the band lasts.
// The lines of the active RAM are executed like a program: the Program
// Counter (`pc`) selects the current line and moves on when the control unit
// raises `advance` (the line expired). After the line named by the active
// RAM's Data Boundary register it returns to line 0, which starts a new cycle.
//
// The host loads a new table into the other RAM while the switch runs (host
// writes always go to the idle RAM), writes that RAM's Data Boundary register,
// then pulses `host_commit`. The Decision Logic makes the new RAM the active
// one when the current cycle ends, so reconfiguration never disturbs a cycle
// in progress. `swap_pending` tells the host to wait before loading again.
// After reset no table is active: outputs read as zero (nothing connected)
// until the first committed table starts on the next `advance`.
//
// Timing: `cur_*` shows, combinationally, the line in effect; when `advance`
// is high it already shows the line that takes over at this clock edge, so
// the control unit can load the counter and arbitrate for the new band in the
// same tick; `cur_idx` is that line's address. `band_start` flags an advance
// while a table runs, and `cycle_start` one onto line 0. The read-ahead and the
// start-up rule are this design's own choices.
module iso_config_mem #(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_OUT = 4,
  parameter int unsigned EXP_W = 12,
  parameter int unsigned CT_AW = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        advance,
  // host side
  input  logic                        host_we,
  input  logic [CT_AW-1:0]            host_addr,
  input  logic [N_OUT-1:0][N_IN-1:0]  host_con,
  input  logic [N_OUT-1:0][N_IN-1:0]  host_pri,
  input  logic [EXP_W-1:0]            host_exp,
  input  logic                        host_bound_we,
  input  logic [CT_AW-1:0]            host_bound,
  input  logic                        host_commit,
  // switch side
  output logic [N_OUT-1:0][N_IN-1:0]  cur_con,
  output logic [N_OUT-1:0][N_IN-1:0]  cur_pri,
  output logic [EXP_W-1:0]            cur_exp,
  output logic [CT_AW-1:0]            pc,
  output logic [CT_AW-1:0]            cur_idx,
  output logic                        bank,
  output logic                        running,
  output logic                        swap_pending,
  output logic                        band_start,
  output logic                        cycle_start
);
  localparam int unsigned DEPTH = 1 << CT_AW;

  typedef struct packed {
    logic [N_OUT-1:0][N_IN-1:0] con;
    logic [N_OUT-1:0][N_IN-1:0] pri;
    logic [EXP_W-1:0]           exp;
  } ct_line_t;

  ct_line_t          ram0 [DEPTH];
  ct_line_t          ram1 [DEPTH];
  logic [CT_AW-1:0]  bound [2];

  logic              at_end, swap, run_n, bank_n;
  logic [CT_AW-1:0]  pc_n, rd_addr;
  ct_line_t          line;

  // Decision logic: where the program counter goes on an advance.
  assign at_end  = !running || (pc == bound[bank]);
  assign swap    = advance && at_end && swap_pending;
  assign run_n   = running || swap;
  assign bank_n  = swap ? !bank : bank;
  assign pc_n    = at_end ? '0 : pc + 1'b1;
  assign rd_addr = advance ? pc_n : pc;
  assign line    = bank_n ? ram1[rd_addr] : ram0[rd_addr];

  assign cur_idx     = rd_addr;
  assign band_start  = advance && run_n;
  assign cycle_start = advance && at_end && run_n;

  always_comb begin
    if ((advance ? run_n : running)) begin
      cur_con = line.con;
      cur_pri = line.pri;
      cur_exp = line.exp;
    end else begin
      cur_con = '0;
      cur_pri = '0;
      cur_exp = '0;
    end
  end

  // Host writes go to the RAM that is not active.
  always_ff @(posedge clk) begin
    if (host_we) begin
      if (bank) ram0[host_addr] <= ct_line_t'{host_con, host_pri, host_exp};
      else      ram1[host_addr] <= ct_line_t'{host_con, host_pri, host_exp};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bound[0]     <= '0;
      bound[1]     <= '0;
      pc           <= '0;
      bank         <= 1'b0;
      running      <= 1'b0;
      swap_pending <= 1'b0;
    end else begin
      if (host_bound_we) bound[!bank] <= host_bound;
      if (advance) begin
        pc      <= pc_n;
        bank    <= bank_n;
        running <= run_n;
      end
      if (swap)             swap_pending <= 1'b0;
      else if (host_commit) swap_pending <= 1'b1;
    end
  end

  // The Priority Port field allows one priority input per output.
  for (genvar j = 0; j < N_OUT; j++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) host_we |-> $onehot0(host_pri[j]))
      else $error("CT line written with several priority inputs for output %0d", j);
  end
endmodule

// Self-checking testbench for iso_output_card.
// Words are presented on word strobes as the fabric would present them, some
// slots idle. A serial receiver written here reassembles the outgoing trunk.
// With Delay 0 a word given on word strobe k must be on the wire, whole, by
// the strobe k+2 (one register stage and one slot on the wire); with Delay 5
// it must arrive 5 slots later still. Words and idle slots must match exactly.
module tb_iso_output_card;
  localparam int W = 40;
  logic clk = 0, rst_n = 0;
  logic [5:0] bit_idx;
  logic word_en, ctrl_tick, in_valid = 0, dly_we = 0, ser_out, ser_en;
  logic [W-1:0]  in_word = '0;
  logic [11:0]   dly_val = '0;
  int checks = 0, failures = 0;

  iso_timebase #(.WORD_W(W), .BATCH(8)) u_tb (.clk, .rst_n, .bit_idx, .word_en, .ctrl_tick);
  iso_output_card #(.WORD_W(W), .DLY_AW(12)) dut (.*);
  always #5 clk = ~clk;

  // receiver: collect bits of each slot
  logic [W-1:0] rx;
  logic         rx_en;
  int           slot = 0;
  logic [W:0]   got [int];
  always @(posedge clk) if (rst_n) begin
    rx    = {rx[W-2:0], ser_out};
    if (bit_idx == 0) rx_en = ser_en; else rx_en &= ser_en;
    if (word_en) begin
      got[slot] = {rx_en, rx};
      slot++;
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int d);
    logic [W:0] sent [int];
    int s0;
    @(negedge clk); dly_we = 1; dly_val = 12'(d); @(negedge clk); dly_we = 0;
    @(negedge clk iff bit_idx == 3);
    s0 = slot;  // strobe number of the next word_en
    for (int k = 0; k < 40; k++) begin
      in_word  = {8'($urandom), $urandom};
      in_valid = ($urandom_range(0, 3) != 0);
      sent[s0 + k] = {in_valid, in_word};
      @(negedge clk iff word_en);
      @(negedge clk);
    end
    in_valid = 0;
    repeat ((d + 4) * W) @(negedge clk);
    for (int k = 0; k < 40; k++) begin
      logic [W:0] e = sent[s0 + k], g;
      g = got.exists(s0 + k + 2 + d) ? got[s0 + k + 2 + d] : '0;
      checks++;
      if (g[W] !== e[W] || (e[W] && g !== e)) begin
        failures++;
        $display("FAIL d=%0d k=%0d: got %b/%h exp %b/%h", d, k, g[W], g[W-1:0], e[W], e[W-1:0]);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0);
    run(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

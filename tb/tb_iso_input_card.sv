// Self-checking testbench for iso_input_card.
// A slot-aligned serial source (written here, MSB first with a carrier line)
// feeds random words, some slots idle. The test checks that the words come out
// of the queue in order with Busy set, that Busy rises in the cycle the last
// bit of a word is in (one word slot after the slot starts), that a flush
// empties the queue and counts the discarded words, and that words beyond the
// 256-word queue are dropped and counted.
module tb_iso_input_card;
  localparam int W = 40, QA = 8;
  logic clk = 0, rst_n = 0;
  logic [5:0] bit_idx;
  logic word_en, ctrl_tick, ser_in = 0, ser_en = 0, pop = 0, flush = 0, busy;
  logic [W-1:0] head;
  logic [QA:0]  level;
  logic [15:0]  drop_flush, drop_full;
  int checks = 0, failures = 0;

  iso_timebase #(.WORD_W(W), .BATCH(8)) u_tb (.clk, .rst_n, .bit_idx, .word_en, .ctrl_tick);
  iso_input_card #(.WORD_W(W), .INQ_AW(QA)) dut (.*);
  always #5 clk = ~clk;

  // serial source
  logic [W-1:0] tx_q [$];
  logic [W-1:0] cur;
  logic         cur_v = 0;
  always @(negedge clk) begin
    if (rst_n && bit_idx == 0) begin
      cur_v = 0;
      if (tx_q.size() > 0) begin cur = tx_q.pop_front(); cur_v = 1; end
    end
    ser_en = cur_v;
    ser_in = cur_v ? cur[W-1-bit_idx] : 1'b0;
  end

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

  logic [W-1:0] sent [$];
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!busy && level == 0, "empty after reset");
    // 1. a single word: Busy latency
    begin
      logic [W-1:0] w = {8'hA5, 32'h1234_5678};
      int t0, t1;
      @(negedge clk iff bit_idx == W-1);
      tx_q.push_back(w);
      @(posedge clk iff bit_idx == 0);
      t0 = $time;
      @(posedge clk iff busy);
      t1 = $time;
      check((t1 - t0) / 10 == W, $sformatf("busy after %0d cycles, expected %0d", (t1-t0)/10, W));
      check(head == w, "head word");
      @(negedge clk iff word_en); pop = 1; @(negedge clk); pop = 0;
      check(!busy, "popped");
    end
    // 2. stream of words with gaps, popped in order
    for (int k = 0; k < 30; k++) begin
      logic [W-1:0] w;
      w = {8'($urandom), $urandom};
      tx_q.push_back(w); sent.push_back(w);
    end
    repeat (40*10) @(negedge clk);
    while (sent.size() > 0) begin
      @(negedge clk iff word_en);
      if (busy) begin
        logic [W-1:0] e;
        e = sent.pop_front();
        check(head == e, $sformatf("order: got %h exp %h", head, e));
        pop = 1; @(negedge clk); pop = 0;
      end
    end
    repeat (80) @(negedge clk);
    check(!busy, "drained");
    // 3. flush
    for (int k = 0; k < 5; k++) tx_q.push_back(W'(k));
    repeat (5*W + 2*W) @(negedge clk);
    check(level == 5, $sformatf("level before flush %0d", level));
    @(negedge clk iff bit_idx == 5); flush = 1; @(negedge clk); flush = 0;
    check(!busy && drop_flush == 5, $sformatf("flush dropped %0d", drop_flush));
    // 4. overflow of the 256-word queue
    for (int k = 0; k < 260; k++) tx_q.push_back(W'(k));
    repeat (262*W) @(negedge clk);
    check(level == 256, $sformatf("full level %0d", level));
    check(drop_full == 4, $sformatf("overflow drops %0d", drop_full));
    check(head == W'(0), "oldest kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

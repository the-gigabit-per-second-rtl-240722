// Self-checking testbench for iso_delay_module.
// The word strobe is held high, so one word passes per clock. For several
// Delay settings a random stream of words (some with status 0) is pushed in
// and each output is compared with the input of Delay+1 ticks earlier; ticks
// within Delay of a restart must come out with status 0.
module tb_iso_delay_module;
  localparam int W = 40, AW = 12;
  logic clk = 0, rst_n = 0, word_en = 1, in_valid = 0, out_valid, dly_we = 0;
  logic [W-1:0]  in_word = '0, out_word;
  logic [AW-1:0] dly_val = '0;
  int checks = 0, failures = 0;

  iso_delay_module #(.WORD_W(W), .DLY_AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W:0] hist [$];

  task automatic run(int d, int n);
    @(negedge clk); dly_we = 1; dly_val = AW'(d);
    @(negedge clk); dly_we = 0;
    hist.delete();
    for (int t = 0; t < n; t++) begin
      in_word  = {8'($urandom), $urandom};
      in_valid = ($urandom_range(0, 3) != 0);
      hist.push_back({in_valid, in_word});
      @(posedge clk); #1;
      // output now holds the word pushed d ticks before this one
      checks++;
      if (t < d) begin
        if (out_valid) begin failures++; $display("FAIL d=%0d t=%0d: stale word valid", d, t); end
      end else if ({out_valid, out_word} !== (hist[t-d][W] ? hist[t-d] : {1'b0, out_word})) begin
        failures++;
        $display("FAIL d=%0d t=%0d: got %b/%h exp %b/%h", d, t, out_valid, out_word, hist[t-d][W], hist[t-d][W-1:0]);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0, 50);
    run(1, 50);
    run(7, 100);
    run(300, 700);
    run(4095, 4200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

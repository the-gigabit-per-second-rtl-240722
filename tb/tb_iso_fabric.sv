// Self-checking testbench for iso_fabric (the crossbar of word multiplexers).
// Random input words, valid flags and selections are applied; every output
// must carry the selected input's word, valid only when enabled and the
// selected input is valid.
module tb_iso_fabric;
  localparam int N = 4, M = 4, W = 40;
  logic [N-1:0][W-1:0] in_word;
  logic [N-1:0]        in_valid;
  logic [M-1:0][1:0]   sel;
  logic [M-1:0]        sel_en;
  logic [M-1:0][W-1:0] out_word;
  logic [M-1:0]        out_valid;
  int checks = 0, failures = 0;

  iso_fabric #(.N_IN(N), .N_OUT(M), .WORD_W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < N; i++) in_word[i] = {8'($urandom), $urandom};
      in_valid = N'($urandom);
      for (int j = 0; j < M; j++) sel[j] = 2'($urandom);
      sel_en = M'($urandom);
      #1;
      for (int j = 0; j < M; j++) begin
        checks++;
        if (out_valid[j] !== (sel_en[j] && in_valid[sel[j]]) ||
            (sel_en[j] && out_word[j] !== in_word[sel[j]])) begin
          failures++;
          $display("FAIL out %0d sel=%0d en=%b", j, sel[j], sel_en[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

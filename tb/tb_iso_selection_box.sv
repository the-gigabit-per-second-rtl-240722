// Self-checking testbench for iso_selection_box (all-optical switch, RDMA-).
// A 2-line table is loaded: in band 0 wavelength 0 is a contention band open
// to all inputs and wavelength 1 admits inputs 0 and 1 with input 2 as its
// priority source; in band 1 wavelength 0 admits only input 0. Checked: one
// of two inputs lit together passes at once and the other is shut (collision);
// the owner keeps the wavelength while lit and the other takes over when it
// goes dark; the priority input preempts at once; an input not in the tree
// never passes; the band change applies the next line.
// A second box with two broadcast links and two wavelengths checks that one
// wavelength carries two trees at once, one per link, and that contention is
// resolved within each link.
module tb_iso_selection_box;
  localparam int N = 4, L = 4, EW = 12, AW = 8;
  logic clk = 0, rst_n = 0, tick = 0;
  logic [L-1:0][N-1:0] sensor = '0, filter_pass;
  logic [L-1:0] collision;
  logic ct_we = 0, ct_bound_we = 0, ct_commit = 0, ct_swap_pending;
  logic [AW-1:0] ct_addr = '0, ct_bound = '0, band_idx;
  logic [L-1:0][N-1:0] ct_con = '0, ct_pri = '0;
  logic [EW-1:0] ct_exp = '0;
  int checks = 0, failures = 0;
  // two broadcast links x two wavelengths = four channels
  localparam int W2 = 2, B2 = 2;
  logic [W2-1:0][N-1:0] sensor2 = '0;
  logic [B2*W2-1:0][N-1:0] filter_pass2, ct_con2 = '0, ct_pri2 = '0;
  logic [B2*W2-1:0] collision2;
  logic ct_swap_pending2;
  logic [AW-1:0] band_idx2;

  iso_selection_box #(.N_IN(N), .N_WL(L), .EXP_W(EW), .CT_AW(AW)) dut (.*);
  iso_selection_box #(.N_IN(N), .N_WL(W2), .N_BL(B2), .EXP_W(EW), .CT_AW(AW)) dut2 (
    .clk, .rst_n, .tick, .sensor(sensor2), .filter_pass(filter_pass2), .collision(collision2),
    .ct_we, .ct_addr, .ct_con(ct_con2), .ct_pri(ct_pri2), .ct_exp, .ct_bound_we, .ct_bound,
    .ct_commit, .ct_swap_pending(ct_swap_pending2), .band_idx(band_idx2)
  );
  always #5 clk = ~clk;
  // band time base: one tick every 4 clocks
  int cyc = 0;
  always @(posedge clk) begin cyc <= cyc + 1; tick <= (cyc % 4 == 3); end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t) pass=%h sensor=%h", msg, $time, filter_pass, sensor); end
  endtask

  initial begin
    logic [N-1:0] first;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // line 0
    @(negedge clk); ct_we = 1; ct_addr = 0; ct_exp = 12'd40;
    ct_con = '0; ct_pri = '0; ct_con[0] = 4'b1111; ct_con[1] = 4'b0011; ct_pri[1] = 4'b0100;
    // channel 0 = link 0 / wavelength 0, channel 2 = link 1 / wavelength 0
    ct_con2 = '0; ct_con2[0] = 4'b0011; ct_con2[2] = 4'b1100;
    // line 1
    @(negedge clk); ct_addr = 1; ct_exp = 12'd40;
    ct_con = '0; ct_pri = '0; ct_con[0] = 4'b0001;
    ct_con2 = '0; ct_con2[0] = 4'b0011; ct_con2[2] = 4'b1100;
    @(negedge clk); ct_we = 0; ct_bound_we = 1; ct_bound = 1;
    @(negedge clk); ct_bound_we = 0; ct_commit = 1;
    @(negedge clk); ct_commit = 0;
    @(negedge clk iff (!ct_swap_pending && band_idx == 0));
    repeat (2) @(negedge clk);
    // wavelength reuse on two broadcast links
    sensor2[0] = 4'b0101; #1;
    check(filter_pass2[0] == 4'b0001 && filter_pass2[2] == 4'b0100 && collision2 == '0,
          "one wavelength carries two trees on two links");
    @(negedge clk); sensor2[0] = 4'b1111; #1;
    check(filter_pass2[0] == 4'b0001 && filter_pass2[2] == 4'b0100 && collision2 == 4'b0101,
          "owners hold per link, late inputs shut on their own link");
    check(filter_pass2[1] == '0 && filter_pass2[3] == '0, "dark wavelength passes nothing");
    @(negedge clk); sensor2[0] = 4'b1010; #1;
    check(filter_pass2[0] == 4'b0010 && filter_pass2[2] == 4'b1000 && collision2 == '0,
          "each link hands over within its own tree");
    @(negedge clk); sensor2[0] = '0;
    // contention on wavelength 0
    sensor[0] = 4'b1010; #1;
    check($onehot(filter_pass[0]) && (filter_pass[0] & ~4'b1010) == '0, "one of two passes at once");
    check(collision[0], "loser shut");
    first = filter_pass[0];
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      check(filter_pass[0] == first && collision[0], "owner keeps the wavelength");
    end
    sensor[0] = 4'b1010 & ~first; #1;
    check(filter_pass[0] == (4'b1010 & ~first) && !collision[0], "other input takes over");
    sensor[0] = '0;
    // priority on wavelength 1
    sensor[1] = 4'b0001; #1;
    check(filter_pass[1] == 4'b0001, "connected input passes");
    @(negedge clk); sensor[1] = 4'b0101; #1;
    check(filter_pass[1] == 4'b0100 && collision[1], "priority input preempts");
    @(negedge clk); sensor[1] = 4'b1000; #1;
    check(filter_pass[1] == '0 && !collision[1], "input outside the tree blocked");
    sensor[1] = '0;
    // band 1
    @(negedge clk iff band_idx == 1);
    @(negedge clk);
    sensor[0] = 4'b0010; #1;
    check(filter_pass[0] == '0, "band 1 closes input 1");
    sensor[0] = 4'b0011; #1;
    check(filter_pass[0] == 4'b0001, "band 1 admits input 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

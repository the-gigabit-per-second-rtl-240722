// iso_input_card: input line card of the Isoswitch (serial-to-parallel
// conversion followed by the input queue).
//
// The trunk is converted into WORD_W-bit words and every valid word is queued.
// Queueing at the input costs no throughput here: all words queued at one
// input belong to the routing tree of the current band and so head for the
// same outputs, so there is no head-of-line blocking. `busy` (Busy[i] of the
// arbitration logic) is high while the queue holds a word, and `head` is the
// oldest word. `pop` (on a word strobe) removes it.
//
// Under RDMA+ a word waits in the queue only until its band ends: `flush`,
// raised by the control unit at the band boundary, discards what is left,
// including a word completing in that same cycle. A word the fabric takes in
// that cycle still leaves (the last slot belongs to the old band). Discarded words are counted
// in `drop_flush`, and words lost to a full queue in `drop_full`; both
// counters saturate. The queue depth and the drop counters are this design's
// own choices.
module iso_input_card #(
  parameter int unsigned WORD_W = 40,
  parameter int unsigned INQ_AW = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              word_en,
  input  logic              ser_in,
  input  logic              ser_en,
  input  logic              pop,
  input  logic              flush,
  output logic [WORD_W-1:0] head,
  output logic              busy,
  output logic [INQ_AW:0]   level,
  output logic [15:0]       drop_flush,
  output logic [15:0]       drop_full
);
  logic [WORD_W-1:0] word;
  logic              valid, empty, full, overflow;

  iso_deserializer #(.WORD_W(WORD_W)) u_des (
    .clk, .rst_n, .word_en, .ser_in, .ser_en, .word, .valid
  );

  iso_fifo #(.W(WORD_W), .AW(INQ_AW)) u_q (
    .clk, .rst_n, .flush,
    .push(valid), .wr_data(word),
    .pop(pop && word_en), .rd_data(head),
    .empty, .full, .overflow, .count(level)
  );

  assign busy = !empty;

  logic unused;
  assign unused = full;

  // Words thrown away at the band boundary: those queued plus one arriving
  // now, less the head word if the fabric takes it in this last slot.
  logic [INQ_AW+1:0] flushed;
  assign flushed = (INQ_AW+2)'(level) + (INQ_AW+2)'(valid) - (INQ_AW+2)'(pop && word_en && !empty);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drop_flush <= '0;
      drop_full  <= '0;
    end else begin
      if (flush) begin
        if ({16'd0, drop_flush} + 32'(flushed) > 32'hFFFF) drop_flush <= 16'hFFFF;
        else drop_flush <= drop_flush + 16'(flushed);
      end else if (overflow && drop_full != 16'hFFFF) begin
        drop_full <= drop_full + 1'b1;
      end
    end
  end
endmodule

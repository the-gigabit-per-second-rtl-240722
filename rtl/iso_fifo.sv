// iso_fifo: show-ahead synchronous FIFO used for the switch input queues and
// the interface card buffers.
//
// The oldest word is always visible on `rd_data` while `empty` is low. A push
// and a pop may happen in the same cycle. A push into a full FIFO is ignored
// and reported on `overflow` in that cycle. `flush` empties the FIFO and wins
// over a push or pop in the same cycle (a word read in that cycle has still
// been read). Storage is a plain array, written on
// the clock and read asynchronously.
module iso_fifo #(
  parameter int unsigned W  = 40,
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          flush,
  input  logic          push,
  input  logic [W-1:0]  wr_data,
  input  logic          pop,
  output logic [W-1:0]  rd_data,
  output logic          empty,
  output logic          full,
  output logic          overflow,
  output logic [AW:0]   count
);
  localparam int unsigned DEPTH = 1 << AW;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign empty    = (count == '0);
  assign full     = (count == (AW+1)'(DEPTH));
  assign do_pop   = pop && !empty;
  assign do_push  = push && (!full || do_pop);
  assign overflow = push && !do_push;
  assign rd_data  = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else if (flush) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end
endmodule

// Synchronous FIFO used for the TABLA bus buffers and neighbour links.
//
// DEPTH entries of W bits. push writes din when not full; pop removes the
// head when not empty; dout always shows the head (first-word fall-through).
// Push and pop may happen in the same cycle. Count-based full/empty.
module tabla_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned A_W  = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         full,
  output logic         empty
);

  logic [W-1:0] mem [DEPTH];
  logic [A_W-1:0] rp, wp;
  logic [A_W:0]   cnt;
  logic do_push, do_pop;

  assign full    = (cnt == (A_W+1)'(DEPTH));
  assign empty   = (cnt == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp <= '0; wp <= '0; cnt <= '0;
    end else begin
      if (do_push) wp <= (wp == A_W'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == A_W'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (A_W+1)'(do_push) - (A_W+1)'(do_pop);
    end
  end

endmodule

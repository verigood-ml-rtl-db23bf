// GeneSys output buffer (OBUFF).
//
// One bank per systolic-array column, each DEPTH words of PSUM_W bits. A bank
// takes its column's results in arrival order: `start` clears every bank's
// write pointer, and each wr_valid[n] writes wr_data[n] at that bank's pointer
// and advances it. With `acc` high the value is added to what the bank
// already holds there (partial sums of a tile computed in several passes);
// with `acc` low it overwrites it. Because the columns' results are skewed by
// one cycle per column, each bank keeps its own pointer.
//
// The read port reads the same row of all banks (rd_addr) and returns it one
// cycle later on rd_data (synchronous read). A second, word-wide port serves
// the OBUFF load/store interface (partial sums from and results to off-chip
// memory); element e is bank e % N, row e / N, read data one cycle after
// ls_rd_en. Array writes take priority over it. The document states that the
// output buffer is banked per column and holds partial sums and output
// activations; pointer-based writes and the read-modify-write accumulate are
// this design's choices.
module gs_obuf #(
  parameter int unsigned N      = 32,
  parameter int unsigned PSUM_W = 32,
  parameter int unsigned DEPTH  = 64,
  localparam int unsigned A_W   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned LN_W  = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned EA_W  = A_W + LN_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     acc,
  input  logic                     wr_valid [N],
  input  logic signed [PSUM_W-1:0] wr_data  [N],
  input  logic [A_W-1:0]           rd_addr,
  output logic signed [PSUM_W-1:0] rd_data  [N],
  // load/store interface port, one word at a time (element e = bank e % N, row e / N)
  input  logic                     ls_wr_en,
  input  logic [EA_W-1:0]          ls_wr_addr,
  input  logic [PSUM_W-1:0]        ls_wr_data,
  input  logic                     ls_rd_en,
  input  logic [EA_W-1:0]          ls_rd_addr,
  output logic [PSUM_W-1:0]        ls_rd_data
);

  logic [LN_W-1:0]   ls_bank_q;
  logic [PSUM_W-1:0] ls_row [N];

  for (genvar n = 0; n < N; n++) begin : g_bank
    logic signed [PSUM_W-1:0] mem [DEPTH];
    logic [A_W-1:0]           wptr;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)           wptr <= '0;
      else if (start)       wptr <= '0;
      else if (wr_valid[n]) wptr <= wptr + 1'b1;
    end

    always_ff @(posedge clk) begin
      if (wr_valid[n] && !start)
        mem[wptr] <= acc ? mem[wptr] + wr_data[n] : wr_data[n];
      else if (ls_wr_en && ls_wr_addr[LN_W-1:0] == LN_W'(n))
        mem[ls_wr_addr[EA_W-1:LN_W]] <= ls_wr_data;
      rd_data[n] <= mem[rd_addr];
      ls_row[n]  <= mem[ls_rd_addr[EA_W-1:LN_W]];
    end
  end

  always_ff @(posedge clk) begin
    if (ls_rd_en) ls_bank_q <= ls_rd_addr[LN_W-1:0];
  end
  assign ls_rd_data = ls_row[ls_bank_q];

endmodule

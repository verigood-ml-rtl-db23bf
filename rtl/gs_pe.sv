// GeneSys systolic-array processing engine (PE).
//
// One PE of the weight-stationary systolic array. It holds a small weight
// scratchpad and a multiply-accumulate unit. Following the document, the PE has
// four pipeline registers: the output (partial sum) register, the input
// register whose value is forwarded to the PE on the right, and two registers
// for the weight scratchpad read access (read request and read address). The
// read request/address pair travels through the array together with the
// activation, so every PE reads its weight in the same cycle its activation is
// valid.
//
// Timing: act_in/rd_req_in/rd_addr_in are registered at the clock edge; in the
// following cycle the scratchpad is read at the registered address and
// psum_out <= psum_in + act * weight is registered at the next edge. A PE
// without a registered read request passes zero downwards. The weight
// scratchpad is written through wr_en/wr_addr/wr_data (one weight per cycle).
// Widths and scratchpad depth are parameters, as in the document; their default
// values are this design's choice.
module gs_pe #(
  parameter int unsigned ACT_W      = 8,
  parameter int unsigned WGT_W      = 8,
  parameter int unsigned PSUM_W     = 32,
  parameter int unsigned WMEM_DEPTH = 16,
  localparam int unsigned WA_W      = (WMEM_DEPTH > 1) ? $clog2(WMEM_DEPTH) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // activation from the left neighbour (or the IBUFF bank)
  input  logic signed [ACT_W-1:0]  act_in,
  input  logic                     rd_req_in,
  input  logic [WA_W-1:0]          rd_addr_in,
  // partial sum from the PE above
  input  logic signed [PSUM_W-1:0] psum_in,
  // weight scratchpad write port
  input  logic                     wr_en,
  input  logic [WA_W-1:0]          wr_addr,
  input  logic signed [WGT_W-1:0]  wr_data,
  // forwarded to the right neighbour
  output logic signed [ACT_W-1:0]  act_out,
  output logic                     rd_req_out,
  output logic [WA_W-1:0]          rd_addr_out,
  // partial sum to the PE below
  output logic signed [PSUM_W-1:0] psum_out
);

  logic signed [WGT_W-1:0]  wmem [WMEM_DEPTH];
  logic signed [ACT_W-1:0]  act_r;
  logic                     req_r;
  logic [WA_W-1:0]          addr_r;
  logic signed [PSUM_W-1:0] psum_r;
  logic signed [WGT_W-1:0]  weight;
  logic signed [ACT_W+WGT_W-1:0] prod;

  always_ff @(posedge clk) begin
    if (wr_en) wmem[wr_addr] <= wr_data;
  end

  assign weight = wmem[addr_r];
  assign prod   = act_r * weight;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_r  <= '0;
      req_r  <= 1'b0;
      addr_r <= '0;
      psum_r <= '0;
    end else begin
      act_r  <= act_in;
      req_r  <= rd_req_in;
      addr_r <= rd_addr_in;
      psum_r <= req_r ? psum_in + PSUM_W'(prod) : '0;
    end
  end

  assign act_out     = act_r;
  assign rd_req_out  = req_r;
  assign rd_addr_out = addr_r;
  assign psum_out    = psum_r;

endmodule

// GeneSys systolic array.
//
// An M x N grid of gs_pe processing engines (M rows, N columns). Activations
// enter at the left edge, one IBUFF bank per row, and move one column to the
// right per cycle; partial sums move one row down per cycle and are
// accumulated along each column. Below the last row each column adds its bias
// (BBUFF) and registers the result for its OBUFF bank. The weight read
// request and read address are shared by the whole array: they enter with the
// activations and travel through the same pipeline registers.
//
// Row m is delayed by m cycles on entry (input skew) so that the partial sums
// of one input vector meet at each PE. For a vector presented on act_in in the
// cycle in_valid is high, column n shows its result on out_data[n] with
// out_valid[n] high M + n + 1 cycles later. The document states the dataflow,
// the PE contents and the per-row/per-column buffer banking; the input skew
// registers, the bias adder register and the per-row weight write buses are
// this design's choices.
module gs_systolic_array #(
  parameter int unsigned M          = 32,   // rows
  parameter int unsigned N          = 32,   // columns
  parameter int unsigned ACT_W      = 8,
  parameter int unsigned WGT_W      = 8,
  parameter int unsigned PSUM_W     = 32,
  parameter int unsigned WMEM_DEPTH = 16,
  localparam int unsigned WA_W      = (WMEM_DEPTH > 1) ? $clog2(WMEM_DEPTH) : 1,
  localparam int unsigned CI_W      = (N > 1) ? $clog2(N) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // one activation per row from the IBUFF banks, with the shared weight read
  input  logic                     in_valid,
  input  logic signed [ACT_W-1:0]  act_in  [M],
  input  logic [WA_W-1:0]          w_slot,
  // weight write bus, one per row: column select, scratchpad address, data
  input  logic                     w_wr_en   [M],
  input  logic [CI_W-1:0]          w_wr_col  [M],
  input  logic [WA_W-1:0]          w_wr_addr [M],
  input  logic signed [WGT_W-1:0]  w_wr_data [M],
  // bias per column from BBUFF
  input  logic                     bias_en,
  input  logic signed [PSUM_W-1:0] bias    [N],
  // one result per column towards its OBUFF bank
  output logic                     out_valid [N],
  output logic signed [PSUM_W-1:0] out_data  [N]
);

  // horizontal activation / read-request links: column index 0..N
  logic signed [ACT_W-1:0]  act_h  [M][N+1];
  logic                     req_h  [M][N+1];
  logic [WA_W-1:0]          addr_h [M][N+1];
  // vertical partial-sum links: row index 0..M
  logic signed [PSUM_W-1:0] psum_v [M+1][N];

  // input skew: row m delayed by m cycles
  for (genvar m = 0; m < M; m++) begin : g_skew
    if (m == 0) begin : g_nodly
      assign act_h[0][0]  = act_in[0];
      assign req_h[0][0]  = in_valid;
      assign addr_h[0][0] = w_slot;
    end else begin : g_dly
      logic signed [ACT_W-1:0] act_d  [m];
      logic                    req_d  [m];
      logic [WA_W-1:0]         addr_d [m];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < m; k++) begin
            act_d[k]  <= '0;
            req_d[k]  <= 1'b0;
            addr_d[k] <= '0;
          end
        end else begin
          act_d[0]  <= act_in[m];
          req_d[0]  <= in_valid;
          addr_d[0] <= w_slot;
          for (int k = 1; k < m; k++) begin
            act_d[k]  <= act_d[k-1];
            req_d[k]  <= req_d[k-1];
            addr_d[k] <= addr_d[k-1];
          end
        end
      end
      assign act_h[m][0]  = act_d[m-1];
      assign req_h[m][0]  = req_d[m-1];
      assign addr_h[m][0] = addr_d[m-1];
    end
  end

  for (genvar n = 0; n < N; n++) begin : g_top
    assign psum_v[0][n] = '0;
  end

  for (genvar m = 0; m < M; m++) begin : g_row
    for (genvar n = 0; n < N; n++) begin : g_col
      gs_pe #(
        .ACT_W(ACT_W), .WGT_W(WGT_W), .PSUM_W(PSUM_W), .WMEM_DEPTH(WMEM_DEPTH)
      ) u_pe (
        .clk        (clk),
        .rst_n      (rst_n),
        .act_in     (act_h[m][n]),
        .rd_req_in  (req_h[m][n]),
        .rd_addr_in (addr_h[m][n]),
        .psum_in    (psum_v[m][n]),
        .wr_en      (w_wr_en[m] && (w_wr_col[m] == CI_W'(n))),
        .wr_addr    (w_wr_addr[m]),
        .wr_data    (w_wr_data[m]),
        .act_out    (act_h[m][n+1]),
        .rd_req_out (req_h[m][n+1]),
        .rd_addr_out(addr_h[m][n+1]),
        .psum_out   (psum_v[m+1][n])
      );
    end
  end

  // bias adders below the last row; the last row's forwarded read request,
  // one cycle later, marks a valid partial sum at the bottom of the column
  for (genvar n = 0; n < N; n++) begin : g_bias
    logic                     bot_vld;
    logic                     o_vld;
    logic signed [PSUM_W-1:0] o_dat;
    if (n + 1 < N) begin : g_fwd
      assign bot_vld = req_h[M-1][n+2];
    end else begin : g_last
      logic last_vld;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) last_vld <= 1'b0;
        else        last_vld <= req_h[M-1][n+1];
      end
      assign bot_vld = last_vld;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        o_vld <= 1'b0;
        o_dat <= '0;
      end else begin
        o_vld <= bot_vld;
        o_dat <= psum_v[M][n] + (bias_en ? bias[n] : '0);
      end
    end
    assign out_valid[n] = o_vld;
    assign out_data[n]  = o_dat;
  end

endmodule

// Axiline engine: a training/inference datapath hard-wired for one algorithm.
//
// Wraps axl_pipeline with the control block and the weight store. A sample of
// FEATURES features arrives as C = ceil(FEATURES / LANES) chunks of LANES
// features on the stream port, one chunk per cycle and back to back (s_valid
// must stay high for the C beats of a sample once its first beat is taken;
// an assertion checks this). The label y comes with the chunks. The control
// block drives the pipeline's sel and ena[3:1] and reads each chunk's weights
// from the weight store, which stage 3 writes back with the updated weights:
// this is the loop from the SGD output to the pipeline input.
//
// Timing, with C chunks per sample: the prediction appears on pred with
// pred_valid C + 1 cycles after the first chunk was taken. In training
// (train = 1) the next sample is accepted C + 3 cycles after the previous one
// started, when the last updated weight chunk is back in the store; in
// inference the engine takes a new sample every C cycles. The host loads and
// reads weights by feature index through w_*.
//
// The default algorithm and feature count (logistic regression, 54
// features) are the document's first Axiline benchmark; the inner-product
// width LANES, the stream protocol and the schedule are this design's choices.
module axiline
  import axl_pkg::*;
#(
  parameter axl_alg_e    ALG      = ALG_LOGREG,
  parameter int unsigned FEATURES = 54,
  parameter int unsigned LANES    = 8,
  parameter int unsigned DW       = 16,
  parameter int unsigned FRAC     = 8,
  parameter int signed   LR       = 16,
  parameter int signed   DECAY    = 256,
  localparam int unsigned C       = (FEATURES + LANES - 1) / LANES,
  localparam int unsigned DLY     = C + 1,
  localparam int unsigned F_W     = $clog2(C * LANES),
  localparam int unsigned C_W     = (C > 1) ? $clog2(C) : 1,
  localparam int unsigned L_W     = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 train,
  // weight store host port (feature index)
  input  logic                 w_we,
  input  logic [F_W-1:0]       w_addr,
  input  logic signed [DW-1:0] w_wdata,
  input  logic [F_W-1:0]       w_rd_addr,
  output logic signed [DW-1:0] w_rd_data,
  // sample stream, one chunk of LANES features per beat
  input  logic                 s_valid,
  output logic                 s_ready,
  input  logic signed [DW-1:0] s_x [LANES],
  input  logic signed [DW-1:0] s_y,
  // results
  output logic                 pred_valid,
  output logic signed [DW-1:0] pred,
  output logic                 busy,
  output logic [31:0]          updates      // weight chunks written back
);

  localparam int unsigned GAP = 3;   // training: cycles after the last chunk before the next sample

  // ------------------------------------------------------- weight store
  logic signed [DW-1:0] wmem [C][LANES];
  logic signed [DW-1:0] w_chunk [LANES];
  logic signed [DW-1:0] w_new [LANES];

  // ----------------------------------------------------------- control
  typedef enum logic [1:0] {A_IDLE, A_FEED, A_GAP} astate_e;
  astate_e      state;
  logic [C_W-1:0] chunk;
  logic [1:0]   gap;
  logic         take;
  logic [3:1]   ena;
  logic         sel;
  logic         last_d, ena2_d;
  logic         ena1_sr [DLY];
  logic [C_W-1:0] chunk_sr [DLY];
  logic         train_sr [DLY];
  logic         wb_valid;
  logic [C_W-1:0] wb_chunk;

  assign s_ready = (state == A_FEED) || (state == A_IDLE);
  assign take    = s_valid && s_ready;
  assign sel     = (state == A_IDLE);
  assign ena[1]  = take;
  assign ena[2]  = last_d;
  assign ena[3]  = ena1_sr[DLY-1] && train_sr[DLY-1];

  for (genvar l = 0; l < LANES; l++) begin : g_rd
    assign w_chunk[l] = wmem[(state == A_IDLE) ? '0 : chunk][l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= A_IDLE;
      chunk  <= '0;
      gap    <= '0;
      last_d <= 1'b0;
      ena2_d <= 1'b0;
      for (int k = 0; k < DLY; k++) begin
        ena1_sr[k] <= 1'b0; chunk_sr[k] <= '0; train_sr[k] <= 1'b0;
      end
      wb_valid <= 1'b0;
      wb_chunk <= '0;
      updates  <= '0;
    end else begin
      // chunk index and mode travel with the x/w delay chain
      ena1_sr[0]  <= take;
      chunk_sr[0] <= (state == A_IDLE) ? '0 : chunk;
      train_sr[0] <= train;
      for (int k = 1; k < DLY; k++) begin
        ena1_sr[k]  <= ena1_sr[k-1];
        chunk_sr[k] <= chunk_sr[k-1];
        train_sr[k] <= train_sr[k-1];
      end
      wb_valid <= ena[3];
      wb_chunk <= chunk_sr[DLY-1];
      if (wb_valid) updates <= updates + 1;
      ena2_d <= ena[2];
      last_d <= 1'b0;
      unique case (state)
        A_IDLE: if (take) begin
          if (C == 1) begin
            last_d <= 1'b1;
            gap    <= train ? 2'(GAP) : '0;
            state  <= train ? A_GAP : A_IDLE;
          end else begin
            chunk <= C_W'(1);
            state <= A_FEED;
          end
        end
        A_FEED: if (take) begin
          if (chunk == C_W'(C - 1)) begin
            last_d <= 1'b1;
            chunk  <= '0;
            gap    <= 2'(GAP);
            state  <= train ? A_GAP : A_IDLE;
          end else begin
            chunk <= chunk + 1'b1;
          end
        end
        A_GAP: begin
          gap <= gap - 1'b1;
          if (gap == 2'd1) state <= A_IDLE;
        end
        default: state <= A_IDLE;
      endcase
    end
  end

  logic ena3_pending;
  always_comb begin
    ena3_pending = wb_valid;
    for (int k = 0; k < DLY; k++) ena3_pending |= ena1_sr[k];
  end

  assign pred_valid = ena2_d;
  assign busy = (state != A_IDLE) || ena3_pending;


  // weight store writes: stage-3 results take priority over the host
  always_ff @(posedge clk) begin
    if (wb_valid) begin
      for (int l = 0; l < LANES; l++) wmem[wb_chunk][l] <= w_new[l];
    end else if (w_we) begin
      wmem[C_W'(w_addr / F_W'(LANES))][L_W'(w_addr % F_W'(LANES))] <= w_wdata;
    end
  end

  assign w_rd_data = wmem[C_W'(w_rd_addr / F_W'(LANES))][L_W'(w_rd_addr % F_W'(LANES))];

  // ---------------------------------------------------------- pipeline
  axl_pipeline #(
    .ALG(ALG), .LANES(LANES), .DW(DW), .FRAC(FRAC), .DLY(DLY), .LR(LR), .DECAY(DECAY)
  ) u_pipe (
    .clk, .rst_n,
    .ena   (ena),
    .sel   (sel),
    .x     (s_x),
    .w     (w_chunk),
    .y     (s_y),
    .sum   (),
    .pred  (pred),
    .grad  (),
    .w_new (w_new)
  );

  // a sample's chunks must arrive back to back
  a_back_to_back: assert property (@(posedge clk) disable iff (!rst_n)
    (state == A_FEED) |-> s_valid)
    else $error("axiline: stream gap inside a sample");

endmodule

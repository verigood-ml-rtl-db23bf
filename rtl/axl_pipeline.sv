// Axiline three-stage training pipeline.
//
// A hard-wired datapath for one small ML algorithm, in the three stages the
// document describes:
//   Stage 1  inner product of LANES features x and weights w, added to either
//            the running sum or zero (mux controlled by `sel`), so that a
//            sample of C * LANES features is summed over C cycles;
//   Stage 2  a combinational function of the sum s and the label y that
//            depends on the algorithm (axl_pkg): it gives the prediction h(s)
//            and the gradient scale g = lr * dLoss/ds;
//   Stage 3  stochastic gradient descent on every lane,
//            w' = decay * w - g * x  (two multipliers and one adder per lane).
// x and w reach stage 3 through a chain of DLY registers (the register column
// beside stages 1 and 2 in the published pipeline diagram) so that each chunk meets the
// gradient of its own sample. The chain shifts every cycle; the control block
// asserts ena[1] on the cycles a chunk enters, ena[2] in the cycle after the
// last chunk of a sample, and ena[3] DLY cycles after each chunk entered.
// With DLY = C + 1, stage 3 sees chunk k of a sample exactly when g of that
// sample is ready.
//
// Numbers are DW-bit signed fixed point with FRAC fraction bits; products
// are rescaled by FRAC and results saturate to DW bits. The sigmoid is the
// piecewise-linear PLAN approximation. The number formats, the sigmoid
// approximation, the hinge-loss form of the SVM, and the learning rate and
// decay constants are this design's choices: the document gives the stage
// structure, the stage-2 examples and the SGD unit's operator count.
module axl_pipeline
  import axl_pkg::*;
#(
  parameter axl_alg_e    ALG   = ALG_LOGREG,
  parameter int unsigned LANES = 8,
  parameter int unsigned DW    = 16,
  parameter int unsigned FRAC  = 8,
  parameter int unsigned DLY   = 8,                 // x/w delay chain depth (C + 1)
  parameter int signed   LR    = 16,                // learning rate, fixed point (1/16)
  parameter int signed   DECAY = 256                // weight decay factor, fixed point (1.0)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [3:1]           ena,
  input  logic                 sel,                 // 1: start a new sum (mux selects 0)
  input  logic signed [DW-1:0] x [LANES],
  input  logic signed [DW-1:0] w [LANES],
  input  logic signed [DW-1:0] y,
  output logic signed [DW-1:0] sum,                 // stage 1 result, rescaled
  output logic signed [DW-1:0] pred,                // stage 2: h(s)
  output logic signed [DW-1:0] grad,                // stage 2: g
  output logic signed [DW-1:0] w_new [LANES]        // stage 3 register
);

  localparam int unsigned ACC_W = 2 * DW + 8;
  localparam logic signed [DW-1:0] ONE  = DW'(1 << FRAC);
  localparam logic signed [DW-1:0] DMAX = DW'((1 << (DW - 1)) - 1);
  localparam logic signed [DW-1:0] DMIN = -DMAX - 1;

  function automatic logic signed [DW-1:0] sat(logic signed [ACC_W-1:0] v);
    return (v > ACC_W'(DMAX)) ? DMAX : (v < ACC_W'(DMIN)) ? DMIN : DW'(v);
  endfunction

  // fixed-point product a * b >> FRAC, saturated
  function automatic logic signed [DW-1:0] fmul(logic signed [DW-1:0] a, logic signed [DW-1:0] b);
    logic signed [ACC_W-1:0] p;
    p = ACC_W'(a) * ACC_W'(b);
    return sat(p >>> FRAC);
  endfunction

  // PLAN piecewise-linear sigmoid
  function automatic logic signed [DW-1:0] sigmoid(logic signed [DW-1:0] s);
    logic signed [DW-1:0] a, f;
    a = (s < 0) ? ((s == DMIN) ? DMAX : -s) : s;
    if (a >= DW'(5 << FRAC))                 f = ONE;
    else if (a >= DW'((19 << FRAC) / 8))     f = (a >>> 5) + DW'((27 << FRAC) / 32);
    else if (a >= ONE)                       f = (a >>> 3) + DW'((5 << FRAC) / 8);
    else                                     f = (a >>> 2) + DW'(ONE / 2);
    return (s < 0) ? ONE - f : f;
  endfunction

  // ------------------------------------------------------------- stage 1
  logic signed [ACC_W-1:0] dot, acc_r;

  always_comb begin
    dot = '0;
    for (int l = 0; l < LANES; l++) dot += ACC_W'(x[l]) * ACC_W'(w[l]);
  end

  logic signed [DW-1:0] y_r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_r <= '0;
      y_r   <= '0;
    end else if (ena[1]) begin
      acc_r <= (sel ? '0 : acc_r) + dot;
      y_r   <= y;
    end
  end

  assign sum = sat(acc_r >>> FRAC);

  // x/w delay chain
  logic signed [DW-1:0] xd [DLY][LANES];
  logic signed [DW-1:0] wd [DLY][LANES];
  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      xd[0][l] <= x[l];
      wd[0][l] <= w[l];
      for (int k = 1; k < DLY; k++) begin
        xd[k][l] <= xd[k-1][l];
        wd[k][l] <= wd[k-1][l];
      end
    end
  end

  // ------------------------------------------------------------- stage 2
  logic signed [DW-1:0] h, e, g;
  always_comb begin
    h = sum;
    e = '0;
    g = '0;
    unique case (ALG)
      ALG_LINREG: begin
        h = sum;
        e = sat(ACC_W'(h) - ACC_W'(y_r));
        g = fmul(DW'(LR), e);
      end
      ALG_LOGREG: begin
        h = sigmoid(sum);
        e = sat(ACC_W'(h) - ACC_W'(y_r));
        g = fmul(DW'(LR), e);
      end
      default: begin  // ALG_SVM, labels +1.0 / -1.0
        h = sum;
        e = fmul(y_r, sum);
        g = (e < ONE) ? -fmul(DW'(LR), y_r) : '0;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pred <= '0;
      grad <= '0;
    end else if (ena[2]) begin
      pred <= h;
      grad <= g;
    end
  end

  // ------------------------------------------------------------- stage 3
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) w_new[l] <= '0;
    end else if (ena[3]) begin
      for (int l = 0; l < LANES; l++)
        w_new[l] <= sat(ACC_W'(fmul(DW'(DECAY), wd[DLY-1][l])) -
                        ACC_W'(fmul(grad, xd[DLY-1][l])));
    end
  end

endmodule

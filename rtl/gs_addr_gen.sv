// GeneSys data access address generator.
//
// Produces the address sequence of a strided tile access as NLOOP nested
// loops: addr = base + sum_k i_k * stride_k, with loop 0 innermost and each
// i_k running 0 .. count_k - 1. DNN access patterns are regular and need no
// branches, so loop counts and strides fully describe them. The address is
// kept as a running sum (one adder per loop level) instead of multiplications.
//
// Interface: pulse `start` with the configuration; addresses then appear on
// `addr` with `valid` high and advance in every cycle `ready` is high. `last`
// marks the final address and `busy` stays high until it has been taken.
// A count of zero is treated as one. The document says only that the data
// access module is configured with loop iteration counts; the loop depth,
// running-sum structure and handshake are this design's choices.
module gs_addr_gen #(
  parameter int unsigned NLOOP = 2,
  parameter int unsigned AW    = 24,
  parameter int unsigned CW    = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  input  logic [CW-1:0] count  [NLOOP],
  input  logic [AW-1:0] stride [NLOOP],
  input  logic          ready,
  output logic          valid,
  output logic          last,
  output logic [AW-1:0] addr,
  output logic          busy
);

  logic [CW-1:0] cnt_q  [NLOOP];
  logic [CW-1:0] idx    [NLOOP];
  logic [AW-1:0] str_q  [NLOOP];
  logic [AW-1:0] lbase  [NLOOP];  // address at the start of the current loop-k pass
  logic          at_end [NLOOP];
  logic          active;

  for (genvar k = 0; k < NLOOP; k++) begin : g_end
    assign at_end[k] = (idx[k] + 1'b1 >= cnt_q[k]);
  end

  always_comb begin
    last = 1'b1;
    for (int k = 0; k < NLOOP; k++) last &= at_end[k];
  end

  // the innermost loop that is not at its end steps; all loops inside it
  // restart from its new address
  int unsigned   step;
  logic [AW-1:0] nxt;
  always_comb begin
    step = 0;
    for (int k = NLOOP - 1; k >= 0; k--) if (!at_end[k]) step = k;
    nxt = lbase[step] + str_q[step];
  end

  assign valid = active;
  assign busy  = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      addr   <= '0;
      for (int k = 0; k < NLOOP; k++) begin
        cnt_q[k] <= '0;
        idx[k]   <= '0;
        str_q[k] <= '0;
        lbase[k] <= '0;
      end
    end else if (start) begin
      active <= 1'b1;
      addr   <= base;
      for (int k = 0; k < NLOOP; k++) begin
        cnt_q[k] <= (count[k] == '0) ? CW'(1) : count[k];
        idx[k]   <= '0;
        str_q[k] <= stride[k];
        lbase[k] <= base;
      end
    end else if (active && ready) begin
      if (last) begin
        active <= 1'b0;
      end else begin
        addr <= nxt;
        for (int k = 0; k < NLOOP; k++) begin
          if (k == step)     idx[k] <= idx[k] + 1'b1;
          else if (k < step) idx[k] <= '0;
          if (k <= step)     lbase[k] <= nxt;
        end
      end
    end
  end

endmodule

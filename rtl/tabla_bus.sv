// TABLA shared bus with its arbiter.
//
// Connects NODES units (the PEs of one PU, or the PUs of the chip). As the
// document describes the arbiter, it is split into one leader controller and
// one follower controller per node. A follower has a write buffer (FIFO of
// {destination, data}) that its node pushes into, and a set of read buffers,
// one FIFO per possible source node, that its node pops from. In each cycle
// the leader grants the bus to one follower whose write buffer is non-empty
// and whose head can be accepted (the destination's read buffer for that
// source is not full); the head is popped from the source's write buffer and
// written into the destination's read buffer in the same cycle. The grant
// rotates round-robin starting after the last granted node.
//
// Interface per node n: wr_valid/wr_dest/wr_data/wr_ready push into the write
// buffer; rd_valid[n][s] and rd_data[n][s] show the head of the read buffer
// holding data from source s, rd_pop[n][s] removes it. A word needs at least
// two cycles from wr_valid to rd_valid (write buffer, then read buffer).
// The round-robin policy and the buffer depths are this design's choices.
module tabla_bus #(
  parameter int unsigned NODES = 8,
  parameter int unsigned DW    = 16,
  parameter int unsigned WDEPTH = 4,   // write buffer depth
  parameter int unsigned RDEPTH = 2,   // depth of each read buffer
  localparam int unsigned ID_W = (NODES > 1) ? $clog2(NODES) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_valid [NODES],
  input  logic [ID_W-1:0] wr_dest  [NODES],
  input  logic [DW-1:0]   wr_data  [NODES],
  output logic            wr_ready [NODES],
  output logic            rd_valid [NODES][NODES],
  output logic [DW-1:0]   rd_data  [NODES][NODES],
  input  logic            rd_pop   [NODES][NODES],
  output logic            grant_valid,              // a transfer happens this cycle
  output logic [ID_W-1:0] grant_src
);

  // ----------------------------------------------------------- followers
  logic [ID_W+DW-1:0] wb_head  [NODES];
  logic               wb_empty [NODES];
  logic               wb_full  [NODES];
  logic               wb_pop   [NODES];
  logic               rb_push  [NODES][NODES];
  logic               rb_full  [NODES][NODES];
  logic               rb_empty [NODES][NODES];
  logic [DW-1:0]      xfer_data;
  logic [ID_W-1:0]    xfer_dest;

  for (genvar n = 0; n < NODES; n++) begin : g_node
    tabla_fifo #(.W(ID_W + DW), .DEPTH(WDEPTH)) u_wbuf (
      .clk, .rst_n,
      .push (wr_valid[n]),
      .din  ({wr_dest[n], wr_data[n]}),
      .pop  (wb_pop[n]),
      .dout (wb_head[n]),
      .full (wb_full[n]),
      .empty(wb_empty[n])
    );
    assign wr_ready[n] = !wb_full[n];

    for (genvar s = 0; s < NODES; s++) begin : g_rbuf
      tabla_fifo #(.W(DW), .DEPTH(RDEPTH)) u_rbuf (
        .clk, .rst_n,
        .push (rb_push[n][s]),
        .din  (xfer_data),
        .pop  (rd_pop[n][s]),
        .dout (rd_data[n][s]),
        .full (rb_full[n][s]),
        .empty(rb_empty[n][s])
      );
      assign rd_valid[n][s] = !rb_empty[n][s];
    end
  end

  // -------------------------------------------------------------- leader
  logic            can_go [NODES];
  logic [ID_W-1:0] last_grant;

  for (genvar n = 0; n < NODES; n++) begin : g_req
    assign can_go[n] = !wb_empty[n] && !rb_full[wb_head[n][ID_W+DW-1:DW]][n];
  end

  always_comb begin
    grant_valid = 1'b0;
    grant_src   = '0;
    for (int i = 1; i <= NODES; i++) begin
      automatic int c = (int'(last_grant) + i) % NODES;
      if (!grant_valid && can_go[c]) begin
        grant_valid = 1'b1;
        grant_src   = ID_W'(c);
      end
    end
  end

  assign xfer_dest = wb_head[grant_src][ID_W+DW-1:DW];
  assign xfer_data = wb_head[grant_src][DW-1:0];

  always_comb begin
    for (int n = 0; n < NODES; n++) begin
      wb_pop[n] = grant_valid && (grant_src == ID_W'(n));
      for (int s = 0; s < NODES; s++)
        rb_push[n][s] = grant_valid && (grant_src == ID_W'(s)) && (xfer_dest == ID_W'(n));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           last_grant <= ID_W'(NODES - 1);
    else if (grant_valid) last_grant <= grant_src;
  end

endmodule

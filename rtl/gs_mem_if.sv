// GeneSys memory interface (tile load / store engine).
//
// Moves one tile between off-chip memory and an on-chip buffer. The off-chip
// side walks a strided pattern produced by gs_addr_gen (two nested loops:
// count/stride pairs over a base address); the on-chip side uses consecutive
// buffer addresses from buf_base. Loads keep issuing read requests while the
// memory grants them and write each returned word into the buffer in order.
// Stores read a buffer word (one-cycle synchronous read), then hold a write
// request until it is granted.
//
// Double buffering: with DBUF = 1 the buffer address space is split in two
// halves and a tag bit selects the half a load fills. The tag flips when a
// load completes, so the next load fills the other half while the compute
// side reads the half just filled (`ready_half`). Stores ignore the tag.
//
// Off-chip protocol (this design's own): mem_req with mem_addr (and mem_we,
// mem_wdata) is accepted in a cycle where mem_gnt is high; read data returns
// in request order on mem_rvalid/mem_rdata, any number of cycles later.
// `done` pulses for one cycle when the last word has been written. The
// document gives the function (strided tile transfers, double-buffer tag
// logic, load-only and load/store interfaces) but not the protocol.
module gs_mem_if #(
  parameter int unsigned AW   = 24,  // off-chip word address width
  parameter int unsigned DW   = 32,  // off-chip data width
  parameter int unsigned BAW  = 12,  // on-chip buffer address width (includes the tag bit)
  parameter int unsigned CW   = 16,
  parameter bit          DBUF = 1'b1
) (
  input  logic           clk,
  input  logic           rst_n,
  // command
  input  logic           start,
  input  logic           store,      // 0: off-chip -> buffer, 1: buffer -> off-chip
  input  logic [AW-1:0]  base,
  input  logic [CW-1:0]  count  [2],
  input  logic [AW-1:0]  stride [2],
  input  logic [BAW-1:0] buf_base,
  output logic           busy,
  output logic           done,
  output logic           tag,        // half the next load fills
  output logic           ready_half, // half the last completed load filled
  // off-chip memory port
  output logic           mem_req,
  output logic           mem_we,
  output logic [AW-1:0]  mem_addr,
  output logic [DW-1:0]  mem_wdata,
  input  logic           mem_gnt,
  input  logic           mem_rvalid,
  input  logic [DW-1:0]  mem_rdata,
  // on-chip buffer port
  output logic           buf_wr_en,
  output logic [BAW-1:0] buf_wr_addr,
  output logic [DW-1:0]  buf_wr_data,
  output logic           buf_rd_en,
  output logic [BAW-1:0] buf_rd_addr,
  input  logic [DW-1:0]  buf_rd_data
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_ST_RD, S_ST_WAIT, S_ST_WR} state_e;
  state_e state;

  logic          ag_ready, ag_valid, ag_last, ag_busy;
  logic [AW-1:0] ag_addr;
  logic [31:0]   total, rcv_cnt, st_cnt;
  logic [AW-1:0] st_addr;
  logic [DW-1:0] st_data;
  logic [BAW-1:0] half_off;
  logic [BAW-1:0] bbase_q;   // buf_base latched at start, so setup for other units may change it

  gs_addr_gen #(.NLOOP(2), .AW(AW), .CW(CW)) u_ag (
    .clk, .rst_n,
    .start (start),
    .base  (base),
    .count (count),
    .stride(stride),
    .ready (ag_ready),
    .valid (ag_valid),
    .last  (ag_last),
    .addr  (ag_addr),
    .busy  (ag_busy)
  );

  assign half_off = (DBUF && tag) ? BAW'(1) << (BAW - 1) : '0;

  // address generator advances on a granted read (load) or after a granted write (store)
  assign ag_ready = (state == S_LOAD)  ? mem_gnt :
                    (state == S_ST_RD) ? 1'b1 : 1'b0;

  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = ag_addr;
    mem_wdata = st_data;
    if (state == S_LOAD && ag_valid) begin
      mem_req = 1'b1;
    end else if (state == S_ST_WR) begin
      mem_req  = 1'b1;
      mem_we   = 1'b1;
      mem_addr = st_addr;
    end
  end

  assign buf_wr_en   = (state == S_LOAD) && mem_rvalid;
  assign buf_wr_addr = bbase_q + half_off + BAW'(rcv_cnt);
  assign buf_wr_data = mem_rdata;
  assign buf_rd_en   = (state == S_ST_RD) && ag_valid;
  assign buf_rd_addr = bbase_q + BAW'(st_cnt);
  assign busy        = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      total      <= '0;
      rcv_cnt    <= '0;
      st_cnt     <= '0;
      st_addr    <= '0;
      st_data    <= '0;
      bbase_q    <= '0;
      done       <= 1'b0;
      tag        <= 1'b0;
      ready_half <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          total   <= 32'((count[0] == '0) ? CW'(1) : count[0]) *
                     32'((count[1] == '0) ? CW'(1) : count[1]);
          rcv_cnt <= '0;
          st_cnt  <= '0;
          bbase_q <= buf_base;
          state   <= store ? S_ST_RD : S_LOAD;
        end
        S_LOAD: if (mem_rvalid) begin
          rcv_cnt <= rcv_cnt + 1;
          if (rcv_cnt + 1 == total) begin
            state      <= S_IDLE;
            done       <= 1'b1;
            ready_half <= tag;
            tag <= 1'(DBUF) & ~tag;
          end
        end
        S_ST_RD: begin
          st_addr <= ag_addr;
          state   <= S_ST_WAIT;
        end
        S_ST_WAIT: begin
          st_data <= buf_rd_data;
          state   <= S_ST_WR;
        end
        S_ST_WR: if (mem_gnt) begin
          st_cnt <= st_cnt + 1;
          if (st_cnt + 1 == total) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_ST_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

// GeneSys controller: instruction memory, decoder, execution FSM and the
// configuration registers that feed the base/loop address generators.
//
// The host writes a program into the instruction memory through imem_we /
// imem_waddr / imem_wdata and pulses `start`. The FSM fetches one instruction
// (synchronous read), decodes it and executes it:
//   OP_CFG   writes a configuration register (setup: base address, loop
//            counts and strides, row counts, SIMD operands) in one cycle;
//   OP_LOAD, OP_STORE, OP_GEMM, OP_SIMD pulse the matching unit's start and
//            wait for its done pulse;
//   OP_SYNC  waits until a background load has finished;
//   OP_END   stops and pulses `done`.
// Instructions run one at a time, in program order, except a LOAD with the
// LOAD_BG flag: it starts and the FSM moves on, so a GEMM can read one IBUFF
// half while the next tile is prefetched into the other (the stated purpose
// of the double-buffer tags). One background load may be outstanding; a
// LOAD, STORE, SYNC or END waits for it. A CFG instruction takes 3 cycles (fetch, decode,
// execute); a unit instruction takes 3 cycles plus the unit's run time.
// The document names the controller's parts (instruction memory, decoder,
// execution FSM, base address generator) and says the design is programmed
// through its ISA; the encoding (gs_pkg) and the sequential execution are this
// design's choices.
module gs_controller
  import gs_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  localparam int unsigned IA_W      = (IMEM_DEPTH > 1) ? $clog2(IMEM_DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // instruction memory write port
  input  logic             imem_we,
  input  logic [IA_W-1:0]  imem_waddr,
  input  logic [31:0]      imem_wdata,
  // run control
  input  logic             start,
  output logic             busy,
  output logic             done,
  // configuration registers
  output logic [23:0]      cfg [NCFG],
  // unit commands (start pulses) and their completion pulses
  output logic             ld_start,
  output gs_tgt_e          ld_tgt,
  output logic             st_start,
  output logic             st_obuf,
  output logic             gemm_start,
  output logic [1:0]       gemm_flags,
  output logic             simd_start,
  output simd_op_e         simd_op,
  output logic [1:0]       simd_flags,
  input  logic             ld_done,
  input  logic             st_done,
  input  logic             gemm_done,
  input  logic             simd_done
);

  typedef enum logic [2:0] {C_IDLE, C_FETCH, C_DECODE, C_EXEC, C_WAIT} cstate_e;
  cstate_e state;
  logic    bg_pending;   // a background (prefetch) load is still running

  logic [31:0]     imem [IMEM_DEPTH];
  logic [31:0]     ir;
  logic [IA_W-1:0] pc;
  gs_op_e          opc;

  always_ff @(posedge clk) begin
    if (imem_we) imem[imem_waddr] <= imem_wdata;
    ir <= imem[pc];
  end

  assign opc = gs_op_e'(ir[31:28]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_IDLE;
      bg_pending <= 1'b0;
      pc         <= '0;
      done       <= 1'b0;
      ld_start   <= 1'b0;
      st_start   <= 1'b0;
      st_obuf    <= 1'b0;
      gemm_start <= 1'b0;
      simd_start <= 1'b0;
      ld_tgt     <= TGT_IBUF;
      gemm_flags <= '0;
      simd_op    <= SIMD_ADD;
      simd_flags <= '0;
      for (int i = 0; i < NCFG; i++) cfg[i] <= '0;
    end else begin
      done       <= 1'b0;
      ld_start   <= 1'b0;
      st_start   <= 1'b0;
      gemm_start <= 1'b0;
      simd_start <= 1'b0;
      // only one load may be in flight while bg_pending is set, so any
      // load completion seen then belongs to the background load
      if (bg_pending && ld_done) bg_pending <= 1'b0;
      unique case (state)
        C_IDLE: if (start) begin
          pc    <= '0;
          state <= C_FETCH;
        end
        C_FETCH:  state <= C_DECODE;   // imem read of pc
        C_DECODE: state <= C_EXEC;     // ir valid
        C_EXEC: begin
          unique case (opc)
            OP_CFG: begin
              cfg[ir[27:24]] <= ir[23:0];
              pc    <= pc + 1'b1;
              state <= C_FETCH;
            end
            OP_LOAD: if (!bg_pending) begin
              ld_start <= 1'b1;
              ld_tgt   <= gs_tgt_e'(ir[26:24]);
              if (ir[LOAD_BG]) begin    // background: continue with the next instruction
                bg_pending <= 1'b1;
                pc         <= pc + 1'b1;
                state      <= C_FETCH;
              end else begin
                state <= C_WAIT;
              end
            end
            OP_STORE: if (!bg_pending) begin
              st_start <= 1'b1;
              st_obuf  <= ir[24];
              state    <= C_WAIT;
            end
            OP_SYNC: if (!bg_pending) begin
              pc    <= pc + 1'b1;
              state <= C_FETCH;
            end
            OP_GEMM: begin
              gemm_start <= 1'b1;
              gemm_flags <= ir[1:0];
              state      <= C_WAIT;
            end
            OP_SIMD: begin
              simd_start <= 1'b1;
              simd_op    <= simd_op_e'(ir[27:24]);
              simd_flags <= ir[1:0];
              state      <= C_WAIT;
            end
            default: if (!bg_pending) begin   // OP_END and unused codes
              done  <= 1'b1;
              state <= C_IDLE;
            end
          endcase
        end
        C_WAIT: if ((ld_done && !bg_pending) || st_done || gemm_done || simd_done) begin
          pc    <= pc + 1'b1;
          state <= C_FETCH;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  assign busy = (state != C_IDLE);

endmodule

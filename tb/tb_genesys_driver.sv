// Test driver for one GeneSys instance, used by the GeneSys and top-level
// testbenches. It owns four stalling memory-channel models, fills them with
// random data, writes a program into the instruction memory and runs it:
//
//   two K = 2M deep tiles of an R x K by K x N matrix product
//     (IBUFF loads into alternating halves, weights into slots 0 and 1,
//      the first GEMM with bias, the second accumulating; the second IBUFF
//      tile is a background load that runs during the first GEMM),
//   ReLU on OBUFF into vector memory, a vector-memory load of an R x N
//   addend, an element-wise add, a saturating cast to 8 bits,
//   stores of the raw OBUFF tile and of the final vector-memory tile.
//
// The stored results are compared with a model computed here. It counts how
// often each mechanism happened (memory stalls, double-buffer half changes,
// accumulating and bias GEMMs, each SIMD operation, stores) and reports a
// failure for any that never did.
module tb_genesys_driver
  import gs_pkg::*;
#(
  parameter int M = 32, parameter int N = 32, parameter int R = 32,
  parameter int IMEM_DEPTH = 256, parameter int AW = 24, parameter int SH = 6
) (
  input  logic        clk,
  output logic        rst_n,
  output logic        imem_we,
  output logic [$clog2(IMEM_DEPTH)-1:0] imem_waddr,
  output logic [31:0] imem_wdata,
  output logic        start,
  input  logic        busy,
  input  logic        done,
  input  logic        mem_req   [4],
  input  logic        mem_we    [4],
  input  logic [AW-1:0] mem_addr [4],
  input  logic [31:0] mem_wdata [4],
  output logic        mem_gnt   [4],
  output logic        mem_rvalid[4],
  output logic [31:0] mem_rdata [4],
  output logic        finished,
  output int          checks,
  output int          failures,
  output int          cycles,
  // observation of internal command strobes, for mechanism counts
  input  logic        obs_ld_start,
  input  logic        obs_st_start,
  input  logic        obs_half,
  input  logic        obs_gemm_start,
  input  logic [1:0]  obs_gemm_flags,
  input  logic        obs_simd_start,
  input  simd_op_e    obs_simd_op,
  input  logic        obs_overlap    // a GEMM runs while an IBUFF load is busy
);
  localparam int K = 2 * M;
  localparam int XB = 16, WB = 8, BB = 4000, VB = 16, OB = 2000, RB = 0;

  logic signed [7:0]  X [R][K];
  logic signed [7:0]  W [K][N];
  logic signed [31:0] B [N];
  logic signed [31:0] V [R][N];
  logic [31:0] prog [$];

  for (genvar c = 0; c < 4; c++) begin : g_mem
    tb_mem_model #(.AW(AW), .DW(32), .DEPTH(8192), .LAT(2 + c), .STALL_PCT(20), .SEED(7 + c)) u_mem (
      .clk, .mem_req(mem_req[c]), .mem_we(mem_we[c]), .mem_addr(mem_addr[c]),
      .mem_wdata(mem_wdata[c]), .mem_gnt(mem_gnt[c]), .mem_rvalid(mem_rvalid[c]),
      .mem_rdata(mem_rdata[c]));
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL genesys %s", what);
    end
  endtask

  function automatic void cfg(int r, int v);
    prog.push_back(instr(OP_CFG, 4'(r), 24'(v)));
  endfunction

  function automatic void xfer(int base, int c0, int s0, int c1, int s1, int bb);
    cfg(R_EXT_BASE, base); cfg(R_CNT0, c0); cfg(R_STR0, s0);
    cfg(R_CNT1, c1); cfg(R_STR1, s1); cfg(R_BUF_BASE, bb);
  endfunction

  // mechanism counters
  int n_stall, n_overlap, n_half_swap, n_gemm_acc, n_gemm_bias, n_store, n_load;
  int n_simd [simd_op_e];
  int last_half;

  initial begin
    logic signed [31:0] acc, e;
    checks = 0; failures = 0; finished = 0; cycles = 0;
    rst_n = 0; imem_we = 0; imem_waddr = '0; imem_wdata = '0; start = 0;
    n_overlap = 0; n_half_swap = 0; n_gemm_acc = 0; n_gemm_bias = 0; n_store = 0; n_load = 0;
    last_half = 0;
    // data
    for (int r = 0; r < R; r++) for (int k = 0; k < K; k++) X[r][k] = 8'($urandom);
    for (int k = 0; k < K; k++) for (int n = 0; n < N; n++) W[k][n] = 8'($urandom);
    for (int n = 0; n < N; n++) B[n] = $signed($urandom % 20000) - 10000;
    for (int r = 0; r < R; r++) for (int n = 0; n < N; n++) V[r][n] = $signed($urandom % 4000) - 2000;
    X[0][0] = -128; W[0][0] = -128;
    for (int r = 0; r < R; r++) for (int k = 0; k < K; k++) g_mem[0].u_mem.mem[XB + r * K + k] = 32'(X[r][k]);
    for (int k = 0; k < K; k++) for (int n = 0; n < N; n++) g_mem[1].u_mem.mem[WB + k * N + n] = 32'(W[k][n]);
    for (int n = 0; n < N; n++) g_mem[1].u_mem.mem[BB + n] = 32'(B[n]);
    for (int r = 0; r < R; r++) for (int n = 0; n < N; n++) g_mem[3].u_mem.mem[VB + r * N + n] = 32'(V[r][n]);
    // program
    cfg(R_ROWS, R);
    xfer(XB, M, 1, R, K, 0);                    prog.push_back(instr(OP_LOAD, 4'(TGT_IBUF), 0));
    for (int t = 0; t < 2; t++) begin
      cfg(R_WSLOT, t);
      xfer(WB + t * M * N, N, 1, M, N, 0);      prog.push_back(instr(OP_LOAD, 4'(TGT_WBUF), 0));
    end
    xfer(BB, N, 1, 1, 0, 0);                    prog.push_back(instr(OP_LOAD, 4'(TGT_BBUF), 0));
    // the second IBUFF tile loads in the background while the first GEMM runs
    xfer(XB + M, M, 1, R, K, 0);                prog.push_back(instr(OP_LOAD, 4'(TGT_IBUF), 24'(1 << LOAD_BG)));
    cfg(R_WSLOT, 0);
    prog.push_back(instr(OP_GEMM, 0, 24'(1 << GEMM_BIAS)));
    cfg(R_BUF_BASE, 0);   // setup change while the background load runs
    prog.push_back(instr(OP_SYNC, 0, 0));
    cfg(R_WSLOT, 1);
    prog.push_back(instr(OP_GEMM, 0, 24'(1 << GEMM_ACC)));
    cfg(R_SRC1, 0); cfg(R_DST, 0);
    prog.push_back(instr(OP_SIMD, 4'(SIMD_RELU), 24'(1 << SIMD_SRC1_OBUF)));
    xfer(VB, N, 1, R, N, R * N);                prog.push_back(instr(OP_LOAD, 4'(TGT_VMEM), 0));
    cfg(R_SRC1, 0); cfg(R_SRC2, R); cfg(R_DST, 0);
    prog.push_back(instr(OP_SIMD, 4'(SIMD_ADD), 0));
    cfg(R_SHIFT, SH); cfg(R_DST, R);
    prog.push_back(instr(OP_SIMD, 4'(SIMD_CAST), 0));
    xfer(OB, N, 1, R, N, R * N);                prog.push_back(instr(OP_STORE, 4'd0, 0));
    xfer(RB, N, 1, R, N, 0);                    prog.push_back(instr(OP_STORE, 4'd1, 0));
    prog.push_back(instr(OP_END, 0, 0));
    check(prog.size() <= IMEM_DEPTH, "program fits");
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk) begin imem_we = 1; imem_waddr = $bits(imem_waddr)'(i); imem_wdata = prog[i]; end
    end
    @(negedge clk) imem_we = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin @(negedge clk); cycles++; end
    @(negedge clk);
    // results
    for (int r = 0; r < R; r++)
      for (int n = 0; n < N; n++) begin
        acc = B[n];
        for (int k = 0; k < K; k++) acc += 32'(X[r][k]) * 32'(W[k][n]);
        check($signed(g_mem[2].u_mem.mem[RB + r * N + n]) == acc,
              $sformatf("OBUFF r%0d n%0d: %0d vs %0d", r, n, $signed(g_mem[2].u_mem.mem[RB + r * N + n]), acc));
        e = ((acc > 0) ? acc : 0) + V[r][n];
        e = e >>> SH;
        e = (e > 127) ? 127 : ((e < -128) ? -128 : e);
        check($signed(g_mem[3].u_mem.mem[OB + r * N + n]) == e,
              $sformatf("result r%0d n%0d: %0d vs %0d", r, n, $signed(g_mem[3].u_mem.mem[OB + r * N + n]), e));
      end
    n_stall = g_mem[0].u_mem.stalls + g_mem[1].u_mem.stalls + g_mem[2].u_mem.stalls + g_mem[3].u_mem.stalls;
    $display("genesys mechanisms: stalls=%0d prefetch_overlap_cycles=%0d half_swaps=%0d gemm_bias=%0d gemm_acc=%0d loads=%0d stores=%0d relu=%0d add=%0d cast=%0d cycles=%0d",
             n_stall, n_overlap, n_half_swap, n_gemm_bias, n_gemm_acc, n_load, n_store,
             n_simd[SIMD_RELU], n_simd[SIMD_ADD], n_simd[SIMD_CAST], cycles);
    check(n_stall > 0, "memory stall happened");
    // the whole first GEMM (at least R row cycles) runs under the prefetch
    check(n_overlap >= R, $sformatf("prefetch overlapped the GEMM for %0d cycles", n_overlap));
    check(n_half_swap > 0, "IBUFF double-buffer half swap happened");
    check(n_gemm_bias > 0 && n_gemm_acc > 0, "bias and accumulate GEMMs happened");
    check(n_simd[SIMD_RELU] > 0 && n_simd[SIMD_ADD] > 0 && n_simd[SIMD_CAST] > 0, "SIMD operations happened");
    check(n_load == 6 && n_store == 2, "loads and stores issued");
    finished = 1;
  end

  // count the mechanisms as the hardware performs them
  always @(posedge clk) begin
    if (rst_n) begin
      if (obs_ld_start) n_load++;
      if (obs_st_start) n_store++;
      if (obs_overlap) n_overlap++;
      if (obs_half != 1'(last_half)) n_half_swap++;
      last_half = int'(obs_half);
      if (obs_gemm_start && obs_gemm_flags[GEMM_ACC]) n_gemm_acc++;
      if (obs_gemm_start && obs_gemm_flags[GEMM_BIAS]) n_gemm_bias++;
      if (obs_simd_start) n_simd[obs_simd_op]++;
    end
  end
endmodule

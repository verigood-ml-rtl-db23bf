// Self-checking testbench for gs_simd (4 lanes, 16 vector-memory rows).
// Fills the vector memory through the load/store port, then runs one command
// of every operation (vector and immediate operands, OBUFF as source 1),
// compares every lane of every result row with a model here, checks the
// command takes rows + 2 cycles, and reads words back through the port.
module tb_gs_simd;
  import gs_pkg::*;
  localparam int N = 4, DW = 32, VD = 16, OD = 8;
  logic clk = 0, rst_n = 0, start = 0, src1_obuf = 0, src2_imm = 0;
  simd_op_e op;
  logic [3:0] src1, src2, dst;
  logic [15:0] rows;
  logic signed [DW-1:0] imm;
  logic [4:0] shift;
  logic busy, done;
  logic [2:0] obuf_rd_addr;
  logic signed [DW-1:0] obuf_rd_data [N];
  logic ls_wr_en = 0, ls_rd_en = 0;
  logic [5:0] ls_wr_addr, ls_rd_addr;
  logic [DW-1:0] ls_wr_data, ls_rd_data;
  logic signed [DW-1:0] vm [VD][N];
  logic signed [DW-1:0] ob [OD][N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  gs_simd #(.N(N), .DW(DW), .VDEPTH(VD), .ODEPTH(OD), .CAST_W(8)) dut (.*);

  always @(posedge clk)
    for (int n = 0; n < N; n++) obuf_rd_data[n] <= ob[obuf_rd_addr][n];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic signed [DW-1:0] ref_op(simd_op_e o, logic signed [DW-1:0] a,
                                                  logic signed [DW-1:0] b, int sh);
    logic signed [DW-1:0] t;
    case (o)
      SIMD_ADD: return a + b;
      SIMD_SUB: return a - b;
      SIMD_MUL: return a * b;
      SIMD_MAX: return a > b ? a : b;
      SIMD_MIN: return a < b ? a : b;
      SIMD_RELU: return a > 0 ? a : 0;
      SIMD_ABS: return a >= 0 ? a : -a;
      SIMD_GT: return a > b ? 1 : 0;
      SIMD_EQ: return a == b ? 1 : 0;
      SIMD_CAST: begin
        t = a >>> sh;
        return t > 127 ? 127 : (t < -128 ? -128 : t);
      end
      default: return a;
    endcase
  endfunction

  task automatic cmd(input simd_op_e o, input logic s1o, input logic s2i, input int a1,
                     input int a2, input int d, input int r, input int im, input int sh);
    logic signed [DW-1:0] res [VD][N];
    int cyc;
    for (int i = 0; i < r; i++)
      for (int n = 0; n < N; n++)
        res[i][n] = ref_op(o, s1o ? ob[a1 + i][n] : vm[a1 + i][n], s2i ? DW'(im) : vm[a2 + i][n], sh);
    @(negedge clk);
    op = o; src1_obuf = s1o; src2_imm = s2i; src1 = 4'(a1); src2 = 4'(a2); dst = 4'(d);
    rows = 16'(r); imm = DW'(im); shift = 5'(sh); start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == r + 3, $sformatf("op %s took %0d cycles for %0d rows", o.name(), cyc, r));
    for (int i = 0; i < r; i++)
      for (int n = 0; n < N; n++) vm[d + i][n] = res[i][n];
    // read the written rows and the rows around them back through the port
    for (int i = (d > 0 ? d - 1 : 0); i < d + r + 1 && i < VD; i++)
      for (int n = 0; n < N; n++) begin
        @(negedge clk) begin ls_rd_en = 1; ls_rd_addr = 6'(i * N + n); end
        @(negedge clk) ls_rd_en = 0;
        check(ls_rd_data == vm[i][n], $sformatf("op %s row %0d lane %0d: %0d vs %0d",
              o.name(), i, n, ls_rd_data, vm[i][n]));
      end
  endtask

  initial begin
    op = SIMD_ADD; src1 = 0; src2 = 0; dst = 0; rows = 0; imm = 0; shift = 0;
    ls_wr_addr = 0; ls_rd_addr = 0; ls_wr_data = 0;
    for (int i = 0; i < OD; i++)
      for (int n = 0; n < N; n++) ob[i][n] = DW'($signed($urandom % 100000) - 50000);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < VD * N; e++) begin
      @(negedge clk);
      ls_wr_en = 1; ls_wr_addr = 6'(e); ls_wr_data = DW'($signed($urandom % 400) - 200);
      if (e == 9) ls_wr_data = 32'(vm[0][0]);  // equal pair for SIMD_EQ
      vm[e / N][e % N] = ls_wr_data;
    end
    @(negedge clk) ls_wr_en = 0;
    cmd(SIMD_ADD, 0, 0, 0, 4, 8, 3, 0, 0);
    cmd(SIMD_SUB, 0, 1, 1, 0, 12, 2, 17, 0);
    cmd(SIMD_MUL, 0, 0, 2, 3, 14, 2, 0, 0);
    cmd(SIMD_MAX, 0, 0, 0, 1, 4, 1, 0, 0);
    cmd(SIMD_MIN, 0, 1, 5, 0, 6, 2, -3, 0);
    cmd(SIMD_RELU, 1, 0, 0, 0, 0, 8, 0, 0);
    cmd(SIMD_ABS, 0, 0, 9, 0, 9, 3, 0, 0);
    cmd(SIMD_GT, 0, 0, 0, 1, 13, 1, 0, 0);
    cmd(SIMD_EQ, 0, 0, 0, 2, 15, 1, 0, 0);
    cmd(SIMD_CAST, 1, 0, 0, 0, 8, 8, 0, 6);
    cmd(SIMD_MOV, 0, 0, 8, 0, 1, 1, 0, 0);
    for (int e = 0; e < VD * N; e += 5) begin
      @(negedge clk) begin ls_rd_en = 1; ls_rd_addr = 6'(e); end
      @(negedge clk) ls_rd_en = 0;
      check(ls_rd_data == vm[e / N][e % N], $sformatf("port read %0d", e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

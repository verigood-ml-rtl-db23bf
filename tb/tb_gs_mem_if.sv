// Self-checking testbench for gs_mem_if against a stalling memory model.
// Two strided loads (checking that the double-buffer tag sends them to the
// two buffer halves and that every word lands at its consecutive buffer
// address) and one strided store (checking the memory contents afterwards).
module tb_gs_mem_if;
  localparam int AW = 24, DW = 32, BAW = 8, CW = 16;
  logic clk = 0, rst_n = 0, start = 0, store = 0;
  logic [AW-1:0] base;
  logic [CW-1:0] count [2];
  logic [AW-1:0] stride [2];
  logic [BAW-1:0] buf_base;
  logic busy, done, tag, ready_half;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [AW-1:0] mem_addr;
  logic [DW-1:0] mem_wdata, mem_rdata;
  logic buf_wr_en, buf_rd_en;
  logic [BAW-1:0] buf_wr_addr, buf_rd_addr;
  logic [DW-1:0] buf_wr_data, buf_rd_data;
  logic [DW-1:0] bufm [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  gs_mem_if #(.AW(AW), .DW(DW), .BAW(BAW), .CW(CW), .DBUF(1'b1)) dut (.*);
  tb_mem_model #(.AW(AW), .DW(DW), .DEPTH(1024), .LAT(3), .STALL_PCT(30)) u_mem (
    .clk, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata);

  always @(posedge clk) begin
    if (buf_wr_en) bufm[buf_wr_addr] <= buf_wr_data;
    if (buf_rd_en) buf_rd_data <= bufm[buf_rd_addr];
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input logic st, input int b, input int c0, input int s0, input int c1, input int s1, input int bb);
    @(negedge clk);
    store = st; base = AW'(b); count[0] = CW'(c0); stride[0] = AW'(s0);
    count[1] = CW'(c1); stride[1] = AW'(s1); buf_base = BAW'(bb); start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    int e;
    base = 0; buf_base = 0; count[0] = 0; count[1] = 0; stride[0] = 0; stride[1] = 0;
    buf_rd_data = 0;
    for (int i = 0; i < 1024; i++) u_mem.mem[i] = 32'hA000_0000 + 32'(i);
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(tag == 0, "tag starts at half 0");
    // load 1: 4 x 5 tile of a row-major matrix with 16-word rows at 100
    run(0, 100, 5, 1, 4, 16, 2);
    check(ready_half == 0 && tag == 1, "first load filled half 0, tag toggled");
    e = 0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 5; c++) begin
        check(bufm[2 + e] == 32'hA000_0000 + 32'(100 + r * 16 + c), $sformatf("load1 word %0d", e));
        e++;
      end
    // load 2: column access with stride 16 goes to the upper half
    run(0, 300, 6, 16, 1, 0, 0);
    check(ready_half == 1 && tag == 0, "second load filled half 1");
    for (int i = 0; i < 6; i++)
      check(bufm[128 + i] == 32'hA000_0000 + 32'(300 + i * 16), $sformatf("load2 word %0d", i));
    // store: buffer words 2.. to memory at 600 with stride 2, 3 x 4
    run(1, 600, 4, 2, 3, 10, 2);
    e = 0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 4; c++) begin
        check(u_mem.mem[600 + r * 10 + c * 2] == bufm[2 + e], $sformatf("store word %0d", e));
        e++;
      end
    check(u_mem.stalls > 0, "memory back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

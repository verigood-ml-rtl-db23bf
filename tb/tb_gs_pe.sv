// Self-checking testbench for gs_pe: loads the weight scratchpad, then drives
// random activations, read requests, addresses and incoming partial sums and
// checks the registered forwarding outputs and psum_out = psum_in + act * w,
// one cycle after the activation was registered.
module tb_gs_pe;
  localparam int ACT_W = 8, WGT_W = 8, PSUM_W = 32, DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic signed [ACT_W-1:0]  act_in, act_out;
  logic rd_req_in, rd_req_out, wr_en;
  logic [3:0] rd_addr_in, rd_addr_out, wr_addr;
  logic signed [PSUM_W-1:0] psum_in, psum_out;
  logic signed [WGT_W-1:0]  wr_data;
  int checks = 0, failures = 0;
  logic signed [WGT_W-1:0] wref [DEPTH];

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  gs_pe #(.ACT_W(ACT_W), .WGT_W(WGT_W), .PSUM_W(PSUM_W), .WMEM_DEPTH(DEPTH)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic signed [ACT_W-1:0] pa;
    logic pr;
    logic [3:0] pad;
    logic signed [PSUM_W-1:0] exp_psum;
    act_in = 0; rd_req_in = 0; rd_addr_in = 0; psum_in = 0; wr_en = 0; wr_addr = 0; wr_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 4'(i); wr_data = WGT_W'($urandom);
      wref[i] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    pa = 0; pr = 0; pad = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      act_in = ACT_W'($urandom); rd_req_in = ($urandom % 4) != 0;
      rd_addr_in = 4'($urandom); psum_in = PSUM_W'($signed($urandom) >>> 8);
      if (i == 5) begin act_in = -128; end
      @(posedge clk); #1;
      exp_psum = pr ? psum_in + PSUM_W'(pa) * PSUM_W'(wref[pad]) : 0;
      check(psum_out == exp_psum, $sformatf("psum %0d exp %0d", psum_out, exp_psum));
      check(act_out == act_in && rd_req_out == rd_req_in && rd_addr_out == rd_addr_in,
            "forwarded registers");
      pa = act_in; pr = rd_req_in; pad = rd_addr_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

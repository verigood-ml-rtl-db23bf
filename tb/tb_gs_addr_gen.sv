// Self-checking testbench for gs_addr_gen: several random loop configurations
// (two and three levels) with a randomly stalled `ready`; every address is
// compared with the nested-loop formula base + sum i_k * stride_k, and the
// number of addresses, `last` and the cycle count without stalls are checked.
module tb_gs_addr_gen;
  localparam int NL = 3, AW = 24, CW = 16;
  logic clk = 0, rst_n = 0, start = 0, ready, valid, last, busy;
  logic [AW-1:0] base, addr;
  logic [CW-1:0] count [NL];
  logic [AW-1:0] stride [NL];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  gs_addr_gen #(.NLOOP(NL), .AW(AW), .CW(CW)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    ready = 1; base = 0;
    for (int k = 0; k < NL; k++) begin count[k] = 1; stride[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      int c [NL];
      int n, cycles, exp_n;
      logic stall_mode;
      stall_mode = (t % 2) == 1;
      @(negedge clk);
      base = AW'($urandom % 1000);
      for (int k = 0; k < NL; k++) begin
        c[k] = 1 + $urandom % 4;
        count[k] = CW'(c[k]);
        stride[k] = AW'($urandom % 64);
      end
      if (t == 0) count[1] = 0;   // zero count acts as one
      if (t == 0) c[1] = 1;
      exp_n = c[0] * c[1] * c[2];
      start = 1;
      @(negedge clk) start = 0;
      n = 0; cycles = 0;
      for (int i2 = 0; i2 < c[2]; i2++)
        for (int i1 = 0; i1 < c[1]; i1++)
          for (int i0 = 0; i0 < c[0]; i0++) begin
            ready = stall_mode ? ($urandom % 2) : 1;
            while (!ready) begin
              check(valid, "valid held while stalled");
              @(negedge clk); cycles++;
              ready = $urandom % 2;
            end
            check(valid && addr == AW'(base + i0 * stride[0] + i1 * stride[1] + i2 * stride[2]),
                  $sformatf("addr %0d (%0d,%0d,%0d)", addr, i0, i1, i2));
            check(last == (n == exp_n - 1), "last flag");
            n++;
            @(negedge clk); cycles++;
          end
      ready = 1;
      check(!valid && !busy, "idle after last");
      if (!stall_mode) check(cycles == exp_n, $sformatf("one address per cycle: %0d", cycles));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

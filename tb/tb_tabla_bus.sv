// Self-checking testbench for tabla_bus (4 nodes). Every node pushes random
// words to random destinations while every node pops its read buffers at
// random. Checks that each word reaches the read buffer of its destination
// for its source, in order per source/destination pair, that the leader moves
// at most one word per cycle, and that under full contention the grant
// rotates so every node is served.
module tb_tabla_bus;
  localparam int NODES = 4, DW = 16, WORDS = 60;
  logic clk = 0, rst_n = 0;
  logic wr_valid [NODES];
  logic [1:0] wr_dest [NODES];
  logic [DW-1:0] wr_data [NODES];
  logic wr_ready [NODES];
  logic rd_valid [NODES][NODES];
  logic [DW-1:0] rd_data [NODES][NODES];
  logic rd_pop [NODES][NODES];
  logic grant_valid;
  logic [1:0] grant_src;
  int checks = 0, failures = 0;
  logic [DW-1:0] expq [NODES][NODES][$];
  int sent [NODES];
  int recv = 0, grants = 0;
  int granted [NODES];
  logic contend = 0;

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tabla_bus #(.NODES(NODES), .DW(DW), .WDEPTH(4), .RDEPTH(2)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // producers and consumers, driven at the negative edge
  always @(negedge clk) begin
    if (rst_n) begin
      for (int n = 0; n < NODES; n++) begin
        wr_valid[n] = (sent[n] < WORDS) && (contend || ($urandom % 3 != 0));
        wr_dest[n]  = 2'($urandom);
        wr_data[n]  = DW'({n[3:0], 12'($urandom)});
        for (int s = 0; s < NODES; s++) rd_pop[n][s] = rd_valid[n][s] && (contend ? 1'b1 : ($urandom % 2 == 0));
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int n = 0; n < NODES; n++) begin
        if (wr_valid[n] && wr_ready[n]) begin
          expq[wr_dest[n]][n].push_back(wr_data[n]);
          sent[n]++;
        end
        for (int s = 0; s < NODES; s++)
          if (rd_pop[n][s]) begin
            automatic logic [DW-1:0] e = expq[n][s].size() ? expq[n][s].pop_front() : 'x;
            check(rd_data[n][s] == e, $sformatf("dst %0d src %0d: %h vs %h", n, s, rd_data[n][s], e));
            recv++;
          end
      end
      if (grant_valid) begin grants++; if (contend) granted[grant_src]++; end
    end
  end

  initial begin
    for (int n = 0; n < NODES; n++) begin
      wr_valid[n] = 0; wr_dest[n] = 0; wr_data[n] = 0; sent[n] = 0; granted[n] = 0;
      for (int s = 0; s < NODES; s++) rd_pop[n][s] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (300) @(negedge clk);
    contend = 1;
    for (int n = 0; n < NODES; n++) sent[n] = 0;
    repeat (40) @(negedge clk);
    for (int n = 0; n < NODES; n++)
      check(granted[n] >= 8, $sformatf("node %0d granted %0d times under contention", n, granted[n]));
    contend = 0;
    repeat (400) @(negedge clk);
    check(recv == grants, $sformatf("one word per grant: %0d received, %0d grants", recv, grants));
    check(recv >= NODES * WORDS, $sformatf("%0d words delivered", recv));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

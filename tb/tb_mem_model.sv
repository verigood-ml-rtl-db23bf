// Behavioural model of one off-chip memory channel, for testbenches only.
// Word-addressed array of DEPTH words. A request is granted in a cycle where
// mem_gnt is high; mem_gnt is pseudo-randomly withheld about one cycle in
// STALL_PCT percent to exercise back-pressure. Read data returns in order,
// LAT cycles after the grant. `stalls` counts cycles a request waited.
module tb_mem_model #(
  parameter int AW = 24, parameter int DW = 32, parameter int DEPTH = 4096,
  parameter int LAT = 3, parameter int STALL_PCT = 25, parameter int SEED = 1
) (
  input  logic          clk,
  input  logic          mem_req,
  input  logic          mem_we,
  input  logic [AW-1:0] mem_addr,
  input  logic [DW-1:0] mem_wdata,
  output logic          mem_gnt,
  output logic          mem_rvalid,
  output logic [DW-1:0] mem_rdata
);
  logic [DW-1:0] mem [DEPTH];
  logic          pv [LAT];
  logic [DW-1:0] pd [LAT];
  int unsigned   lfsr = SEED;
  int            stalls = 0;

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    for (int i = 0; i < LAT; i++) begin pv[i] = 0; pd[i] = '0; end
    mem_gnt = 0;
  end

  always @(negedge clk) begin
    lfsr = lfsr * 1103515245 + 12345;
    mem_gnt = ((lfsr >> 16) % 100) >= STALL_PCT;
  end

  always @(posedge clk) begin
    if (mem_req && !mem_gnt) stalls++;
    for (int i = LAT - 1; i > 0; i--) begin pv[i] <= pv[i-1]; pd[i] <= pd[i-1]; end
    pv[0] <= mem_req && mem_gnt && !mem_we;
    pd[0] <= mem[mem_addr % DEPTH];
    if (mem_req && mem_gnt && mem_we) mem[mem_addr % DEPTH] <= mem_wdata;
  end

  assign mem_rvalid = pv[LAT-1];
  assign mem_rdata  = pd[LAT-1];
endmodule

// nf_ssram_model: behavioural model of the external pipelined SSRAM (not RTL).
//
// One flow record per address. A write is stored at the clock edge; read
// data appears LAT cycles after the read request. Unwritten addresses read
// as zero.
module nf_ssram_model
  import nf_pkg::*;
#(
  parameter int unsigned PTR_W = 15,
  parameter int unsigned LAT   = 2
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [PTR_W-1:0] addr,
  input  flow_rec_t        wdata,
  output flow_rec_t        rdata
);
  flow_rec_t mem [int unsigned];
  flow_rec_t pipe [LAT];

  assign rdata = pipe[LAT-1];

  always @(posedge clk) begin
    for (int s = LAT - 1; s > 0; s--) pipe[s] <= pipe[s-1];
    pipe[0] <= '0;
    if (en && we) mem[int'(addr)] = wdata;
    else if (en) pipe[0] <= mem.exists(int'(addr)) ? mem[int'(addr)] : '0;
  end
endmodule

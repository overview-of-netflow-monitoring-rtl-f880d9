// nf_tsu: timestamp unit.
//
// A free-running CNT_W-bit counter clocked at the system clock (100 MHz,
// 10 ns, in the architecture). Only the TS_W most significant bits leave the
// unit, so with the defaults (37 and 32) one timestamp step is 2^5 * 10 ns =
// 320 ns and the counter wraps after 2^37 * 10 ns, about 1374 s. Software reads
// `ts` at known UNIX times and interpolates packet timestamps from it.
//
// Interface: `ts` is registered and moves by one every 2^(CNT_W-TS_W) cycles.
// Synchronous active-high reset clears the counter (reset value is this
// design's choice). The counter width, the output width and the clock
// follow the architecture.
module nf_tsu #(
  parameter int unsigned CNT_W = 37,
  parameter int unsigned TS_W  = 32
) (
  input  logic            clk,
  input  logic            rst,
  output logic [TS_W-1:0] ts
);

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end

  assign ts = cnt[CNT_W-1 -: TS_W];

endmodule

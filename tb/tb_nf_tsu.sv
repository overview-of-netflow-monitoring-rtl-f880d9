// tb_nf_tsu: checks the timestamp unit.
// The default unit (37-bit counter, 32-bit output) must step its output
// once every 32 cycles; a small one (8-bit counter, 4-bit output) must also
// wrap to zero after 256 cycles. Expected values come from the cycle count.
module tb_nf_tsu;
  logic clk = 0, rst = 1;
  logic [31:0] ts;
  logic [3:0]  ts_small;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nf_tsu dut (.clk, .rst, .ts);
  nf_tsu #(.CNT_W(8), .TS_W(4)) dut_small (.clk, .rst, .ts(ts_small));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    // after the edge that releases reset the counter holds 0; n edges later it holds n
    for (int n = 0; n < 700; n++) begin
      @(posedge clk); #1;
      checks++;
      if (ts !== 32'((n + 1) >> 5)) begin
        failures++;
        $display("ts mismatch at %0d: %0d", n, ts);
      end
      checks++;
      if (ts_small !== 4'(((n + 1) % 256) >> 4)) begin
        failures++;
        $display("small ts mismatch at %0d: %0d", n, ts_small);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

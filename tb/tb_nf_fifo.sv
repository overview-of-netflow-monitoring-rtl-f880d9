// tb_nf_fifo: checks the FIFO used as packet FIFO and SW_FIFO.
// Random pushes and pops against a queue model; checks order, data, the
// full and empty flags and the level, with a depth of 5 (not a power of
// two) so that pointer wrap is exercised.
module tb_nf_fifo;
  localparam int DEPTH = 5;
  logic clk = 0, rst = 1;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  logic [2:0]  level;
  logic [15:0] model[$];
  int checks = 0, failures = 0;
  int fulls = 0;

  always #5 clk = ~clk;

  nf_fifo #(.T(logic [15:0]), .DEPTH(DEPTH)) dut (
    .clk, .rst, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .level);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 99) < ((n / 500) % 2 ? 30 : 70));
      out_ready = ($urandom_range(0, 99) < ((n / 500) % 2 ? 70 : 30));
      in_data   = 16'($urandom());
      #1;
      check(in_ready == (model.size() < DEPTH), "in_ready");
      check(out_valid == (model.size() > 0), "out_valid");
      check(int'(level) == model.size(), "level");
      if (model.size() == DEPTH) fulls++;
      if (out_valid && model.size() > 0) check(out_data == model[0], "data");
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    check(fulls > 0, "fifo never became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nf_hash: checks the hash unit.
// Random flow keys (IPv4 and IPv6) go in, with random back-pressure on the
// output; every hash must equal the reference remainder from nf_tb_pkg, in
// order, and one key must be accepted per cycle when the output is free.
module tb_nf_hash;
  import nf_pkg::*;
  import nf_tb_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid, in_ready, out_valid, out_ready;
  flow_key_t in_key;
  logic [63:0] out_hash;
  logic [63:0] expq[$];
  int checks = 0, failures = 0, sent = 0, got = 0;

  always #5 clk = ~clk;

  nf_hash dut (.clk, .rst, .in_valid, .in_ready, .in_key, .out_valid, .out_ready, .out_hash);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a hand-checked value: the all-zero key hashes to zero, a single 1 in the
  // lowest key bit hashes to the polynomial itself
  initial begin
    flow_key_t k;
    k = '0;
    checks++; if (ref_hash(k) != 64'h0) failures++;
    k.tos = 8'h01;
    checks++; if (ref_hash(k) != 64'h42F0E1EBA9EA3693) failures++;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_key = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    while (got < 300) begin
      @(negedge clk);
      out_ready = (got < 100) ? 1'b1 : ($urandom_range(0, 3) != 0);
      #1;
      @(posedge clk);
      if (out_valid && out_ready) begin
        checks++;
        if (expq.size() == 0 || out_hash != expq[0]) begin
          failures++;
          $display("hash mismatch %h", out_hash);
        end
        if (expq.size() > 0) void'(expq.pop_front());
        got++;
      end
      if (in_valid && in_ready) begin
        expq.push_back(ref_hash(in_key));
        sent++;
      end
      #1;
      if (!in_valid || in_ready) begin
        in_valid = (sent < 300);
        in_key   = rand_key(sent % 2, sent + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

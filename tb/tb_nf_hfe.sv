// tb_nf_hfe: checks the header field extractor.
// Streams frames built by nf_tb_pkg (FCS removed) into the extractor with
// random gaps and random output back-pressure: IPv4 and IPv6, TCP and UDP,
// IPv4 with header options, and ARP frames that must yield nothing. Each
// result is compared with the key the frame was built from, the expected IP
// byte count, the TCP flags and the timestamp sent alongside.
module tb_nf_hfe;
  import nf_pkg::*;
  import nf_tb_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, in_sop = 0, in_eop = 0;
  logic [7:0] in_data = 0;
  logic [31:0] in_ts = 0;
  logic out_valid, out_ready = 0;
  pkt_info_t out_info;
  logic [31:0] cnt_non_ip;
  pkt_info_t expq[$];
  int checks = 0, failures = 0, n_arp = 0, n_ip = 0, n_got = 0;

  always #5 clk = ~clk;

  nf_hfe dut (.clk, .rst, .in_valid, .in_ready, .in_data, .in_sop, .in_eop, .in_ts,
              .out_valid, .out_ready, .out_info, .cnt_non_ip);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic stream(bytes_t f, logic [31:0] ts);
    int n = f.size() - 4;
    for (int i = 0; i < n; i++) begin
      while ($urandom_range(0, 4) == 0) begin
        @(negedge clk); in_valid = 0;
      end
      @(negedge clk);
      in_valid = 1; in_data = f[i]; in_sop = (i == 0); in_eop = (i == n - 1); in_ts = ts;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
  endtask

  // IPv4 with two words of options: IHL = 7
  function automatic bytes_t with_options(bytes_t f);
    bytes_t g;
    for (int i = 0; i < 14; i++) g.push_back(f[i]);
    g.push_back(8'h47);
    for (int i = 15; i < 34; i++) g.push_back(f[i]);
    for (int i = 0; i < 8; i++) g.push_back(8'h01);
    for (int i = 34; i < f.size(); i++) g.push_back(f[i]);
    // total length grows by 8
    {g[16], g[17]} = {g[16], g[17]} + 16'd8;
    return g;
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready <= ($urandom_range(0, 2) != 0);

  always @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      n_got++;
      check(expq.size() > 0, "unexpected result");
      if (expq.size() > 0) begin
        check(out_info.key == expq[0].key, "key");
        check(out_info.bytes == expq[0].bytes, "bytes");
        check(out_info.flags == expq[0].flags, "flags");
        check(out_info.ts == expq[0].ts, "timestamp");
        if (out_info.key != expq[0].key) $display("got %p exp %p", out_info.key, expq[0].key);
        void'(expq.pop_front());
      end
    end
  end

  initial begin
    bytes_t f;
    flow_key_t k;
    pkt_info_t e;
    bit v6;
    int pl;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 120; n++) begin
      v6 = (n % 3 == 1);
      k  = rand_key(v6, n + 11);
      pl = $urandom_range(0, 30);
      f  = make_frame(k, v6, pl, 8'(n));
      e.key   = k;
      e.bytes = 16'(ip_bytes(k, v6, pl));
      e.flags = (k.proto == 8'd6) ? 8'(n) : 8'h00;
      e.ts    = 32'(n * 1000 + 7);
      if (n % 10 == 9) begin
        f[12] = 8'h08; f[13] = 8'h06;             // ARP: no result
        n_arp++;
        stream(f, e.ts);
      end else begin
        if (n % 10 == 4 && !v6) begin
          f = with_options(f);
          e.bytes = e.bytes + 16'd8;
        end
        expq.push_back(e);
        n_ip++;
        stream(f, e.ts);
      end
    end
    repeat (20) @(negedge clk);
    check(expq.size() == 0, "all results delivered");
    check(n_got == n_ip, "result count");
    check(cnt_non_ip == 32'(n_arp), "non-IP counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nf_ibuf: checks the input buffer.
// Sends GMII frames (preamble, SFD, frame, inter-frame gap) built by
// nf_tb_pkg: good ones, ones with a corrupted byte (bad CRC), ones with
// RX_ER raised, and, while the reader is held off, enough frames to fill a
// 256-byte buffer. Every good frame that found room must come out once, in
// order, without its FCS, with the length and the timestamp taken at its
// SFD; every other frame must be missing and counted.
module tb_nf_ibuf;
  import nf_pkg::*;
  import nf_tb_pkg::*;
  logic clk = 0, rst = 1;
  logic [31:0] ts_in = 0;
  logic gmii_rx_dv = 0, gmii_rx_er = 0;
  logic [7:0] gmii_rxd = 0;
  logic out_valid, out_ready, out_sop, out_eop;
  logic [7:0] out_data;
  logic [15:0] out_len;
  logic [31:0] out_ts;
  logic [31:0] cnt_ok, cnt_bad, cnt_full;
  int checks = 0, failures = 0;

  // expected packets: their bytes (FCS removed) back to back, lengths, timestamps
  byte unsigned exp_bytes[$];
  int           exp_len[$];
  logic [31:0]  exp_ts[$];
  bytes_t cur;
  int n_good = 0, n_bad = 0, n_full_expected = 0, n_out = 0;
  bit hold_reader = 0;

  always #5 clk = ~clk;
  always @(posedge clk) ts_in <= ts_in + 1;

  nf_ibuf #(.BUF_AW(8), .DESC_DEPTH(4)) dut (
    .clk, .rst, .ts_in, .gmii_rx_dv, .gmii_rx_er, .gmii_rxd,
    .out_valid, .out_ready, .out_data, .out_sop, .out_eop, .out_len, .out_ts,
    .cnt_frames_ok(cnt_ok), .cnt_frames_bad(cnt_bad), .cnt_frames_full(cnt_full));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // keep: the frame is expected at the output, stamped with the SFD cycle's time
  task automatic send(bytes_t f, bit er, bit keep);
    for (int i = 0; i < 7; i++) begin
      @(negedge clk); gmii_rx_dv = 1; gmii_rx_er = 0; gmii_rxd = 8'h55;
    end
    @(negedge clk); gmii_rxd = 8'hD5;
    if (keep) push_expected(f, ts_in);
    foreach (f[i]) begin
      @(negedge clk); gmii_rxd = f[i]; gmii_rx_er = er && (i == 20);
    end
    @(negedge clk); gmii_rx_dv = 0; gmii_rx_er = 0; gmii_rxd = 0;
    repeat (12) @(negedge clk);
  endtask

  task automatic push_expected(bytes_t f, logic [31:0] t);
    for (int i = 0; i < f.size() - 4; i++) exp_bytes.push_back(f[i]);
    exp_len.push_back(f.size() - 4);
    exp_ts.push_back(t);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader
  always @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      cur.push_back(out_data);
      if (out_sop) begin
        check(exp_len.size() > 0, "unexpected packet");
        if (exp_len.size() > 0) begin
          check(out_len == 16'(exp_len[0]), "length");
          check(out_ts == exp_ts[0], "timestamp");
        end
      end
      if (out_eop) begin
        if (exp_len.size() > 0) begin
          automatic bit same = (cur.size() == exp_len[0]);
          for (int i = 0; i < exp_len[0]; i++) begin
            automatic byte unsigned e = exp_bytes.pop_front();
            if (i >= cur.size() || cur[i] != e) begin if (same) $display("diff at %0d got %h exp %h", i, cur[i], e); same = 0; end
          end
          if (!same) $display("size got %0d exp %0d first %h %h", cur.size(), exp_len[0], cur[0], cur[cur.size()-1]);
          check(same, "packet bytes");
          void'(exp_len.pop_front());
          void'(exp_ts.pop_front());
        end
        cur = {};
        n_out++;
      end
    end
  end

  initial begin
    bytes_t f;
    out_ready = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      f = make_frame(rand_key(n % 3 == 0, n + 5), n % 3 == 0, $urandom_range(0, 60), 8'h12);
      out_ready = ($urandom_range(0, 3) != 0);
      case (n % 4)
        0, 1: begin
          send(f, 0, 1);
          n_good++;
        end
        2: begin
          f[$urandom_range(0, f.size() - 1)] ^= 8'h04;
          send(f, 0, 0);
          n_bad++;
        end
        default: begin
          send(f, 1, 0);
          n_bad++;
        end
      endcase
    end
    // buffer overflow: hold the reader, send more than 256 bytes worth
    out_ready = 0;
    repeat (200) @(negedge clk);
    check(exp_len.size() == 0, "all good frames delivered before the overflow test");
    for (int n = 0; n < 6; n++) begin
      f = make_frame(rand_key(0, 100 + n), 0, 40, 8'h02);  // 98-byte frames
      send(f, 0, n < 2);
      if (n >= 2) n_full_expected++;
    end
    out_ready = 1;
    repeat (500) @(negedge clk);
    check(exp_len.size() == 0, "frames kept before overflow delivered");
    check(cnt_ok == 32'(n_good + 2), "ok counter");
    check(cnt_bad == 32'(n_bad), "bad counter");
    check(cnt_full == 32'(n_full_expected), "full counter");
    check(n_out == n_good + 2, "packet count");
    $display("good=%0d bad=%0d full=%0d", cnt_ok, cnt_bad, cnt_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

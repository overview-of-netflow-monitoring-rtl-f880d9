// tb_netflow_linerate: the adapter fed at full gigabit line rate.
// With the clock at the GMII byte rate, frames arrive back to back (7-byte
// preamble, SFD, frame, 12-byte gap): first 400 minimum-size frames (60 bytes
// + FCS) spread over 50 flows, then 30 maximum-size frames (1514 + FCS).
// No frame may be dropped for lack of room, every packet must be counted in
// its flow, and the per-flow totals exported at the end must match what was
// sent. A 256-row table is used so that the final sweep is short; the
// per-packet work does not depend on the table size.
module tb_netflow_linerate;
  import nf_pkg::*;
  import nf_tb_pkg::*;
  localparam int ROWS = 256, PW = 8;
  logic clk = 0, rst = 1;
  logic gmii_rx_dv = 0, gmii_rx_er = 0;
  logic [7:0] gmii_rxd = 0;
  logic [31:0] sweep_period = 32'd1;
  logic [PW:0] high_water = 9'd256;
  logic [31:0] active_timeout = 32'hFFFF_FFFF;
  logic [31:0] ts;
  logic tc_srch_valid, tc_res_valid, tc_res_hit, tc_wr_en, tc_wr_vld;
  logic [63:0] tc_srch_key, tc_wr_key;
  logic [PW-1:0] tc_res_idx, tc_wr_idx, ss_addr;
  logic ss_en, ss_we;
  flow_rec_t ss_wdata, ss_rdata, sw_rec;
  logic sw_valid, sw_ready = 1;
  logic init_done, aggressive;
  logic [PW:0] rec_count;
  logic [31:0] cnt_frames_ok, cnt_frames_bad, cnt_frames_full, cnt_non_ip;
  logic [31:0] cnt_inactive, cnt_active, cnt_full, cnt_discard;

  int checks = 0, failures = 0;
  longint cyc = 0;
  longint wire_bytes = 0;
  longint sent_pk [flow_key_t];
  longint sent_by [flow_key_t];
  longint got_pk  [flow_key_t];
  longint got_by  [flow_key_t];

  always #4 clk = ~clk;                       // 125 MHz GMII byte clock
  always @(posedge clk) cyc <= cyc + 1;

  netflow_top #(.ROWS(ROWS)) dut (
    .clk, .rst, .gmii_rx_dv, .gmii_rx_er, .gmii_rxd,
    .sweep_period, .high_water, .active_timeout, .ts,
    .tc_srch_valid, .tc_srch_key, .tc_res_valid, .tc_res_hit, .tc_res_idx,
    .tc_wr_en, .tc_wr_idx, .tc_wr_key, .tc_wr_vld,
    .ss_en, .ss_we, .ss_addr, .ss_wdata, .ss_rdata,
    .sw_valid, .sw_ready, .sw_rec,
    .init_done, .aggressive, .rec_count,
    .cnt_frames_ok, .cnt_frames_bad, .cnt_frames_full, .cnt_non_ip,
    .cnt_inactive, .cnt_active, .cnt_full, .cnt_discard);

  nf_tcam_model #(.ROWS(ROWS), .LAT(2)) tcam (.clk,
    .srch_valid(tc_srch_valid), .srch_key(tc_srch_key),
    .res_valid(tc_res_valid), .res_hit(tc_res_hit), .res_idx(tc_res_idx),
    .wr_en(tc_wr_en), .wr_idx(tc_wr_idx), .wr_key(tc_wr_key), .wr_vld(tc_wr_vld));

  nf_ssram_model #(.PTR_W(PW), .LAT(2)) ssram (.clk, .en(ss_en), .we(ss_we),
    .addr(ss_addr), .wdata(ss_wdata), .rdata(ss_rdata));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0d", what, cyc); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && sw_valid && sw_ready) begin
      automatic flow_key_t k = sw_rec.key;
      if (!got_pk.exists(k)) begin got_pk[k] = 0; got_by[k] = 0; end
      got_pk[k] += longint'(sw_rec.packets);
      got_by[k] += longint'(sw_rec.bytes);
    end
  end

  task automatic send_ip(flow_key_t k, int pl);
    bytes_t f = make_frame(k, 0, pl, 8'h10);
    wire_bytes += 8 + f.size() + 12;
    for (int i = 0; i < 7; i++) begin
      @(negedge clk); gmii_rx_dv = 1; gmii_rxd = 8'h55;
    end
    @(negedge clk); gmii_rxd = 8'hD5;
    foreach (f[i]) begin
      @(negedge clk); gmii_rxd = f[i];
    end
    @(negedge clk); gmii_rx_dv = 0; gmii_rxd = 0;
    repeat (11) @(negedge clk);               // 12-byte gap including the cycle above
    if (!sent_pk.exists(k)) begin sent_pk[k] = 0; sent_by[k] = 0; end
    sent_pk[k]++;
    sent_by[k] += ip_bytes(k, 0, pl);
  endtask

  initial begin
    flow_key_t keys[50];
    longint t0, t_small, t_big;
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (init_done);
    for (int i = 0; i < 50; i++) keys[i] = rand_key(0, 700 + i);
    @(negedge clk);
    t0 = cyc; wire_bytes = 0;
    for (int n = 0; n < 400; n++) send_ip(keys[$urandom_range(0, 49)], 0);   // 60-byte frames
    t_small = cyc - t0;
    if (t_small != wire_bytes) $display("small: %0d cycles for %0d byte times", t_small, wire_bytes);
    check(t_small == wire_bytes, "minimum frames sent at line rate (one byte per cycle)");
    t0 = cyc; wire_bytes = 0;
    for (int n = 0; n < 30; n++) send_ip(keys[n % 50], 1514 - 54);             // 1514-byte frames
    t_big = cyc - t0;
    check(t_big == wire_bytes, "maximum frames sent at line rate (one byte per cycle)");
    t0 = cyc;
    // wait until the last frame has left the input buffer and the table is
    // empty for 50 cycles in a row
    begin
      int quiet = 0;
      while (quiet < 50 && cyc - t0 < 100000) begin
        @(negedge clk);
        if (rec_count != 0 || dut.u_ibuf.out_valid || sw_valid) quiet = 0;
        else quiet++;
      end
    end
    check(cnt_frames_ok == 430, "every frame kept");
    check(cnt_frames_full == 0, "no frame lost for lack of room");
    check(cnt_discard == 0, "no packet discarded");
    check(rec_count == 0, "table drained");
    foreach (sent_pk[k]) begin
      check(got_pk.exists(k) && got_pk[k] == sent_pk[k] && got_by[k] == sent_by[k], "per-flow totals");
      if (!got_pk.exists(k) || got_pk[k] != sent_pk[k] || got_by[k] != sent_by[k])
        $display("flow: sent %0d/%0d got %0d/%0d", sent_pk[k], sent_by[k], got_pk[k], got_by[k]);
    end
    $display("430 frames in %0d cycles at line rate; flows %0d", t_small + t_big, sent_pk.num());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

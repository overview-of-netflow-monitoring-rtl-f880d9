// tb_netflow_top: end-to-end test of the adapter with a 16-row flow table.
// GMII frames go in; exported flow records come out of SW_FIFO. The TCAM and
// SSRAM are behavioural models. Phases:
//  A  mixed IPv4/IPv6, TCP/UDP flows, interleaved, plus frames with a bad
//     CRC and ARP frames;
//  B  one long flow with a short active timeout, so it is exported in parts;
//  C  silence until the sweep has disposed of every flow (inactive timeout);
//  D1 more new flows than rows: the packets that find no row are discarded;
//  D2 a burst with the aggressive limit set and software not reading SW_FIFO:
//     the sweep runs fast, the pipeline backs up behind the full SW_FIFO
//     and the input buffer overflows;
//  E  software reads again and everything drains.
// For every flow of phases A and B the exported records together must hold
// exactly the packets, bytes and flags sent, from the first packet's
// timestamp to the last one's. Over the whole run, exported packets plus
// discarded packets must equal the IP packets the input buffer kept. Each
// mechanism (create, update, CRC drop, non-IP drop, inactive expiry, active
// expiry, aggressive mode, full table, buffer overflow, back-pressure) is
// counted and must have happened.
module tb_netflow_top;
  import nf_pkg::*;
  import nf_tb_pkg::*;
  localparam int ROWS = 16, PW = 4;
  logic clk = 0, rst = 1;
  logic gmii_rx_dv = 0, gmii_rx_er = 0;
  logic [7:0] gmii_rxd = 0;
  logic [31:0] sweep_period = 32'd40;
  logic [PW:0] high_water = 5'd16;
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

  typedef struct { int packets; longint bytes; logic [7:0] flags;
                   logic [31:0] first_ts, last_ts; int n_rec; } acc_t;
  acc_t sent [flow_key_t];
  acc_t got  [flow_key_t];
  flow_key_t checked_keys[$];
  longint exported_pkts = 0;
  int n_new = 0, n_upd = 0, n_aggr = 0, n_sw_stall = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  netflow_top #(.ROWS(ROWS), .BUF_AW(9), .PKT_FIFO_DEPTH(8), .SW_FIFO_DEPTH(2)) dut (
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  always @(posedge clk) begin
    if (!rst) begin
      if (dut.cmd_valid && dut.cmd_ready && dut.cmd_op == SR_NEW)    n_new++;
      if (dut.cmd_valid && dut.cmd_ready && dut.cmd_op == SR_UPDATE) n_upd++;
      if (aggressive) n_aggr++;
      if (dut.exp_valid && !dut.exp_ready) n_sw_stall++;
      if (sw_valid && sw_ready) begin
        automatic flow_key_t k = sw_rec.key;
        if (!got.exists(k)) got[k] = '{0, 0, 8'h0, 32'hFFFF_FFFF, 32'h0, 0};
        got[k].packets += int'(sw_rec.packets);
        got[k].bytes   += longint'(sw_rec.bytes);
        got[k].flags   |= sw_rec.flags;
        if (sw_rec.start_ts < got[k].first_ts) got[k].first_ts = sw_rec.start_ts;
        if (sw_rec.end_ts > got[k].last_ts)    got[k].last_ts  = sw_rec.end_ts;
        got[k].n_rec++;
        exported_pkts += longint'(sw_rec.packets);
        check(sw_rec.start_ts <= sw_rec.end_ts, "start before end");
      end
    end
  end

  // send one frame; a kept IP frame is added to the per-flow reference
  task automatic send(bytes_t f, bit corrupt, bit track, flow_key_t k, int nbytes, logic [7:0] fl);
    logic [31:0] t;
    for (int i = 0; i < 7; i++) begin
      @(negedge clk); gmii_rx_dv = 1; gmii_rxd = 8'h55;
    end
    @(negedge clk); gmii_rxd = 8'hD5; t = ts;
    if (corrupt) f[30] ^= 8'h80;
    foreach (f[i]) begin
      @(negedge clk); gmii_rxd = f[i];
    end
    @(negedge clk); gmii_rx_dv = 0; gmii_rxd = 0;
    repeat (12) @(negedge clk);
    if (track) begin
      if (!sent.exists(k)) begin
        sent[k] = '{0, 0, 8'h0, t, t, 0};
        checked_keys.push_back(k);
      end
      sent[k].packets++;
      sent[k].bytes += nbytes;
      sent[k].flags |= fl;
      sent[k].last_ts = t;
    end
  endtask

  task automatic send_ip(flow_key_t k, bit v6, int pl, logic [7:0] fl, bit track);
    bytes_t f = make_frame(k, v6, pl, fl);
    send(f, 0, track, k, ip_bytes(k, v6, pl), (k.proto == 8'd6) ? fl : 8'h00);
  endtask

  task automatic wait_empty(longint limit);
    longint t0 = cyc;
    int quiet = 0;
    // empty table, nothing buffered, for 50 cycles in a row (exports in flight settle)
    while (quiet < 50 && cyc - t0 < limit) begin
      @(negedge clk);
      if (rec_count != 0 || sw_valid || dut.u_ibuf.out_valid || dut.u_sram.state != 0) quiet = 0;
      else quiet++;
    end
  endtask

  initial begin
    flow_key_t keys[6], lk;
    bit v6s[6];
    bytes_t f;
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (init_done);

    // ---- A: interleaved flows, bad CRC, ARP ----
    for (int i = 0; i < 6; i++) begin
      v6s[i]  = (i % 2 == 1);
      keys[i] = rand_key(v6s[i], 50 + i);
    end
    for (int n = 0; n < 30; n++) begin
      send_ip(keys[n % 6], v6s[n % 6], $urandom_range(0, 40), 8'(1 << (n % 8)), 1);
      if (n % 10 == 3) begin
        f = make_frame(keys[0], 0, 10, 8'h01);
        send(f, 1, 0, keys[0], 0, 0);                       // bad CRC
      end
      if (n % 10 == 7) begin
        f = make_frame(keys[1], 0, 10, 8'h01);
        f[12] = 8'h08; f[13] = 8'h06;
        f = f[0:f.size()-5];
        begin
          automatic logic [31:0] c = eth_fcs(f);
          for (int i = 0; i < 4; i++) f.push_back(c[8*i +: 8]);
        end
        send(f, 0, 0, keys[1], 0, 0);                       // ARP
      end
    end
    check(cnt_frames_bad == 3, "bad CRC frames dropped");
    check(cnt_non_ip == 3, "ARP frames ignored");

    // ---- B: long flow, short active timeout (timestamp unit = 32 cycles) ----
    active_timeout = 32'd20;                                // 640 cycles
    lk = rand_key(0, 77);
    lk.proto = 8'd6;
    for (int n = 0; n < 12; n++) begin
      send_ip(lk, 0, 20, 8'h10, 1);
      repeat (150) @(negedge clk);
    end
    active_timeout = 32'hFFFF_FFFF;

    // ---- C: let every flow expire ----
    wait_empty(100000);
    check(rec_count == 0, "all flows disposed by the sweep");
    check(cnt_active > 0, "active timeout disposed the long flow");
    check(cnt_inactive > 0, "inactive timeout disposed flows");
    foreach (checked_keys[i]) begin
      automatic flow_key_t k = checked_keys[i];
      check(got.exists(k), "flow exported");
      if (got.exists(k)) begin
        check(got[k].packets == sent[k].packets, "packets per flow");
        check(got[k].bytes == sent[k].bytes, "bytes per flow");
        check(got[k].flags == sent[k].flags, "flags per flow");
        check(got[k].first_ts == sent[k].first_ts, "first timestamp");
        check(got[k].last_ts == sent[k].last_ts, "last timestamp");
      end
    end
    check(got.exists(lk) && got[lk].n_rec > 1, "long flow exported in parts");

    // ---- D1: more new flows than rows, slow sweep, no aggressive limit ----
    high_water = 5'd31;
    sweep_period = 32'd100000;
    for (int n = 0; n < ROWS + 4; n++) send_ip(rand_key(0, 300 + n), 0, 10, 8'h02, 0);
    repeat (300) @(negedge clk);
    check(cnt_full == 4, "packets beyond the table size discarded");

    // ---- D2: aggressive limit, software not reading, burst ----
    high_water = 5'd12;
    sw_ready = 0;
    for (int n = 0; n < 30; n++) send_ip(rand_key(0, 400 + n), 0, 10, 8'h02, 0);
    repeat (3000) @(negedge clk);

    // ---- E: drain ----
    sw_ready = 1;
    sweep_period = 32'd4;
    wait_empty(200000);
    check(rec_count == 0, "table empty at the end");
    check(cnt_full > 0 && cnt_discard == cnt_full, "full table discards packets");
    check(cnt_frames_full > 0, "input buffer overflow dropped frames");
    check(n_aggr > 0, "aggressive mode entered");
    check(!aggressive, "aggressive mode left");
    check(n_sw_stall > 0, "SW_FIFO back-pressure");
    check(n_new > 0 && n_upd > 0, "records created and updated");
    check(exported_pkts + longint'(cnt_discard) == longint'(cnt_frames_ok - cnt_non_ip),
          "every kept IP packet exported or discarded");
    check(tcam.entries() == 0, "TCAM empty at the end");
    $display("ok=%0d bad=%0d ovf=%0d nonip=%0d new=%0d upd=%0d inactive=%0d active=%0d full=%0d aggr_cycles=%0d stall=%0d exported_pkts=%0d",
             cnt_frames_ok, cnt_frames_bad, cnt_frames_full, cnt_non_ip, n_new, n_upd,
             cnt_inactive, cnt_active, cnt_full, n_aggr, n_sw_stall, exported_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

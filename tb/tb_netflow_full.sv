// tb_netflow_full: the adapter at its full size (32768-row flow table, all
// parameters at their defaults) through one complete operation: start-up
// clearing of the tables, eight flows (IPv4/IPv6, TCP/UDP) of five packets
// each, then silence until the sweep (one row per cycle) has disposed of
// them all. The exported records must hold exactly the packets, bytes,
// flags and first/last timestamps sent, and the table must end empty.
module tb_netflow_full;
  import nf_pkg::*;
  import nf_tb_pkg::*;
  localparam int PW = 15;
  logic clk = 0, rst = 1;
  logic gmii_rx_dv = 0, gmii_rx_er = 0;
  logic [7:0] gmii_rxd = 0;
  logic [31:0] sweep_period = 32'd1;
  logic [PW:0] high_water = 16'd30000;
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
                   logic [31:0] first_ts, last_ts; } acc_t;
  acc_t sent [flow_key_t];
  acc_t got  [flow_key_t];
  int n_rec = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  netflow_top dut (
    .clk, .rst, .gmii_rx_dv, .gmii_rx_er, .gmii_rxd,
    .sweep_period, .high_water, .active_timeout, .ts,
    .tc_srch_valid, .tc_srch_key, .tc_res_valid, .tc_res_hit, .tc_res_idx,
    .tc_wr_en, .tc_wr_idx, .tc_wr_key, .tc_wr_vld,
    .ss_en, .ss_we, .ss_addr, .ss_wdata, .ss_rdata,
    .sw_valid, .sw_ready, .sw_rec,
    .init_done, .aggressive, .rec_count,
    .cnt_frames_ok, .cnt_frames_bad, .cnt_frames_full, .cnt_non_ip,
    .cnt_inactive, .cnt_active, .cnt_full, .cnt_discard);

  nf_tcam_model #(.ROWS(32768), .LAT(2)) tcam (.clk,
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
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && sw_valid && sw_ready) begin
      automatic flow_key_t k = sw_rec.key;
      n_rec++;
      check(!got.exists(k), "one record per flow");
      got[k] = '{int'(sw_rec.packets), longint'(sw_rec.bytes), sw_rec.flags,
                 sw_rec.start_ts, sw_rec.end_ts};
    end
  end

  task automatic send_ip(flow_key_t k, bit v6, int pl, logic [7:0] fl);
    bytes_t f = make_frame(k, v6, pl, fl);
    logic [31:0] t;
    for (int i = 0; i < 7; i++) begin
      @(negedge clk); gmii_rx_dv = 1; gmii_rxd = 8'h55;
    end
    @(negedge clk); gmii_rxd = 8'hD5; t = ts;
    foreach (f[i]) begin
      @(negedge clk); gmii_rxd = f[i];
    end
    @(negedge clk); gmii_rx_dv = 0; gmii_rxd = 0;
    repeat (12) @(negedge clk);
    if (!sent.exists(k)) sent[k] = '{0, 0, 8'h0, t, t};
    sent[k].packets++;
    sent[k].bytes += ip_bytes(k, v6, pl);
    sent[k].flags |= (k.proto == 8'd6) ? fl : 8'h00;
    sent[k].last_ts = t;
  endtask

  initial begin
    flow_key_t keys[8];
    longint t0;
    repeat (3) @(posedge clk);
    rst <= 0;
    t0 = cyc;
    wait (init_done);
    check(cyc - t0 >= 32768, "start-up clears all 32768 rows");
    for (int i = 0; i < 8; i++) keys[i] = rand_key(i % 2, 900 + i);
    for (int n = 0; n < 40; n++) send_ip(keys[n % 8], (n % 8) % 2, $urandom_range(0, 100), 8'(1 << (n % 8)));
    check(rec_count == 8, "eight records stored");
    t0 = cyc;
    while (rec_count != 0 && cyc - t0 < 400000) @(negedge clk);
    repeat (50) @(negedge clk);
    $display("flows disposed %0d cycles after the last packet", cyc - t0);
    check(rec_count == 0, "all flows disposed");
    check(cyc - t0 > 4 * 32768 && cyc - t0 < 7 * 32768, "inactive timeout of 5..6 sweep rounds");
    check(n_rec == 8, "eight records exported");
    foreach (keys[i]) begin
      automatic flow_key_t k = keys[i];
      check(got.exists(k), "flow exported");
      if (got.exists(k)) begin
        check(got[k].packets == sent[k].packets && got[k].bytes == sent[k].bytes, "counts");
        check(got[k].flags == sent[k].flags, "flags");
        check(got[k].first_ts == sent[k].first_ts && got[k].last_ts == sent[k].last_ts, "timestamps");
      end
    end
    check(cnt_frames_ok == 40 && cnt_inactive == 8, "counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nf_sram: checks the SSRAM controller with a behavioural SSRAM.
// The testbench plays MAN and the packet FIFO: it issues random NEW, UPDATE,
// DELETE and DISCARD commands over 16 rows, each with its packet, and keeps
// its own copy of every record. Exported records (random SW_FIFO
// back-pressure) must equal that copy; an update of a flow older than the
// active timeout must raise a dispose request for its row. Command spacing
// is checked too: NEW and DISCARD take one cycle, UPDATE 2 + RD_LAT.
module tb_nf_sram;
  import nf_pkg::*;
  import nf_tb_pkg::*;
  localparam int PW = 4, LAT = 2;
  logic clk = 0, rst = 1;
  logic [31:0] active_timeout = 32'd400;
  logic cmd_valid = 0, cmd_ready;
  sram_op_e cmd_op = SR_NEW;
  logic [PW-1:0] cmd_ptr = 0;
  logic pkt_valid = 0, pkt_ready;
  pkt_info_t pkt_info = '0;
  logic sdel_valid, sdel_ready = 1;
  logic [PW-1:0] sdel_ptr;
  logic exp_valid, exp_ready = 0;
  flow_rec_t exp_rec;
  logic ss_en, ss_we;
  logic [PW-1:0] ss_addr;
  flow_rec_t ss_wdata, ss_rdata;
  logic [31:0] cnt_discard;

  int checks = 0, failures = 0;
  longint cyc = 0;
  flow_rec_t model [16];
  bit        live  [16];
  flow_rec_t exports[$];
  int sdel_expected[$];
  int n_upd = 0, n_new = 0, n_del = 0, n_disc = 0, n_sdel = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  nf_sram #(.ROWS(16), .RD_LAT(LAT)) dut (.clk, .rst, .active_timeout,
    .cmd_valid, .cmd_ready, .cmd_op, .cmd_ptr, .pkt_valid, .pkt_ready, .pkt_info,
    .sdel_valid, .sdel_ready, .sdel_ptr, .exp_valid, .exp_ready, .exp_rec,
    .ss_en, .ss_we, .ss_addr, .ss_wdata, .ss_rdata, .cnt_discard);

  nf_ssram_model #(.PTR_W(PW), .LAT(LAT)) ssram (.clk, .en(ss_en), .we(ss_we),
    .addr(ss_addr), .wdata(ss_wdata), .rdata(ss_rdata));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0d", what, cyc); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) exp_ready <= ($urandom_range(0, 2) != 0);
  always @(posedge clk) begin
    if (!rst && exp_valid && exp_ready) begin
      check(exports.size() > 0, "unexpected export");
      if (exports.size() > 0) begin
        check(exp_rec == exports[0], "exported record");
        void'(exports.pop_front());
      end
    end
    if (!rst && sdel_valid && sdel_ready) begin
      n_sdel++;
      check(sdel_expected.size() > 0 && int'(sdel_ptr) == sdel_expected[0], "dispose request");
      if (sdel_expected.size() > 0) void'(sdel_expected.pop_front());
    end
  end

  // issue one command; returns the cycle it was accepted
  task automatic issue(sram_op_e op, int p, pkt_info_t pk, output longint t);
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_ptr = PW'(p);
    pkt_valid = (op != SR_DELETE); pkt_info = pk;
    do @(posedge clk); while (!cmd_ready);
    t = cyc;
    #1 cmd_valid = 0; pkt_valid = 0;
  endtask

  initial begin
    longint t, tprev;
    sram_op_e prev_op;
    pkt_info_t pk;
    int p;
    logic [31:0] now = 32'd1000;
    repeat (3) @(posedge clk);
    rst <= 0;
    prev_op = SR_DISCARD; tprev = 0;
    for (int n = 0; n < 600; n++) begin
      p = $urandom_range(0, 15);
      pk.bytes = 16'($urandom_range(40, 1500));
      pk.ts    = now;
      pk.flags = 8'(1 << $urandom_range(0, 7));
      pk.key   = rand_key(n % 2, n + 3);
      now += 32'($urandom_range(1, 60));
      if (!live[p]) begin
        if ($urandom_range(0, 5) == 0) begin
          issue(SR_DISCARD, 0, pk, t); n_disc++;
        end else begin
          issue(SR_NEW, p, pk, t); n_new++;
          model[p] = '{start_ts: pk.ts, end_ts: pk.ts, bytes: 64'(pk.bytes), packets: 1,
                       flags: pk.flags, key: pk.key};
          live[p] = 1;
        end
      end else if ($urandom_range(0, 6) == 0) begin
        exports.push_back(model[p]);
        issue(SR_DELETE, p, pk, t); n_del++;
        live[p] = 0;
      end else begin
        model[p].end_ts   = pk.ts;
        model[p].bytes   += 64'(pk.bytes);
        model[p].packets += 1;
        model[p].flags   |= pk.flags;
        if (pk.ts - model[p].start_ts > active_timeout) sdel_expected.push_back(p);
        issue(SR_UPDATE, p, pk, t); n_upd++;
      end
      // back-to-back commands: spacing set by the previous one
      if (n > 0) begin
        if (prev_op == SR_NEW || prev_op == SR_DISCARD) check(t - tprev == 1, "NEW/DISCARD take one cycle");
        if (prev_op == SR_UPDATE) check(t - tprev == LAT + 2, "UPDATE takes 2 + RD_LAT cycles");
      end
      prev_op = cmd_op; tprev = t;
    end
    repeat (30) @(negedge clk);
    check(exports.size() == 0, "all exports seen");
    check(sdel_expected.size() == 0, "all dispose requests seen");
    check(cnt_discard == 32'(n_disc), "discard counter");
    check(n_sdel > 0 && n_del > 0 && n_upd > 0, "every command kind seen");
    $display("new=%0d upd=%0d del=%0d disc=%0d sdel=%0d", n_new, n_upd, n_del, n_disc, n_sdel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

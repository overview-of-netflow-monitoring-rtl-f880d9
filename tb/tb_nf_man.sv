// tb_nf_man: checks the management unit with 16 rows.
// The testbench plays CAM (it takes free rows, sends NEW/HIT/FULL results and
// answers every delete order with a DELACK) and SRAM (it takes commands with
// random back-pressure and sends dispose requests). Checked:
//  - start-up: no free row before the ROWS-cycle initialisation ends;
//  - every CAM result gives the right SRAM command, in order;
//  - an idle flow is disposed between 5 and 6 sweep rounds after its last
//    use, a flow that keeps being hit is not;
//  - a dispose request for an active row starts a delete, one for a free row
//    does nothing; a hit that arrives while the delete is pending is still
//    forwarded as an update before the export;
//  - the record count, the FULL -> DISCARD path, aggressive mode (count at
//    the limit makes the sweep run every cycle) and free-list exhaustion.
module tb_nf_man;
  import nf_pkg::*;
  localparam int ROWS = 16, PW = 4;
  logic clk = 0, rst = 1;
  logic [31:0] sweep_period = 4;
  logic [PW:0] high_water = 5'd16;
  logic free_valid, free_take = 0;
  logic [PW-1:0] free_ptr;
  logic del_valid, del_ready = 1;
  logic [PW-1:0] del_ptr;
  logic rsp_valid = 0, rsp_ready;
  cam_rsp_e rsp_type = CAM_HIT;
  logic [PW-1:0] rsp_ptr = 0;
  logic cmd_valid, cmd_ready = 0;
  sram_op_e cmd_op;
  logic [PW-1:0] cmd_ptr;
  logic sdel_valid = 0, sdel_ready;
  logic [PW-1:0] sdel_ptr = 0;
  logic init_done, aggressive;
  logic [PW:0] rec_count;
  logic [31:0] cnt_inactive, cnt_active, cnt_full;

  int checks = 0, failures = 0;
  longint cyc = 0;
  typedef struct packed { cam_rsp_e t; logic [PW-1:0] p; } rsp_t;
  typedef struct packed { sram_op_e o; logic [PW-1:0] p; } cmd_t;
  rsp_t cam_q[$];
  cmd_t exp_cmd[$];
  longint del_time [int];       // row -> cycle of its delete order
  int n_cmds = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  nf_man #(.ROWS(ROWS)) dut (.clk, .rst, .sweep_period, .high_water,
    .free_valid, .free_ptr, .free_take, .del_valid, .del_ready, .del_ptr,
    .rsp_valid, .rsp_ready, .rsp_type, .rsp_ptr,
    .cmd_valid, .cmd_ready, .cmd_op, .cmd_ptr,
    .sdel_valid, .sdel_ready, .sdel_ptr,
    .init_done, .rec_count, .aggressive, .cnt_inactive, .cnt_active, .cnt_full);

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

  // CAM stand-in: delete orders become DELACKs in the result stream
  always @(posedge clk) begin
    if (!rst && del_valid && del_ready) begin
      cam_q.push_back('{t: CAM_DELACK, p: del_ptr});
      del_time[int'(del_ptr)] = cyc;
    end
  end
  initial begin
    forever begin
      @(negedge clk);
      if (cam_q.size() > 0) begin
        rsp_valid = 1; rsp_type = cam_q[0].t; rsp_ptr = cam_q[0].p;
        do @(posedge clk); while (!rsp_ready);
        case (rsp_type)
          CAM_HIT:  exp_cmd.push_back('{o: SR_UPDATE,  p: rsp_ptr});
          CAM_NEW:  exp_cmd.push_back('{o: SR_NEW,     p: rsp_ptr});
          CAM_FULL: exp_cmd.push_back('{o: SR_DISCARD, p: rsp_ptr});
          default:  exp_cmd.push_back('{o: SR_DELETE,  p: rsp_ptr});
        endcase
        void'(cam_q.pop_front());
        #1 rsp_valid = 0;
      end
    end
  end

  // SRAM stand-in: random command back-pressure, commands checked in order
  always @(negedge clk) cmd_ready <= ($urandom_range(0, 2) != 0);
  always @(posedge clk) begin
    if (!rst && cmd_valid && cmd_ready) begin
      n_cmds++;
      check(exp_cmd.size() > 0, "command without result");
      if (exp_cmd.size() > 0) begin
        check(cmd_op == exp_cmd[0].o && cmd_ptr == exp_cmd[0].p, "command");
        void'(exp_cmd.pop_front());
      end
    end
  end

  task automatic take_row(output logic [PW-1:0] p);
    @(negedge clk);
    while (!free_valid) @(negedge clk);
    p = free_ptr; free_take = 1;
    @(negedge clk); free_take = 0;
  endtask

  task automatic cam(cam_rsp_e t, logic [PW-1:0] p);
    cam_q.push_back('{t: t, p: p});
    while (cam_q.size() > 0) @(negedge clk);
  endtask

  task automatic dispose_req(logic [PW-1:0] p);
    @(negedge clk); sdel_valid = 1; sdel_ptr = p;
    do @(posedge clk); while (!sdel_ready);
    #1 sdel_valid = 0;
  endtask

  task automatic settle();
    repeat (20) @(negedge clk);
  endtask

  initial begin
    logic [PW-1:0] a, b, c, d, taken[$];
    longint t0, dt, round;
    int count = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // start-up
    t0 = cyc;
    @(negedge clk);
    while (!init_done) begin
      check(!free_valid, "no free row before init");
      @(negedge clk);
    end
    check(cyc - t0 >= ROWS && cyc - t0 <= ROWS + 2, "init takes ROWS cycles");

    // idle flow A expires, flow B kept alive by hits
    round = ROWS * 4;
    take_row(a); cam(CAM_NEW, a); t0 = cyc; count++;
    take_row(b); cam(CAM_NEW, b); count++;
    check(rec_count == 5'(count), "count after two NEW");
    while (!del_time.exists(int'(a)) && cyc - t0 < 8 * round) begin
      repeat (round / 2) @(negedge clk);
      cam(CAM_HIT, b);
    end
    check(del_time.exists(int'(a)), "idle flow disposed");
    dt = del_time[int'(a)] - t0;
    check(dt > 5 * round - 4 && dt <= 6 * round + 4, "inactive timeout within 5..6 rounds");
    $display("idle flow disposed after %0d cycles (round %0d)", dt, round);
    check(!del_time.exists(int'(b)), "busy flow kept");
    settle(); count--;
    check(rec_count == 5'(count), "count after expiry");
    check(cnt_inactive == 1, "inactive counter");

    // dispose request from SRAM for active B, and for a free row
    dispose_req(b);
    settle();
    check(del_time.exists(int'(b)), "dispose request deletes active flow");
    count--;
    check(rec_count == 5'(count), "count after dispose");
    del_time.delete();
    dispose_req(b);                                // b is free now
    settle();
    check(!del_time.exists(int'(b)), "request for a free row ignored");
    check(cnt_active == 1, "active counter");

    // hit while waiting for delete: the CAM stand-in delays the DELACK
    take_row(c); cam(CAM_NEW, c); count++;
    del_ready = 0;
    dispose_req(c);
    @(negedge clk); while (!del_valid) @(negedge clk);
    cam(CAM_HIT, c);                               // forwarded as UPDATE
    del_ready = 1;
    settle(); count--;
    check(del_time.exists(int'(c)), "pending delete completes");
    check(rec_count == 5'(count), "count after pending delete");

    // full table result
    cam(CAM_FULL, '0);
    settle();
    check(cnt_full == 1, "full counter");

    // aggressive mode: limit 3, slow software pace
    sweep_period = 1000; high_water = 5'd3;
    del_time.delete();
    take_row(a); cam(CAM_NEW, a); count++;
    take_row(b); cam(CAM_NEW, b); count++;
    check(!aggressive, "not aggressive below the limit");
    take_row(d); cam(CAM_NEW, d); count++; t0 = cyc;
    @(negedge clk);
    check(aggressive, "aggressive at the limit");
    while (!del_time.exists(int'(a)) && cyc - t0 < 50 * ROWS) @(negedge clk);
    check(del_time.exists(int'(a)) && cyc - t0 <= 6 * ROWS + 10, "aggressive sweep disposes within 6 fast rounds");
    settle();
    check(!aggressive, "aggressive mode ends below the limit");
    count = int'(rec_count);

    // exhaust the free list: every row handed out once
    sweep_period = 32'hFFFF_FFFF; high_water = 5'd16;
    settle();
    while (free_valid) begin
      logic [PW-1:0] p;
      take_row(p);
      foreach (taken[i]) check(taken[i] != p, "free rows distinct");
      taken.push_back(p);
    end
    check(taken.size() + count == ROWS, "free list holds every unused row");
    settle();
    check(exp_cmd.size() == 0, "all commands delivered");
    check(n_cmds > 0, "commands seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

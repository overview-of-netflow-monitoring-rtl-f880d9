// tb_nf_cam: checks the TCAM controller against a behavioural TCAM.
// The testbench stands in for MAN: it offers free rows from its own list,
// takes results with random back-pressure, and now and then orders a
// delete. A reference map of hash -> row predicts each result: HIT with the
// row already holding the hash, NEW with the offered free row, FULL when the
// list is empty, DELACK for a delete. Hashes come from a small set so that
// hits, misses and full table all happen.
module tb_nf_cam;
  import nf_pkg::*;
  localparam int ROWS = 8, PW = 3;
  logic clk = 0, rst = 1;
  logic h_valid = 0, h_ready;
  logic [63:0] h_hash = 0;
  logic free_valid, free_take;
  logic [PW-1:0] free_ptr;
  logic del_valid = 0, del_ready;
  logic [PW-1:0] del_ptr = 0;
  logic rsp_valid, rsp_ready = 0;
  cam_rsp_e rsp_type;
  logic [PW-1:0] rsp_ptr;
  logic tc_srch_valid, tc_res_valid, tc_res_hit, tc_wr_en, tc_wr_vld;
  logic [63:0] tc_srch_key, tc_wr_key;
  logic [PW-1:0] tc_res_idx, tc_wr_idx;

  int checks = 0, failures = 0;
  int n_hit = 0, n_new = 0, n_full = 0, n_del = 0;
  logic [PW-1:0] flist[$];
  int unsigned   row_of [logic [63:0]];
  logic [63:0]   hash_at [int unsigned];
  typedef struct packed { logic del; logic [63:0] h; logic [PW-1:0] p; } req_t;
  req_t reqs[$];

  always #5 clk = ~clk;

  // the free list is shown to the DUT from the falling edge, away from the
  // rising edge at which the bookkeeping below changes it
  always @(negedge clk) begin
    free_valid <= flist.size() > 0;
    free_ptr   <= (flist.size() > 0) ? flist[0] : '0;
  end

  nf_cam #(.ROWS(ROWS)) dut (.clk, .rst, .h_valid, .h_ready, .h_hash,
    .free_valid, .free_ptr, .free_take, .del_valid, .del_ready, .del_ptr,
    .rsp_valid, .rsp_ready, .rsp_type, .rsp_ptr,
    .tc_srch_valid, .tc_srch_key, .tc_res_valid, .tc_res_hit, .tc_res_idx,
    .tc_wr_en, .tc_wr_idx, .tc_wr_key, .tc_wr_vld);

  nf_tcam_model #(.ROWS(ROWS), .LAT(3)) tcam (.clk,
    .srch_valid(tc_srch_valid), .srch_key(tc_srch_key),
    .res_valid(tc_res_valid), .res_hit(tc_res_hit), .res_idx(tc_res_idx),
    .wr_en(tc_wr_en), .wr_idx(tc_wr_idx), .wr_key(tc_wr_key), .wr_vld(tc_wr_vld));

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

  always @(posedge clk) begin
    if (!rst) begin
      if (free_take) void'(flist.pop_front());
      // record accepted requests in the order CAM took them
      if (del_valid && del_ready) reqs.push_back('{del: 1'b1, h: '0, p: del_ptr});
      else if (h_valid && h_ready) reqs.push_back('{del: 1'b0, h: h_hash, p: '0});
      if (rsp_valid && rsp_ready) begin
        automatic req_t r = reqs.pop_front();
        if (r.del) begin
          check(rsp_type == CAM_DELACK && rsp_ptr == r.p, "delete ack");
          if (hash_at.exists(int'(r.p))) begin
            row_of.delete(hash_at[int'(r.p)]);
            hash_at.delete(int'(r.p));
          end
          flist.push_back(r.p);
          n_del++;
        end else if (row_of.exists(r.h)) begin
          check(rsp_type == CAM_HIT && rsp_ptr == PW'(row_of[r.h]), "hit");
          n_hit++;
        end else if (rsp_type == CAM_NEW) begin
          check(!hash_at.exists(int'(rsp_ptr)), "new row was free");
          row_of[r.h] = int'(rsp_ptr);
          hash_at[int'(rsp_ptr)] = r.h;
          n_new++;
        end else begin
          check(rsp_type == CAM_FULL, "full");
          check(hash_at.num() == ROWS, "full only when every row is used");
          n_full++;
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < ROWS; i++) flist.push_back(PW'(i));
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      rsp_ready = ($urandom_range(0, 3) != 0);
      if (!h_valid || h_ready) begin
        h_valid = ($urandom_range(0, 1) == 0);
        h_hash  = 64'h1234_0000_0000_0000 + 64'($urandom_range(0, 11));
      end
      if (!del_valid || del_ready) begin
        del_valid = 0;
        if ($urandom_range(0, 20) == 0 && hash_at.num() > 0) begin
          int unsigned k;
          void'(hash_at.first(k));
          for (int s = $urandom_range(0, 5); s > 0; s--) if (!hash_at.next(k)) void'(hash_at.first(k));
          del_valid = 1;
          del_ptr   = PW'(k);
        end
      end
      @(posedge clk);
    end
    h_valid = 0; del_valid = 0; rsp_ready = 1;
    repeat (30) @(posedge clk);
    check(n_hit > 0 && n_new > 0 && n_full > 0 && n_del > 0, "every kind of result seen");
    $display("hit=%0d new=%0d full=%0d del=%0d", n_hit, n_new, n_full, n_del);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

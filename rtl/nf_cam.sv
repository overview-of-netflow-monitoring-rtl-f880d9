// nf_cam: TCAM controller.
//
// Looks up the hash of every packet in the external TCAM. On a hit the index
// of the matching entry is the pointer to the flow's record in SSRAM. On a
// miss it takes a free row from MAN, writes the hash into the TCAM at that
// row and returns the row as the pointer of a new record; with no free row
// the packet is reported as dropped (CAM_FULL). It also carries out MAN's
// delete orders by invalidating the entry and acknowledging (CAM_DELACK).
// The search/create/free duties are the architecture's; the TCAM chip
// interface below, the one-operation-at-a-time schedule and the priority of
// deletes over searches are this design's.
//
// Operations are strictly serial, so a search always sees every earlier
// create and delete, and all results (hit, new, full, delete-ack) reach MAN
// through one in-order channel. MAN relies on this order.
//
// TCAM chip interface (assumed): a search request `tc_srch_valid` with
// `tc_srch_key` is answered some cycles later by `tc_res_valid` with
// `tc_res_hit` and `tc_res_idx`; a write `tc_wr_en` stores `tc_wr_key` at
// `tc_wr_idx` with valid bit `tc_wr_vld` (0 frees the entry) and is seen by
// the next search. Timing: a search takes 2 cycles plus the TCAM latency,
// then the result waits in a register until MAN takes it.
module nf_cam
  import nf_pkg::*;
#(
  parameter int unsigned ROWS  = 32768,
  parameter int unsigned PTR_W = $clog2(ROWS)
) (
  input  logic              clk,
  input  logic              rst,
  // hashes from HASH
  input  logic              h_valid,
  output logic              h_ready,
  input  logic [HASH_W-1:0] h_hash,
  // free row offered by MAN
  input  logic              free_valid,
  input  logic [PTR_W-1:0]  free_ptr,
  output logic              free_take,
  // delete orders from MAN
  input  logic              del_valid,
  output logic              del_ready,
  input  logic [PTR_W-1:0]  del_ptr,
  // results to MAN
  output logic              rsp_valid,
  input  logic              rsp_ready,
  output cam_rsp_e          rsp_type,
  output logic [PTR_W-1:0]  rsp_ptr,
  // external TCAM
  output logic              tc_srch_valid,
  output logic [HASH_W-1:0] tc_srch_key,
  input  logic              tc_res_valid,
  input  logic              tc_res_hit,
  input  logic [PTR_W-1:0]  tc_res_idx,
  output logic              tc_wr_en,
  output logic [PTR_W-1:0]  tc_wr_idx,
  output logic [HASH_W-1:0] tc_wr_key,
  output logic              tc_wr_vld
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_RESP} state_e;
  state_e            state;
  logic [HASH_W-1:0] hash_q;

  always_comb begin
    h_ready       = 1'b0;
    del_ready     = 1'b0;
    free_take     = 1'b0;
    tc_srch_valid = 1'b0;
    tc_srch_key   = h_hash;
    tc_wr_en      = 1'b0;
    tc_wr_idx     = del_ptr;
    tc_wr_key     = hash_q;
    tc_wr_vld     = 1'b0;
    unique case (state)
      S_IDLE: begin
        if (del_valid) begin
          del_ready = 1'b1;
          tc_wr_en  = 1'b1;
          tc_wr_idx = del_ptr;
          tc_wr_key = '0;
        end else if (h_valid) begin
          h_ready       = 1'b1;
          tc_srch_valid = 1'b1;
        end
      end
      S_WAIT: begin
        if (tc_res_valid && !tc_res_hit && free_valid) begin
          free_take = 1'b1;
          tc_wr_en  = 1'b1;
          tc_wr_idx = free_ptr;
          tc_wr_vld = 1'b1;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      hash_q    <= '0;
      rsp_valid <= 1'b0;
      rsp_type  <= CAM_HIT;
      rsp_ptr   <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (del_valid) begin
            rsp_valid <= 1'b1;
            rsp_type  <= CAM_DELACK;
            rsp_ptr   <= del_ptr;
            state     <= S_RESP;
          end else if (h_valid) begin
            hash_q <= h_hash;
            state  <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (tc_res_valid) begin
            rsp_valid <= 1'b1;
            state     <= S_RESP;
            if (tc_res_hit) begin
              rsp_type <= CAM_HIT;
              rsp_ptr  <= tc_res_idx;
            end else if (free_valid) begin
              rsp_type <= CAM_NEW;
              rsp_ptr  <= free_ptr;
            end else begin
              rsp_type <= CAM_FULL;
              rsp_ptr  <= '0;
            end
          end
        end
        S_RESP: begin
          if (rsp_ready) begin
            rsp_valid <= 1'b0;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A result stays put until MAN takes it.
  assert property (@(posedge clk) disable iff (rst)
                   rsp_valid && !rsp_ready |=> rsp_valid && $stable(rsp_type) && $stable(rsp_ptr));

endmodule

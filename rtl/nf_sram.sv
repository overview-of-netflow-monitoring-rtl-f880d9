// nf_sram: SSRAM controller that creates, updates and exports flow records.
//
// Every command from MAN names a row (the record's SSRAM address):
//   NEW     - take the next packet from the packet FIFO and write a fresh
//             record: start = end = packet timestamp, one datagram, its byte
//             count, its flags, its key.
//   UPDATE  - take the next packet, read the record, set the end timestamp,
//             add one datagram and the bytes, OR in the flags, write it back.
//             The start timestamp is checked against the active-timeout
//             register: if the flow has lasted longer, the unit asks MAN to
//             dispose of it (`sdel_*`); a request that finds the previous
//             one still pending is skipped, since the flow's next packet
//             will ask again.
//   DELETE  - read the record and push it into SW_FIFO for software.
//   DISCARD - take the next packet and drop it (the table was full).
// The record layout (59 bytes) and the update rule are the architecture's.
// The counters are not checked for overflow, as in the architecture:
// software must read a flow before its 32-bit packet count wraps.
//
// SSRAM interface (assumed): one whole record per access, `ss_addr` is the
// row, a write takes effect at the clock edge, read data appears RD_LAT
// cycles after the read request (pipelined synchronous SRAM). The SSRAM
// data width and the single-word record are this design's choice.
// Timing: NEW and DISCARD take 1 cycle, UPDATE 2 + RD_LAT cycles, DELETE
// 2 + RD_LAT cycles plus any wait for room in SW_FIFO.
module nf_sram
  import nf_pkg::*;
#(
  parameter int unsigned ROWS   = 32768,
  parameter int unsigned PTR_W  = $clog2(ROWS),
  parameter int unsigned RD_LAT = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [31:0]      active_timeout,   // in timestamp units
  // commands from MAN
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  sram_op_e         cmd_op,
  input  logic [PTR_W-1:0] cmd_ptr,
  // packet FIFO
  input  logic             pkt_valid,
  output logic             pkt_ready,
  input  pkt_info_t        pkt_info,
  // dispose requests to MAN
  output logic             sdel_valid,
  input  logic             sdel_ready,
  output logic [PTR_W-1:0] sdel_ptr,
  // exported records to SW_FIFO
  output logic             exp_valid,
  input  logic             exp_ready,
  output flow_rec_t        exp_rec,
  // external SSRAM
  output logic             ss_en,
  output logic             ss_we,
  output logic [PTR_W-1:0] ss_addr,
  output flow_rec_t        ss_wdata,
  input  flow_rec_t        ss_rdata,
  // statistics
  output logic [31:0]      cnt_discard
);

  typedef enum logic [1:0] {S_IDLE, S_RD, S_WB} state_e;
  state_e           state;
  sram_op_e         op_q;
  logic [PTR_W-1:0] ptr_q;
  pkt_info_t        pkt_q;
  flow_rec_t        rec_q;
  logic [7:0]       wait_q;

  wire needs_pkt = (cmd_op != SR_DELETE);
  wire take_cmd  = (state == S_IDLE) && cmd_valid && (!needs_pkt || pkt_valid);

  function automatic flow_rec_t fresh(input pkt_info_t p);
    flow_rec_t r;
    r.start_ts = p.ts;
    r.end_ts   = p.ts;
    r.bytes    = 64'(p.bytes);
    r.packets  = 32'd1;
    r.flags    = p.flags;
    r.key      = p.key;
    return r;
  endfunction

  function automatic flow_rec_t merged(input flow_rec_t r, input pkt_info_t p);
    flow_rec_t n;
    n         = r;
    n.end_ts  = p.ts;
    n.bytes   = r.bytes + 64'(p.bytes);
    n.packets = r.packets + 32'd1;
    n.flags   = r.flags | p.flags;
    return n;
  endfunction

  flow_rec_t upd;
  assign upd = merged(rec_q, pkt_q);
  wire timed_out = (pkt_q.ts - rec_q.start_ts) > active_timeout;

  assign cmd_ready = take_cmd;
  assign pkt_ready = take_cmd && needs_pkt;
  assign exp_valid = (state == S_WB) && (op_q == SR_DELETE);
  assign exp_rec   = rec_q;

  always_comb begin
    ss_en    = 1'b0;
    ss_we    = 1'b0;
    ss_addr  = cmd_ptr;
    ss_wdata = fresh(pkt_info);
    if (take_cmd) begin
      unique case (cmd_op)
        SR_NEW:    begin ss_en = 1'b1; ss_we = 1'b1; end
        SR_UPDATE,
        SR_DELETE: ss_en = 1'b1;
        default: ;
      endcase
    end else if (state == S_WB && op_q == SR_UPDATE) begin
      ss_en    = 1'b1;
      ss_we    = 1'b1;
      ss_addr  = ptr_q;
      ss_wdata = upd;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      op_q        <= SR_UPDATE;
      ptr_q       <= '0;
      pkt_q       <= '0;
      rec_q       <= '0;
      wait_q      <= '0;
      sdel_valid  <= 1'b0;
      sdel_ptr    <= '0;
      cnt_discard <= '0;
    end else begin
      if (sdel_valid && sdel_ready) sdel_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (take_cmd) begin
            op_q  <= cmd_op;
            ptr_q <= cmd_ptr;
            pkt_q <= pkt_info;
            if (cmd_op == SR_DISCARD) cnt_discard <= cnt_discard + 1'b1;
            if (cmd_op == SR_UPDATE || cmd_op == SR_DELETE) begin
              state  <= S_RD;
              wait_q <= 8'(RD_LAT - 1);
            end
          end
        end
        S_RD: begin
          if (wait_q == '0) begin
            rec_q <= ss_rdata;
            state <= S_WB;
          end else begin
            wait_q <= wait_q - 1'b1;
          end
        end
        S_WB: begin
          if (op_q == SR_UPDATE) begin
            state <= S_IDLE;
            if (timed_out && (!sdel_valid || sdel_ready)) begin
              sdel_valid <= 1'b1;
              sdel_ptr   <= ptr_q;
            end
          end else if (exp_ready) begin
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // An exported record waits, unchanged, until SW_FIFO takes it.
  assert property (@(posedge clk) disable iff (rst)
                   exp_valid && !exp_ready |=> exp_valid && $stable(exp_rec));

endmodule

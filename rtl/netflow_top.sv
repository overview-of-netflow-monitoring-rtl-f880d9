// netflow_top: NetFlow monitoring adapter, the whole packet-to-record path.
//
// Packets arrive on GMII and are kept in the input buffer (IBUF) with a
// timestamp from the timestamp unit (TSU) when their CRC is right. The header
// field extractor (HFE) turns each into a flow key plus byte count, timestamp
// and flags. That result goes two ways at once: the key to the hash unit
// (HASH) and on into the TCAM controller (CAM), the full packet information
// into the packet FIFO. CAM finds or creates the flow's TCAM entry, whose
// index is the flow's record address; the management unit (MAN) turns each
// CAM result into a command for the SSRAM controller (SRAM), which pops the
// matching packet from the FIFO and creates or updates the record. MAN also
// ages the flows and disposes inactive ones, and SRAM flags flows whose active
// time has run out; disposed records are exported into SW_FIFO, which
// software reads over PCI. The block structure and the data that flows
// between blocks are the architecture's; all handshakes are this design's.
//
// The TCAM and SSRAM chips, the GMII PHY and the PCI bridge sit outside this
// module: their signals are ports. Software registers (sweep period, record
// limit for aggressive disposal, active timeout) are plain inputs and the
// statistics plain outputs. `ts` is the TSU register software reads to map
// timestamps to wall-clock time. After reset MAN needs ROWS cycles to clear
// its tables (`init_done`); frames arriving earlier are buffered in IBUF.
module netflow_top
  import nf_pkg::*;
#(
  parameter int unsigned ROWS          = 32768,
  parameter int unsigned PTR_W         = $clog2(ROWS),
  parameter int unsigned BUF_AW        = 12,
  parameter int unsigned PKT_FIFO_DEPTH = 64,
  parameter int unsigned SW_FIFO_DEPTH  = 16,
  parameter int unsigned RD_LAT        = 2
) (
  input  logic              clk,
  input  logic              rst,
  // GMII receive
  input  logic              gmii_rx_dv,
  input  logic              gmii_rx_er,
  input  logic [7:0]        gmii_rxd,
  // software registers
  input  logic [31:0]       sweep_period,
  input  logic [PTR_W:0]    high_water,
  input  logic [31:0]       active_timeout,
  output logic [TS_W-1:0]   ts,
  // external TCAM
  output logic              tc_srch_valid,
  output logic [HASH_W-1:0] tc_srch_key,
  input  logic              tc_res_valid,
  input  logic              tc_res_hit,
  input  logic [PTR_W-1:0]  tc_res_idx,
  output logic              tc_wr_en,
  output logic [PTR_W-1:0]  tc_wr_idx,
  output logic [HASH_W-1:0] tc_wr_key,
  output logic              tc_wr_vld,
  // external SSRAM
  output logic              ss_en,
  output logic              ss_we,
  output logic [PTR_W-1:0]  ss_addr,
  output flow_rec_t         ss_wdata,
  input  flow_rec_t         ss_rdata,
  // exported records to software (PCI side of SW_FIFO)
  output logic              sw_valid,
  input  logic              sw_ready,
  output flow_rec_t         sw_rec,
  // status
  output logic              init_done,
  output logic              aggressive,
  output logic [PTR_W:0]    rec_count,
  output logic [31:0]       cnt_frames_ok,
  output logic [31:0]       cnt_frames_bad,
  output logic [31:0]       cnt_frames_full,
  output logic [31:0]       cnt_non_ip,
  output logic [31:0]       cnt_inactive,
  output logic [31:0]       cnt_active,
  output logic [31:0]       cnt_full,
  output logic [31:0]       cnt_discard
);

  // IBUF -> HFE
  logic            ib_valid, ib_ready, ib_sop, ib_eop;
  logic [7:0]      ib_data;
  logic [15:0]     ib_len;
  logic [TS_W-1:0] ib_ts;
  // HFE -> HASH + FIFO
  logic            hf_valid, hf_ready;
  pkt_info_t       hf_info;
  logic            hs_in_ready, pf_in_ready;
  // HASH -> CAM
  logic              hs_valid, hs_ready;
  logic [HASH_W-1:0] hs_hash;
  // CAM <-> MAN
  logic             free_valid, free_take;
  logic [PTR_W-1:0] free_ptr;
  logic             del_valid, del_ready;
  logic [PTR_W-1:0] del_ptr;
  logic             rsp_valid, rsp_ready;
  cam_rsp_e         rsp_type;
  logic [PTR_W-1:0] rsp_ptr;
  // MAN <-> SRAM
  logic             cmd_valid, cmd_ready;
  sram_op_e         cmd_op;
  logic [PTR_W-1:0] cmd_ptr;
  logic             sdel_valid, sdel_ready;
  logic [PTR_W-1:0] sdel_ptr;
  // FIFO -> SRAM
  logic             pf_valid, pf_ready;
  pkt_info_t        pf_info;
  // SRAM -> SW_FIFO
  logic             exp_valid, exp_ready;
  flow_rec_t        exp_rec;

  nf_tsu u_tsu (.clk, .rst, .ts);

  nf_ibuf #(.BUF_AW(BUF_AW)) u_ibuf (
    .clk, .rst, .ts_in(ts),
    .gmii_rx_dv, .gmii_rx_er, .gmii_rxd,
    .out_valid(ib_valid), .out_ready(ib_ready), .out_data(ib_data),
    .out_sop(ib_sop), .out_eop(ib_eop), .out_len(ib_len), .out_ts(ib_ts),
    .cnt_frames_ok, .cnt_frames_bad, .cnt_frames_full
  );

  nf_hfe u_hfe (
    .clk, .rst,
    .in_valid(ib_valid), .in_ready(ib_ready), .in_data(ib_data),
    .in_sop(ib_sop), .in_eop(ib_eop), .in_ts(ib_ts),
    .out_valid(hf_valid), .out_ready(hf_ready), .out_info(hf_info),
    .cnt_non_ip
  );

  // the HFE result is handed to HASH and FIFO in the same cycle
  assign hf_ready = hs_in_ready && pf_in_ready;

  nf_hash u_hash (
    .clk, .rst,
    .in_valid(hf_valid && pf_in_ready), .in_ready(hs_in_ready), .in_key(hf_info.key),
    .out_valid(hs_valid), .out_ready(hs_ready), .out_hash(hs_hash)
  );

  nf_fifo #(.T(pkt_info_t), .DEPTH(PKT_FIFO_DEPTH)) u_pkt_fifo (
    .clk, .rst,
    .in_valid(hf_valid && hs_in_ready), .in_ready(pf_in_ready), .in_data(hf_info),
    .out_valid(pf_valid), .out_ready(pf_ready), .out_data(pf_info),
    .level()
  );

  nf_cam #(.ROWS(ROWS), .PTR_W(PTR_W)) u_cam (
    .clk, .rst,
    .h_valid(hs_valid), .h_ready(hs_ready), .h_hash(hs_hash),
    .free_valid, .free_ptr, .free_take,
    .del_valid, .del_ready, .del_ptr,
    .rsp_valid, .rsp_ready, .rsp_type, .rsp_ptr,
    .tc_srch_valid, .tc_srch_key, .tc_res_valid, .tc_res_hit, .tc_res_idx,
    .tc_wr_en, .tc_wr_idx, .tc_wr_key, .tc_wr_vld
  );

  nf_man #(.ROWS(ROWS), .PTR_W(PTR_W)) u_man (
    .clk, .rst,
    .sweep_period, .high_water,
    .free_valid, .free_ptr, .free_take,
    .del_valid, .del_ready, .del_ptr,
    .rsp_valid, .rsp_ready, .rsp_type, .rsp_ptr,
    .cmd_valid, .cmd_ready, .cmd_op, .cmd_ptr,
    .sdel_valid, .sdel_ready, .sdel_ptr,
    .init_done, .rec_count, .aggressive,
    .cnt_inactive, .cnt_active, .cnt_full
  );

  nf_sram #(.ROWS(ROWS), .PTR_W(PTR_W), .RD_LAT(RD_LAT)) u_sram (
    .clk, .rst, .active_timeout,
    .cmd_valid, .cmd_ready, .cmd_op, .cmd_ptr,
    .pkt_valid(pf_valid), .pkt_ready(pf_ready), .pkt_info(pf_info),
    .sdel_valid, .sdel_ready, .sdel_ptr,
    .exp_valid, .exp_ready, .exp_rec,
    .ss_en, .ss_we, .ss_addr, .ss_wdata, .ss_rdata,
    .cnt_discard
  );

  nf_fifo #(.T(flow_rec_t), .DEPTH(SW_FIFO_DEPTH)) u_sw_fifo (
    .clk, .rst,
    .in_valid(exp_valid), .in_ready(exp_ready), .in_data(exp_rec),
    .out_valid(sw_valid), .out_ready(sw_ready), .out_data(sw_rec),
    .level()
  );

  // No packet record is taken from the FIFO without a command for it.
  assert property (@(posedge clk) disable iff (rst) pf_ready |-> pf_valid);

endmodule

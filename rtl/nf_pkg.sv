// nf_pkg: types and constants shared by the NetFlow monitoring pipeline.
//
// The flow key holds the six fields that identify a flow: IP source and
// destination address, source and destination port, transport protocol and
// type of service. Addresses are 128 bits wide so that IPv4 and IPv6 flows
// share one format; an IPv4 address sits in the low 32 bits with the upper
// 96 bits zero (a choice of this design).
//
// flow_rec_t is the per-flow record kept in the external SSRAM. Its fields
// and their sizes follow the record layout of the architecture: 59 bytes
// (472 bits) in all. pkt_info_t is what the header field extractor hands to
// the packet FIFO for every accepted datagram: byte count, timestamp, flags
// and key.
package nf_pkg;

  localparam int unsigned TS_W    = 32;   // timestamp width out of the TSU
  localparam int unsigned HASH_W  = 64;   // width of the hash stored in TCAM
  localparam int unsigned PKTLEN_W = 16;  // byte count of one datagram

  typedef struct packed {
    logic [127:0] src_ip;
    logic [127:0] dst_ip;
    logic [15:0]  src_port;
    logic [15:0]  dst_port;
    logic [7:0]   proto;
    logic [7:0]   tos;
  } flow_key_t;                            // 304 bits

  localparam int unsigned KEY_W = $bits(flow_key_t);

  typedef struct packed {
    logic [PKTLEN_W-1:0] bytes;
    logic [TS_W-1:0]     ts;
    logic [7:0]          flags;
    flow_key_t           key;
  } pkt_info_t;

  typedef struct packed {
    logic [31:0]  start_ts;
    logic [31:0]  end_ts;
    logic [63:0]  bytes;
    logic [31:0]  packets;
    logic [7:0]   flags;
    flow_key_t    key;
  } flow_rec_t;                            // 472 bits = 59 bytes

  localparam int unsigned REC_W = $bits(flow_rec_t);

  // Result of one CAM operation, passed in order to MAN.
  typedef enum logic [1:0] {
    CAM_HIT    = 2'd0,   // flow found, pointer returned
    CAM_NEW    = 2'd1,   // flow missing, entry created at a free row
    CAM_FULL   = 2'd2,   // flow missing and no free row: packet dropped
    CAM_DELACK = 2'd3    // entry freed on MAN's request
  } cam_rsp_e;

  // Command from MAN to the SRAM unit.
  typedef enum logic [1:0] {
    SR_UPDATE  = 2'd0,   // add the next FIFO packet to an existing record
    SR_NEW     = 2'd1,   // start a record from the next FIFO packet
    SR_DELETE  = 2'd2,   // export the record to SW_FIFO
    SR_DISCARD = 2'd3    // drop the next FIFO packet (no room)
  } sram_op_e;

  // Aging field values kept by MAN for every row.
  localparam logic [2:0] AGE_FREE     = 3'b000;
  localparam logic [2:0] AGE_WAITDEL  = 3'b001;  // delete sent to CAM, not yet acknowledged
  localparam logic [2:0] AGE_EXPIRE   = 3'b010;  // read by the sweep: flow is inactive
  localparam logic [2:0] AGE_FRESH    = 3'b111;

endpackage

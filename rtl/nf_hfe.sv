// nf_hfe: header field extractor.
//
// Reads each packet from the input buffer one byte per cycle and picks out
// the six flow key fields (IP source and destination address, source and
// destination port, transport protocol, type of service), the datagram's
// byte count and the TCP flags. After the last byte of an IPv4 or IPv6
// packet it offers one pkt_info_t, which the top hands both to the hash
// unit and to the packet FIFO. Packets of any other EtherType produce
// nothing and are counted.
//
// In the architecture this unit is a small RISC processor run by its own
// instruction set. That instruction set is not available, so this module is a
// fixed parser that does the same extraction: untagged Ethernet II, IPv4 with
// options (ports found from IHL) and IPv6 without extension headers; ports
// only for TCP (6) and UDP (17), flags only for TCP. The byte count is the IP
// length (IPv4 total length, IPv6 payload length + 40). All of these are
// choices of this design.
//
// Interface: byte stream in (valid/ready, sop/eop, timestamp alongside),
// pkt_info_t out (valid/ready, held until taken). The input stalls while a
// finished result waits. Latency: the result is valid the cycle after the
// last byte.
module nf_hfe
  import nf_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [7:0]  in_data,
  input  logic        in_sop,
  input  logic        in_eop,
  input  logic [TS_W-1:0] in_ts,
  output logic        out_valid,
  input  logic        out_ready,
  output pkt_info_t   out_info,
  output logic [31:0] cnt_non_ip
);

  typedef struct packed {
    logic [15:0] etype;
    logic [15:0] l4;       // byte offset of the transport header
    logic [15:0] iplen;
    pkt_info_t   info;
  } parse_t;

  parse_t      cur, nxt;
  logic [15:0] idx;

  wire beat = in_valid && in_ready;
  wire is_v4 = (nxt.etype == 16'h0800);
  wire is_v6 = (nxt.etype == 16'h86DD);

  assign in_ready = !out_valid || out_ready;

  always_comb begin
    logic [15:0] i;
    logic [15:0] rel;
    nxt = cur;
    i   = in_sop ? 16'd0 : idx;
    if (in_sop) nxt = '0;
    rel = i - nxt.l4;
    if (i == 16'd12) nxt.etype[15:8] = in_data;
    if (i == 16'd13) nxt.etype[7:0]  = in_data;
    if (nxt.etype == 16'h0800 && i >= 16'd14) begin
      if (i == 16'd14) nxt.l4 = 16'd14 + {10'd0, in_data[3:0], 2'b00};
      if (i == 16'd15) nxt.info.key.tos = in_data;
      if (i == 16'd16) nxt.iplen[15:8] = in_data;
      if (i == 16'd17) nxt.iplen[7:0]  = in_data;
      if (i == 16'd23) nxt.info.key.proto = in_data;
      if (i >= 16'd26 && i <= 16'd29) nxt.info.key.src_ip[8*(29-i) +: 8] = in_data;
      if (i >= 16'd30 && i <= 16'd33) nxt.info.key.dst_ip[8*(33-i) +: 8] = in_data;
    end
    if (nxt.etype == 16'h86DD && i >= 16'd14) begin
      if (i == 16'd14) begin
        nxt.l4 = 16'd54;
        nxt.info.key.tos[7:4] = in_data[3:0];
      end
      if (i == 16'd15) nxt.info.key.tos[3:0] = in_data[7:4];
      if (i == 16'd18) nxt.iplen[15:8] = in_data;
      if (i == 16'd19) nxt.iplen[7:0]  = in_data;
      if (i == 16'd20) nxt.info.key.proto = in_data;
      if (i >= 16'd22 && i <= 16'd37) nxt.info.key.src_ip[8*(37-i) +: 8] = in_data;
      if (i >= 16'd38 && i <= 16'd53) nxt.info.key.dst_ip[8*(53-i) +: 8] = in_data;
    end
    if ((nxt.etype == 16'h0800 || nxt.etype == 16'h86DD) && nxt.l4 != 16'd0 && i >= nxt.l4 &&
        (nxt.info.key.proto == 8'd6 || nxt.info.key.proto == 8'd17)) begin
      if (rel == 16'd0) nxt.info.key.src_port[15:8] = in_data;
      if (rel == 16'd1) nxt.info.key.src_port[7:0]  = in_data;
      if (rel == 16'd2) nxt.info.key.dst_port[15:8] = in_data;
      if (rel == 16'd3) nxt.info.key.dst_port[7:0]  = in_data;
      if (rel == 16'd13 && nxt.info.key.proto == 8'd6) nxt.info.flags = in_data;
    end
    nxt.info.ts    = in_ts;
    nxt.info.bytes = (nxt.etype == 16'h86DD) ? nxt.iplen + 16'd40 : nxt.iplen;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cur        <= '0;
      idx        <= '0;
      out_valid  <= 1'b0;
      out_info   <= '0;
      cnt_non_ip <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (beat) begin
        if (in_eop) begin
          cur <= '0;
          idx <= '0;
          if (is_v4 || is_v6) begin
            out_valid <= 1'b1;
            out_info  <= nxt.info;
          end else begin
            cnt_non_ip <= cnt_non_ip + 1'b1;
          end
        end else begin
          cur <= nxt;
          idx <= (in_sop ? 16'd0 : idx) + 16'd1;
        end
      end
    end
  end

endmodule

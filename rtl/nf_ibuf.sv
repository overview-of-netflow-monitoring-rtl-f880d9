// nf_ibuf: input buffer between the GMII receive interface and the header
// field extractor.
//
// The receive side waits for the start-of-frame delimiter (0xD5) after the
// preamble, stamps the frame with the current TSU value, and writes every
// following byte (destination MAC through FCS) into a circular byte memory
// while it checks the Ethernet CRC-32. When GMII_RX_DV falls the frame is kept
// only if its CRC is correct, GMII_RX_ER was never raised, the memory did not
// run out of room and the descriptor queue has space; otherwise the write
// pointer is rewound and the frame vanishes. That CRC filter and the stored
// timestamp are the architecture's; memory size, the descriptor queue and the
// drop reasons other than a bad CRC are choices of this design.
//
// The CRC is the reflected CRC-32 (polynomial 0xEDB88320, start value all
// ones) run over data and FCS together: a good frame leaves the fixed residue
// 0xDEBB20E3 in the register.
//
// Read side: a byte stream with valid/ready. `out_sop`/`out_eop` mark the
// first and last byte; `out_len` (bytes without FCS) and `out_ts` are valid
// with every byte of the packet. The FCS is skipped. The memory is read
// asynchronously, so a byte is offered in the cycle its descriptor appears.
// Counters report kept frames and dropped ones (bad CRC or error, no room).
module nf_ibuf #(
  parameter int unsigned BUF_AW     = 12,   // 4096-byte packet memory
  parameter int unsigned DESC_DEPTH = 16,
  parameter int unsigned TS_W       = 32
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [TS_W-1:0] ts_in,
  // GMII receive
  input  logic            gmii_rx_dv,
  input  logic            gmii_rx_er,
  input  logic [7:0]      gmii_rxd,
  // packet stream to HFE
  output logic            out_valid,
  input  logic            out_ready,
  output logic [7:0]      out_data,
  output logic            out_sop,
  output logic            out_eop,
  output logic [15:0]     out_len,
  output logic [TS_W-1:0] out_ts,
  // statistics
  output logic [31:0]     cnt_frames_ok,
  output logic [31:0]     cnt_frames_bad,
  output logic [31:0]     cnt_frames_full
);

  localparam int unsigned DEPTH = 1 << BUF_AW;
  localparam logic [31:0] CRC_RESIDUE = 32'hDEBB20E3;

  typedef struct packed {
    logic [15:0]     len;
    logic [TS_W-1:0] ts;
  } desc_t;

  function automatic logic [31:0] crc32_byte(input logic [31:0] c, input logic [7:0] d);
    logic [31:0] r;
    r = c ^ {24'h0, d};
    for (int i = 0; i < 8; i++) r = r[0] ? ((r >> 1) ^ 32'hEDB88320) : (r >> 1);
    return r;
  endfunction

  logic [7:0] mem [DEPTH];

  // pointers carry one extra bit to tell full from empty
  logic [BUF_AW:0] wr_ptr, commit_ptr, rd_ptr;
  logic [BUF_AW:0] used;
  assign used = wr_ptr - rd_ptr;

  // ---------------- receive side ----------------
  typedef enum logic [1:0] {W_IDLE, W_DATA, W_WAIT} wstate_e;
  wstate_e          wstate;
  logic [31:0]      crc;
  logic [15:0]      wcnt;
  logic             bad, ovf;
  logic [TS_W-1:0]  frame_ts;

  logic  desc_in_ready, desc_out_valid, desc_pop;
  desc_t desc_in, desc_out;
  logic  commit;

  wire room     = (used < (BUF_AW+1)'(DEPTH));
  wire wr_byte  = (wstate == W_DATA) && gmii_rx_dv && room && !ovf;
  wire frame_end = (wstate == W_DATA) && !gmii_rx_dv;

  assign commit  = frame_end && !bad && !ovf && (crc == CRC_RESIDUE) && (wcnt > 16'd4) && desc_in_ready;
  assign desc_in = '{len: wcnt - 16'd4, ts: frame_ts};

  always_ff @(posedge clk) begin
    if (wr_byte) mem[wr_ptr[BUF_AW-1:0]] <= gmii_rxd;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wstate          <= W_IDLE;
      wr_ptr          <= '0;
      commit_ptr      <= '0;
      crc             <= '1;
      wcnt            <= '0;
      bad             <= 1'b0;
      ovf             <= 1'b0;
      frame_ts        <= '0;
      cnt_frames_ok   <= '0;
      cnt_frames_bad  <= '0;
      cnt_frames_full <= '0;
    end else begin
      unique case (wstate)
        W_IDLE: begin
          if (gmii_rx_dv && gmii_rxd == 8'hD5) begin
            wstate   <= W_DATA;
            crc      <= '1;
            wcnt     <= '0;
            bad      <= gmii_rx_er;
            ovf      <= 1'b0;
            frame_ts <= ts_in;
            wr_ptr   <= commit_ptr;
          end else if (gmii_rx_dv && gmii_rxd != 8'h55) begin
            wstate <= W_WAIT;             // frame without a proper preamble
          end
        end
        W_DATA: begin
          if (gmii_rx_dv) begin
            if (gmii_rx_er) bad <= 1'b1;
            if (!room) ovf <= 1'b1;
            if (wr_byte) begin
              wr_ptr <= wr_ptr + 1'b1;
              wcnt   <= wcnt + 1'b1;
              crc    <= crc32_byte(crc, gmii_rxd);
            end
          end else begin
            wstate <= W_IDLE;
            if (commit) begin
              commit_ptr    <= wr_ptr;
              cnt_frames_ok <= cnt_frames_ok + 1'b1;
            end else begin
              wr_ptr <= commit_ptr;
              if (ovf || !desc_in_ready) cnt_frames_full <= cnt_frames_full + 1'b1;
              else                       cnt_frames_bad  <= cnt_frames_bad + 1'b1;
            end
          end
        end
        W_WAIT: if (!gmii_rx_dv) wstate <= W_IDLE;
        default: wstate <= W_IDLE;
      endcase
    end
  end

  nf_fifo #(.T(desc_t), .DEPTH(DESC_DEPTH)) u_desc (
    .clk, .rst,
    .in_valid (commit), .in_ready (desc_in_ready), .in_data (desc_in),
    .out_valid(desc_out_valid), .out_ready(desc_pop), .out_data(desc_out),
    .level    ()
  );

  // ---------------- read side ----------------
  logic [15:0] rcnt;

  assign out_valid = desc_out_valid;
  assign out_data  = mem[rd_ptr[BUF_AW-1:0]];
  assign out_sop   = (rcnt == 16'd0);
  assign out_eop   = (rcnt == desc_out.len - 16'd1);
  assign out_len   = desc_out.len;
  assign out_ts    = desc_out.ts;
  assign desc_pop  = out_valid && out_ready && out_eop;

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      rcnt   <= '0;
    end else if (out_valid && out_ready) begin
      if (out_eop) begin
        rd_ptr <= rd_ptr + (BUF_AW+1)'(5);         // last byte plus the 4 FCS bytes
        rcnt   <= '0;
      end else begin
        rd_ptr <= rd_ptr + 1'b1;
        rcnt   <= rcnt + 1'b1;
      end
    end
  end

endmodule

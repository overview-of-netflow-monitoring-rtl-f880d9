// nf_hash: hash unit.
//
// Compresses the 304-bit flow key (addresses, ports, protocol, ToS) into a
// HASH_W-bit value that fits one TCAM entry. The architecture asks for a hash
// function "for example CRC" and a 64-bit result, so that with some 200,000
// flows per second two flows practically never collide. This design uses
// CRC-64 with the ECMA-182 polynomial 0x42F0E1EBA9EA3693, start value zero,
// key fed most significant bit first, no final inversion (polynomial and bit
// order are this design's choice).
//
// The CRC of the whole key is one XOR network computed in a single cycle and
// registered: one-cycle latency, one key per cycle, valid/ready with the
// output held until taken.
module nf_hash
  import nf_pkg::*;
#(
  parameter logic [63:0] POLY = 64'h42F0E1EBA9EA3693
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  output logic              in_ready,
  input  flow_key_t         in_key,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [HASH_W-1:0] out_hash
);

  function automatic logic [63:0] crc64(input logic [KEY_W-1:0] d);
    logic [63:0] c;
    c = '0;
    for (int i = KEY_W - 1; i >= 0; i--) begin
      c = (c[63] ^ d[i]) ? ((c << 1) ^ POLY) : (c << 1);
    end
    return c;
  endfunction

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_hash  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_hash <= crc64(in_key);
    end
  end

endmodule

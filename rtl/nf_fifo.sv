// nf_fifo: synchronous first-word-fall-through FIFO of any packed type.
//
// Used twice in the adapter: as the packet FIFO that holds one pkt_info_t per
// datagram while its key travels through HASH, CAM and MAN, and as SW_FIFO,
// the short buffer of exported flow records that software drains over PCI.
// Neither depth is given by the architecture; DEPTH is a parameter.
//
// Interface: valid/ready on both sides. `in_ready` is low when full; `out_valid`
// is high when not empty and `out_data` is the oldest entry. A push and a pop
// may happen in the same cycle. `level` is the number of entries held.
// Storage is a plain array with write pointer, read pointer and count.
module nf_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 16
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T              mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [$clog2(DEPTH+1)-1:0] count;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign level     = count;

  function automatic logic [AW-1:0] nxt(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= nxt(wr_ptr);
      if (pop)  rd_ptr <= nxt(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // The count never leaves 0..DEPTH.
  assert property (@(posedge clk) disable iff (rst) 32'(count) <= DEPTH);

endmodule

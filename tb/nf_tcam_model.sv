// nf_tcam_model: behavioural model of the external TCAM chip (not RTL).
//
// Holds up to ROWS 64-bit entries. A search compares the key with every
// valid entry and answers LAT cycles later with hit and the index of the
// match. A write stores a key and its valid bit at an index; it is seen by
// searches from the next cycle on. Ternary masks are not modelled: the
// adapter only stores exact hashes.
module nf_tcam_model #(
  parameter int unsigned ROWS  = 32768,
  parameter int unsigned PTR_W = $clog2(ROWS),
  parameter int unsigned LAT   = 2
) (
  input  logic             clk,
  input  logic             srch_valid,
  input  logic [63:0]      srch_key,
  output logic             res_valid,
  output logic             res_hit,
  output logic [PTR_W-1:0] res_idx,
  input  logic             wr_en,
  input  logic [PTR_W-1:0] wr_idx,
  input  logic [63:0]      wr_key,
  input  logic             wr_vld
);
  int unsigned       by_key [logic [63:0]];   // key -> index
  logic [63:0]       key_at [int unsigned];    // index -> key of valid entries
  logic [LAT-1:0]    pv;
  logic              ph [LAT];
  logic [PTR_W-1:0]  pi [LAT];

  initial pv = '0;

  assign res_valid = pv[LAT-1];
  assign res_hit   = ph[LAT-1];
  assign res_idx   = pi[LAT-1];

  always @(posedge clk) begin
    for (int s = LAT - 1; s > 0; s--) begin
      pv[s] <= pv[s-1];
      ph[s] <= ph[s-1];
      pi[s] <= pi[s-1];
    end
    pv[0] <= srch_valid;
    ph[0] <= srch_valid && by_key.exists(srch_key);
    pi[0] <= (srch_valid && by_key.exists(srch_key)) ? PTR_W'(by_key[srch_key]) : '0;
    if (wr_en) begin
      if (key_at.exists(int'(wr_idx))) begin
        by_key.delete(key_at[int'(wr_idx)]);
        key_at.delete(int'(wr_idx));
      end
      if (wr_vld) begin
        by_key[wr_key] = int'(wr_idx);
        key_at[int'(wr_idx)] = wr_key;
      end
    end
  end

  function automatic int entries();
    return key_at.num();
  endfunction
endmodule

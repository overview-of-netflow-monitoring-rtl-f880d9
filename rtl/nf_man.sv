// nf_man: management unit that binds the TCAM controller (CAM) and the SSRAM
// controller (SRAM) into one flow table.
//
// For every row of the table it keeps a 3-bit aging field (architecture):
//   000 free, 001 waiting for delete (delete sent to CAM, not yet
//   acknowledged), 010..111 active. A created or matched flow is set to 111.
//   A pointer walks round all rows and decrements each active value; a row
//   found at 010 is inactive and is disposed. That gives six active levels,
//   so the inactive timeout is known to 1/6 of its value. Software sets the
//   pointer's speed with `sweep_period` (cycles between two steps).
// It also keeps the number of stored records. When that number reaches the
// software limit `high_water` the unit switches to aggressive disposal: the
// pointer then steps every cycle (what "aggressive" means is this design's
// choice).
//
// Free rows are held in a free list (this design's choice), filled with all
// rows after reset; CAM takes from it on a miss, a delete acknowledge returns
// the row.
//
// Every CAM result becomes one SRAM command, in order: HIT -> UPDATE,
// NEW -> NEW, FULL -> DISCARD, DELACK -> DELETE (export). A flow is
// disposed in two steps: the row is set to 001 and CAM is told to delete the
// entry; packets that CAM matched before the delete still arrive as HITs and
// update the record; only the acknowledge, which CAM sends after all of them,
// exports the record and frees the row. SRAM may ask to dispose a flow whose
// active time has run out (`sdel_*`); MAN starts the same two steps for it.
//
// One aging-field access per cycle, by priority: CAM result, SRAM delete
// request, sweep step. After reset the unit spends ROWS cycles clearing the
// aging field and filling the free list (`init_done` low).
module nf_man
  import nf_pkg::*;
#(
  parameter int unsigned ROWS  = 32768,
  parameter int unsigned PTR_W = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             rst,
  // software registers
  input  logic [31:0]      sweep_period,
  input  logic [PTR_W:0]   high_water,
  // free rows to CAM
  output logic             free_valid,
  output logic [PTR_W-1:0] free_ptr,
  input  logic             free_take,
  // delete orders to CAM
  output logic             del_valid,
  input  logic             del_ready,
  output logic [PTR_W-1:0] del_ptr,
  // results from CAM
  input  logic             rsp_valid,
  output logic             rsp_ready,
  input  cam_rsp_e         rsp_type,
  input  logic [PTR_W-1:0] rsp_ptr,
  // commands to SRAM
  output logic             cmd_valid,
  input  logic             cmd_ready,
  output sram_op_e         cmd_op,
  output logic [PTR_W-1:0] cmd_ptr,
  // dispose requests from SRAM (active timeout)
  input  logic             sdel_valid,
  output logic             sdel_ready,
  input  logic [PTR_W-1:0] sdel_ptr,
  // status
  output logic             init_done,
  output logic [PTR_W:0]   rec_count,
  output logic             aggressive,
  output logic [31:0]      cnt_inactive,
  output logic [31:0]      cnt_active,
  output logic [31:0]      cnt_full
);

  logic [2:0]       age [ROWS];
  logic [PTR_W-1:0] flist [ROWS];
  logic [PTR_W:0]   fl_rd, fl_wr;
  logic [PTR_W:0]   init_cnt;
  logic [PTR_W-1:0] sweep_ptr;
  logic [31:0]      presc;
  logic             sweep_due;

  // ---- choose this cycle's aging-field operation ----
  wire cmd_free  = !cmd_valid || cmd_ready;
  wire del_free  = !del_valid || del_ready;
  wire op_rsp    = init_done && rsp_valid && cmd_free;
  wire op_sdel   = init_done && !op_rsp && sdel_valid && del_free;
  wire op_sweep  = init_done && !op_rsp && !op_sdel && sweep_due && del_free;

  logic [PTR_W-1:0] age_addr;
  logic [2:0]       age_rd;
  always_comb begin
    if (op_rsp)       age_addr = rsp_ptr;
    else if (op_sdel) age_addr = sdel_ptr;
    else              age_addr = sweep_ptr;
  end
  assign age_rd = age[age_addr];

  wire age_active = (age_rd >= AGE_EXPIRE);
  wire sweep_tick = aggressive || (presc + 1 >= sweep_period);

  assign rsp_ready  = op_rsp;
  assign sdel_ready = op_sdel;
  assign free_valid = init_done && (fl_wr != fl_rd);
  assign free_ptr   = flist[fl_rd[PTR_W-1:0]];
  assign aggressive = (rec_count >= high_water);

  // aging field and free-list writes
  always_ff @(posedge clk) begin
    if (!init_done) begin
      age[init_cnt[PTR_W-1:0]]   <= AGE_FREE;
      flist[init_cnt[PTR_W-1:0]] <= init_cnt[PTR_W-1:0];
    end else begin
      if (op_rsp) begin
        unique case (rsp_type)
          CAM_NEW:    age[age_addr] <= AGE_FRESH;
          CAM_HIT:    if (age_active) age[age_addr] <= AGE_FRESH;
          CAM_DELACK: age[age_addr] <= AGE_FREE;
          default: ;
        endcase
        if (rsp_type == CAM_DELACK) flist[fl_wr[PTR_W-1:0]] <= rsp_ptr;
      end else if (op_sdel) begin
        if (age_active) age[age_addr] <= AGE_WAITDEL;
      end else if (op_sweep) begin
        if (age_rd == AGE_EXPIRE)     age[age_addr] <= AGE_WAITDEL;
        else if (age_rd > AGE_EXPIRE) age[age_addr] <= age_rd - 3'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      init_done    <= 1'b0;
      init_cnt     <= '0;
      fl_rd        <= '0;
      fl_wr        <= '0;
      sweep_ptr    <= '0;
      presc        <= '0;
      sweep_due    <= 1'b0;
      rec_count    <= '0;
      del_valid    <= 1'b0;
      del_ptr      <= '0;
      cmd_valid    <= 1'b0;
      cmd_op       <= SR_UPDATE;
      cmd_ptr      <= '0;
      cnt_inactive <= '0;
      cnt_active   <= '0;
      cnt_full     <= '0;
    end else if (!init_done) begin
      init_cnt <= init_cnt + 1'b1;
      if (init_cnt == (PTR_W+1)'(ROWS - 1)) begin
        init_done <= 1'b1;
        fl_wr     <= (PTR_W+1)'(ROWS);
      end
    end else begin
      if (del_valid && del_ready) del_valid <= 1'b0;
      if (cmd_valid && cmd_ready) cmd_valid <= 1'b0;
      if (free_take) fl_rd <= fl_rd + 1'b1;

      // sweep pacing: a step becomes due every sweep_period cycles, or every
      // cycle in aggressive mode, and stays due until the sweep takes it
      if (sweep_tick) presc <= '0;
      else            presc <= presc + 1;
      sweep_due <= sweep_tick || (sweep_due && !op_sweep);

      if (op_rsp) begin
        cmd_valid <= 1'b1;
        cmd_ptr   <= rsp_ptr;
        unique case (rsp_type)
          CAM_HIT: cmd_op <= SR_UPDATE;
          CAM_NEW: begin
            cmd_op    <= SR_NEW;
            rec_count <= rec_count + 1'b1;
          end
          CAM_FULL: begin
            cmd_op   <= SR_DISCARD;
            cnt_full <= cnt_full + 1'b1;
          end
          CAM_DELACK: begin
            cmd_op    <= SR_DELETE;
            rec_count <= rec_count - 1'b1;
            fl_wr     <= fl_wr + 1'b1;
          end
          default: ;
        endcase
      end else if (op_sdel) begin
        if (age_active) begin
          del_valid  <= 1'b1;
          del_ptr    <= sdel_ptr;
          cnt_active <= cnt_active + 1'b1;
        end
      end else if (op_sweep) begin
        sweep_ptr <= (sweep_ptr == PTR_W'(ROWS - 1)) ? '0 : sweep_ptr + 1'b1;
        if (age_rd == AGE_EXPIRE) begin
          del_valid    <= 1'b1;
          del_ptr      <= sweep_ptr;
          cnt_inactive <= cnt_inactive + 1'b1;
        end
      end
    end
  end

  // The free list never gives more rows than it holds.
  assert property (@(posedge clk) disable iff (rst) free_take |-> free_valid);
  // Rows stay counted within the table.
  assert property (@(posedge clk) disable iff (rst) 32'(rec_count) <= ROWS);

endmodule

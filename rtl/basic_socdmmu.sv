// basic_socdmmu -- executes SoCDMMU commands, one at a time.
//
// Holds the allocation vector (one used bit per block), the allocation table
// (one entry per block) and the free-block selector, and drives the mapping
// updates of every PE's address converter. Every command finishes in a fixed
// number of cycles whatever its size, because each step works on all blocks
// in parallel:
//
//   G_alloc_ex / G_alloc_rw (4 cycles)
//     take    : latch the granted command
//     search  : pick the N lowest free blocks; check that the PE's virtual
//               range VBN..VBN+N-1 is unused and fits, and (rw) that the
//               SW ID is not already shared
//     update  : mark the blocks used, write their table entries, map block
//               with index k at VBN+k in the PE's converter (writable)
//     respond
//   G_alloc_ro (3 cycles)
//     take
//     map     : find the blocks of the read/write allocation with this SW ID
//               (not owned or already mapped by the PE), check the virtual
//               range, add the PE as reader and map block k at VBN+k
//               read-only
//     respond
//   G_dealloc (5 cycles)
//     take
//     lookup  : the PE's mappings whose start (VBN minus block index) is the
//               command's VBN
//     check   : is the PE the owner or a read-only user of them
//     update  : owner -> free the blocks, drop every PE's mapping of them;
//               reader -> drop only this PE's mapping and reader bit
//     respond
//   unknown opcode or size 0: take, respond with ST_BAD_CMD (2 cycles)
//
// The cycle counts are those the document reports (4, 4, 3, 5), counted from
// the edge at which the PE writes its command (the take step follows at the
// next edge) to the edge that sets the PE's done flag. The command set, the
// allocation types and the table sizes are the document's; the step contents,
// the failure checks and the release rules are this design's choices.
//
// Interface: gnt_* is taken at a rising edge while idle is high. rsp_* is
// valid for one cycle in the respond step. conv_* carry the converters'
// mappings in and their updates out; updates apply at the next rising edge.
module basic_socdmmu
  import socdmmu_pkg::*;
#(
  parameter int unsigned NUM_PE     = DEF_NUM_PE,
  parameter int unsigned NUM_BLOCKS = DEF_NUM_BLOCKS,
  localparam int unsigned PE_W      = (NUM_PE > 1) ? $clog2(NUM_PE) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // granted command
  input  logic                  gnt_valid,
  input  logic [PE_W-1:0]       gnt_pe,
  input  cmd_t                  gnt_cmd,
  output logic                  idle,
  // response
  output logic                  rsp_valid,
  output logic [PE_W-1:0]       rsp_pe,
  output status_e               rsp_status,
  output logic [CNT_W-1:0]      rsp_count,
  // address converters
  input  logic [NUM_BLOCKS-1:0] conv_valid [NUM_PE],
  input  vbn_t                  conv_vbn   [NUM_PE][NUM_BLOCKS],
  output logic                  conv_set,
  output logic [PE_W-1:0]       conv_set_pe,
  output logic [NUM_BLOCKS-1:0] conv_set_mask,
  output vbn_t                  conv_set_base,
  output size_t                 conv_set_off [NUM_BLOCKS],
  output logic                  conv_set_wr,
  output logic [NUM_BLOCKS-1:0] conv_clr [NUM_PE],
  // observation
  output logic [NUM_BLOCKS-1:0] used
);

  typedef enum logic [2:0] {
    S_IDLE, S_A_SEARCH, S_A_UPDATE, S_R_MAP, S_D_LOOKUP, S_D_CHECK, S_D_UPDATE, S_RESP
  } state_e;

  state_e                state;
  logic [PE_W-1:0]       cur_pe;
  cmd_t                  cur;
  status_e               st_q;
  logic [CNT_W-1:0]      cnt_q;
  logic [NUM_BLOCKS-1:0] mask_q;
  logic                  owner_q;

  // ---- storage -----------------------------------------------------------
  logic [NUM_BLOCKS-1:0] vec_set, vec_clr;
  logic [NUM_BLOCKS-1:0] tbl_wr, tbl_rd_add, tbl_rd_clr, tbl_free;
  mode_e                 t_mode    [NUM_BLOCKS];
  logic [PE_W-1:0]       t_owner   [NUM_BLOCKS];
  swid_t                 t_swid    [NUM_BLOCKS];
  size_t                 t_offset  [NUM_BLOCKS];
  logic [NUM_PE-1:0]     t_readers [NUM_BLOCKS];

  alloc_vector #(.NUM_BLOCKS(NUM_BLOCKS)) u_vec (
    .clk, .rst_n, .set_mask(vec_set), .clr_mask(vec_clr), .used
  );

  logic [NUM_BLOCKS-1:0] sel;
  size_t                 sel_off [NUM_BLOCKS];
  logic                  enough;

  free_block_selector #(.NUM_BLOCKS(NUM_BLOCKS)) u_sel (
    .used, .size(cur.size), .sel, .offset(sel_off), .enough
  );

  alloc_table #(.NUM_PE(NUM_PE), .NUM_BLOCKS(NUM_BLOCKS)) u_tbl (
    .clk, .rst_n,
    .wr_mask(tbl_wr),
    .wr_mode((op_e'(cur.op) == OP_ALLOC_RW) ? MODE_RW : MODE_EX),
    .wr_owner(cur_pe), .wr_swid(cur.swid), .wr_offset(sel_off),
    .rd_add_mask(tbl_rd_add), .rd_clr_mask(tbl_rd_clr), .rd_pe(cur_pe),
    .free_mask(tbl_free),
    .mode(t_mode), .owner(t_owner), .swid(t_swid), .offset(t_offset), .readers(t_readers)
  );

  // ---- parallel checks over all blocks -----------------------------------
  logic [NUM_BLOCKS-1:0] pe_map;        // the current PE's mappings
  vbn_t                  pe_vbn [NUM_BLOCKS];
  logic [NUM_BLOCKS-1:0] ro_match;      // blocks a G_alloc_ro would map
  logic [NUM_BLOCKS-1:0] dl_match;      // blocks a G_dealloc names
  logic [NUM_BLOCKS-1:0] owned;         // blocks the current PE owns
  logic [CNT_W-1:0]      ro_count, dl_count;
  logic                  swid_taken;
  logic [CNT_W-1:0]      range_len;     // blocks of the virtual range to check
  logic [VBN_W:0]        range_end;     // last virtual block, one bit wider
  logic                  range_busy;

  always_comb begin
    pe_map = conv_valid[cur_pe];
    for (int i = 0; i < NUM_BLOCKS; i++) pe_vbn[i] = conv_vbn[cur_pe][i];
  end

  always_comb begin
    ro_count   = '0;
    dl_count   = '0;
    swid_taken = 1'b0;
    for (int i = 0; i < NUM_BLOCKS; i++) begin
      ro_match[i] = (t_mode[i] == MODE_RW) && (t_swid[i] == cur.swid) &&
                    (t_owner[i] != cur_pe) && !t_readers[i][cur_pe];
      dl_match[i] = pe_map[i] && ((pe_vbn[i] - VBN_W'(t_offset[i])) == cur.vbn);
      owned[i]    = (t_mode[i] != MODE_FREE) && (t_owner[i] == cur_pe);
      ro_count    = ro_count + CNT_W'(ro_match[i]);
      dl_count    = dl_count + CNT_W'(dl_match[i]);
      swid_taken  = swid_taken | ((t_mode[i] == MODE_RW) && (t_swid[i] == cur.swid));
    end
  end

  // does VBN .. VBN+range_len-1 leave the address space or hit a mapping?
  always_comb begin
    range_len  = (state == S_R_MAP) ? ro_count : CNT_W'(cur.size);
    range_end  = {1'b0, cur.vbn} + (VBN_W+1)'(range_len) - 1'b1;
    range_busy = range_end[VBN_W];
    for (int i = 0; i < NUM_BLOCKS; i++)
      if (pe_map[i] && pe_vbn[i] >= cur.vbn && {1'b0, pe_vbn[i]} <= range_end)
        range_busy = 1'b1;
  end

  // ---- control -----------------------------------------------------------
  assign idle = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cur_pe  <= '0;
      cur     <= '0;
      st_q    <= ST_OK;
      cnt_q   <= '0;
      mask_q  <= '0;
      owner_q <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (gnt_valid) begin
          cur_pe <= gnt_pe;
          cur    <= gnt_cmd;
          st_q   <= ST_OK;
          cnt_q  <= '0;
          unique case (gnt_cmd.op)
            OP_ALLOC_EX, OP_ALLOC_RW:
              if (gnt_cmd.size == '0) begin
                st_q  <= ST_BAD_CMD;
                state <= S_RESP;
              end else state <= S_A_SEARCH;
            OP_ALLOC_RO: state <= S_R_MAP;
            OP_DEALLOC:  state <= S_D_LOOKUP;
            default: begin
              st_q  <= ST_BAD_CMD;
              state <= S_RESP;
            end
          endcase
        end
        S_A_SEARCH: begin
          if (op_e'(cur.op) == OP_ALLOC_RW && swid_taken) st_q <= ST_SWID_BUSY;
          else if (range_busy)                           st_q <= ST_VA_BUSY;
          else if (!enough)                              st_q <= ST_NO_MEM;
          state <= S_A_UPDATE;
        end
        S_A_UPDATE: begin
          if (st_q == ST_OK) cnt_q <= CNT_W'(cur.size);
          state <= S_RESP;
        end
        S_R_MAP: begin
          if (ro_count == '0)  st_q <= ST_NOT_FOUND;
          else if (range_busy) st_q <= ST_VA_BUSY;
          else                 cnt_q <= ro_count;
          state <= S_RESP;
        end
        S_D_LOOKUP: begin
          mask_q <= dl_match;
          cnt_q  <= dl_count;
          if (dl_count == '0) st_q <= ST_NOT_FOUND;
          state <= S_D_CHECK;
        end
        S_D_CHECK: begin
          owner_q <= |(mask_q & owned);
          state   <= S_D_UPDATE;
        end
        S_D_UPDATE: state <= S_RESP;
        S_RESP:     state <= S_IDLE;
        default:    state <= S_IDLE;
      endcase
    end
  end

  // ---- table, vector and converter updates --------------------------------
  logic a_go, r_go, d_go;
  assign a_go = (state == S_A_UPDATE) && (st_q == ST_OK);
  assign r_go = (state == S_R_MAP) && (ro_count != '0) && !range_busy;
  assign d_go = (state == S_D_UPDATE) && (st_q == ST_OK);

  always_comb begin
    vec_set    = a_go ? sel : '0;
    vec_clr    = (d_go && owner_q) ? mask_q : '0;
    tbl_wr     = a_go ? sel : '0;
    tbl_rd_add = r_go ? ro_match : '0;
    tbl_rd_clr = (d_go && !owner_q) ? mask_q : '0;
    tbl_free   = (d_go && owner_q) ? mask_q : '0;

    conv_set      = a_go || r_go;
    conv_set_pe   = cur_pe;
    conv_set_mask = a_go ? sel : ro_match;
    conv_set_base = cur.vbn;
    conv_set_wr   = a_go;
    for (int i = 0; i < NUM_BLOCKS; i++) conv_set_off[i] = a_go ? sel_off[i] : t_offset[i];
    for (int p = 0; p < NUM_PE; p++)
      conv_clr[p] = (d_go && (owner_q || p == int'(cur_pe))) ? mask_q : '0;
  end

  assign rsp_valid  = (state == S_RESP);
  assign rsp_pe     = cur_pe;
  assign rsp_status = st_q;
  assign rsp_count  = (st_q == ST_OK) ? cnt_q : '0;

  // a command never allocates a block that is in use
  assert property (@(posedge clk) disable iff (!rst_n) (vec_set & used) == '0);

endmodule

// socdmmu_top -- the SoC Dynamic Memory Management Unit.
//
// Several PEs share one large on-chip global memory. Instead of a fixed
// partition, they obtain and return 64 KB blocks of it at run time through
// this unit, and every command completes in a small, fixed number of cycles,
// so an RTOS can use it with a known worst case. Each PE has:
//   * a command interface (pe_interface): it writes a command word and waits
//     for done, then reads status and block count;
//   * an address converter (addr_converter): its 32-bit PE addresses are
//     translated to 24-bit global-memory addresses, with a fault for
//     unmapped blocks and for writes to read-only blocks.
// A round-robin scheduler (cmd_scheduler) passes one command at a time to the
// basic SoCDMMU (basic_socdmmu), which keeps the allocation vector and table
// and updates the converters. With four PEs issuing at once, the last command
// is done within 4 x 5 = 20 cycles.
//
// The overall organisation, command set, sizes and cycle counts follow the
// document; the exact register handshake, the converter organisation and the
// failure rules are this design's choices. The global memory and the PEs are
// outside this module: the translated accesses leave on the phys_* ports.
//
// Timing: a command written at edge 0 gives done at edge 4 (G_alloc_ex,
// G_alloc_rw), 3 (G_alloc_ro) or 5 (G_dealloc) when the unit is free; an
// access presented at one edge leaves translated after it.
module socdmmu_top
  import socdmmu_pkg::*;
#(
  parameter int unsigned NUM_PE     = DEF_NUM_PE,
  parameter int unsigned NUM_BLOCKS = DEF_NUM_BLOCKS,
  localparam int unsigned PE_W      = (NUM_PE > 1) ? $clog2(NUM_PE) : 1,
  localparam int unsigned PHYS_W    = $clog2(NUM_BLOCKS) + BLK_OFF_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // PE command interfaces
  input  logic [NUM_PE-1:0]     cmd_wr,
  input  cmd_t                  cmd      [NUM_PE],
  output logic [NUM_PE-1:0]     cmd_ready,
  output logic [NUM_PE-1:0]     busy,
  output logic [NUM_PE-1:0]     done,
  output status_e               status   [NUM_PE],
  output logic [CNT_W-1:0]      count    [NUM_PE],
  // PE memory accesses
  input  logic [NUM_PE-1:0]     pe_valid,
  input  logic [NUM_PE-1:0]     pe_write,
  input  logic [PE_ADDR_W-1:0]  pe_addr  [NUM_PE],
  // translated accesses toward the global memory
  output logic [NUM_PE-1:0]     phys_valid,
  output logic [NUM_PE-1:0]     phys_write,
  output logic [PHYS_W-1:0]     phys_addr [NUM_PE],
  output logic [NUM_PE-1:0]     fault,
  // allocation vector, for observation
  output logic [NUM_BLOCKS-1:0] used
);

  logic [NUM_PE-1:0]     req, grant;
  cmd_t                  held_cmd [NUM_PE];
  logic [PE_W-1:0]       grant_idx;
  logic                  grant_valid, idle;

  logic                  rsp_valid;
  logic [PE_W-1:0]       rsp_pe;
  status_e               rsp_status;
  logic [CNT_W-1:0]      rsp_count;

  logic [NUM_BLOCKS-1:0] conv_valid [NUM_PE];
  vbn_t                  conv_vbn   [NUM_PE][NUM_BLOCKS];
  logic                  conv_set, conv_set_wr;
  logic [PE_W-1:0]       conv_set_pe;
  logic [NUM_BLOCKS-1:0] conv_set_mask;
  vbn_t                  conv_set_base;
  size_t                 conv_set_off [NUM_BLOCKS];
  logic [NUM_BLOCKS-1:0] conv_clr [NUM_PE];

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    pe_interface u_if (
      .clk, .rst_n,
      .cmd_wr(cmd_wr[p]), .cmd_in(cmd[p]), .cmd_ready(cmd_ready[p]),
      .busy(busy[p]), .done(done[p]), .status(status[p]), .count(count[p]),
      .req(req[p]), .cmd_out(held_cmd[p]), .grant(grant[p]),
      .rsp_valid(rsp_valid && rsp_pe == PE_W'(p)),
      .rsp_status, .rsp_count
    );

    addr_converter #(.NUM_BLOCKS(NUM_BLOCKS)) u_conv (
      .clk, .rst_n,
      .pe_valid(pe_valid[p]), .pe_write(pe_write[p]), .pe_addr(pe_addr[p]),
      .phys_valid(phys_valid[p]), .phys_write(phys_write[p]),
      .phys_addr(phys_addr[p]), .fault(fault[p]),
      .set(conv_set && conv_set_pe == PE_W'(p)), .set_mask(conv_set_mask),
      .set_base(conv_set_base), .set_off(conv_set_off), .set_wr(conv_set_wr),
      .clr_mask(conv_clr[p]),
      .map_valid(conv_valid[p]), .map_vbn(conv_vbn[p])
    );
  end

  cmd_scheduler #(.NUM_PE(NUM_PE)) u_sched (
    .clk, .rst_n, .req, .enable(idle), .grant, .grant_idx, .grant_valid
  );

  basic_socdmmu #(.NUM_PE(NUM_PE), .NUM_BLOCKS(NUM_BLOCKS)) u_core (
    .clk, .rst_n,
    .gnt_valid(grant_valid), .gnt_pe(grant_idx), .gnt_cmd(held_cmd[grant_idx]), .idle,
    .rsp_valid, .rsp_pe, .rsp_status, .rsp_count,
    .conv_valid, .conv_vbn,
    .conv_set, .conv_set_pe, .conv_set_mask, .conv_set_base, .conv_set_off, .conv_set_wr,
    .conv_clr, .used
  );

endmodule

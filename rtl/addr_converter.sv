// addr_converter -- translates one PE's addresses to global-memory addresses.
//
// Each PE sees the blocks it was given at virtual block numbers of its own
// choosing, and the same physical block may sit at different virtual block
// numbers in different PEs. The converter keeps, for every physical block,
// whether this PE has it mapped, at which virtual block number (VBN) and
// whether it may write it. A PE address is split into a VBN (upper 16 bits)
// and an offset (lower 16 bits, 64 KB blocks); the VBN is compared with all
// entries at once, and the index of the matching entry is the physical block
// number that, with the offset, forms the physical address. An access to an
// unmapped block, or a write to a read-only block, raises fault instead.
//
// The basic SoCDMMU guarantees that a PE's mappings never overlap, so at most
// one entry matches. Mappings are added by a mask (block i goes to VBN
// set_base + set_off[i]) and removed by a mask, each in one clock edge.
//
// The 16 MB / 64 KB / 4 GB sizes and the per-PE virtual addresses are the
// document's; the associative table and its one-cycle registered output are
// this design's choices.
//
// Timing: pe_* sampled at a rising edge; phys_* and fault valid after it.
module addr_converter
  import socdmmu_pkg::*;
#(
  parameter int unsigned NUM_BLOCKS = DEF_NUM_BLOCKS,
  localparam int unsigned PBN_W     = (NUM_BLOCKS > 1) ? $clog2(NUM_BLOCKS) : 1,
  localparam int unsigned PHYS_W    = PBN_W + BLK_OFF_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // PE side
  input  logic                  pe_valid,
  input  logic                  pe_write,
  input  logic [PE_ADDR_W-1:0]  pe_addr,
  // global-memory side
  output logic                  phys_valid,
  output logic                  phys_write,
  output logic [PHYS_W-1:0]     phys_addr,
  output logic                  fault,
  // mapping updates from the basic SoCDMMU
  input  logic                  set,
  input  logic [NUM_BLOCKS-1:0] set_mask,
  input  vbn_t                  set_base,
  input  size_t                 set_off [NUM_BLOCKS],
  input  logic                  set_wr,
  input  logic [NUM_BLOCKS-1:0] clr_mask,
  // current mappings
  output logic [NUM_BLOCKS-1:0] map_valid,
  output vbn_t                  map_vbn [NUM_BLOCKS]
);

  logic [NUM_BLOCKS-1:0] map_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      map_valid <= '0;
      map_wr    <= '0;
      for (int i = 0; i < NUM_BLOCKS; i++) map_vbn[i] <= '0;
    end else begin
      for (int i = 0; i < NUM_BLOCKS; i++) begin
        if (clr_mask[i]) begin
          map_valid[i] <= 1'b0;
        end else if (set && set_mask[i]) begin
          map_valid[i] <= 1'b1;
          map_wr[i]    <= set_wr;
          map_vbn[i]   <= set_base + VBN_W'(set_off[i]);
        end
      end
    end
  end

  // associative look-up
  vbn_t             req_vbn;
  logic             hit, hit_wr;
  logic [PBN_W-1:0] hit_pbn;
  logic [NUM_BLOCKS-1:0] match;

  assign req_vbn = pe_addr[PE_ADDR_W-1:BLK_OFF_W];

  always_comb begin
    hit     = 1'b0;
    hit_wr  = 1'b0;
    hit_pbn = '0;
    for (int i = 0; i < NUM_BLOCKS; i++) begin
      match[i] = map_valid[i] && map_vbn[i] == req_vbn;
      if (match[i]) begin
        hit     = 1'b1;
        hit_wr  = hit_wr | map_wr[i];
        hit_pbn = hit_pbn | PBN_W'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phys_valid <= 1'b0;
      phys_write <= 1'b0;
      phys_addr  <= '0;
      fault      <= 1'b0;
    end else begin
      phys_valid <= pe_valid && hit && (!pe_write || hit_wr);
      phys_write <= pe_write;
      phys_addr  <= {hit_pbn, pe_addr[BLK_OFF_W-1:0]};
      fault      <= pe_valid && (!hit || (pe_write && !hit_wr));
    end
  end

  // the basic SoCDMMU never maps two blocks at the same virtual block number
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(match));

endmodule

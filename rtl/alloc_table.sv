// alloc_table -- the SoCDMMU allocation table.
//
// One entry per physical block of global memory. An entry records how the
// block is allocated (free, exclusive or read/write), the PE that owns it, the
// software identifier (SW ID) under which a read/write allocation may be
// shared, the block's index inside its allocation and one bit per PE that has
// mapped it read-only. All entries are visible at once, so the basic SoCDMMU
// can match every block against a command in a single cycle; all writes are
// by block mask, so a command updates any number of entries at one clock edge.
//
// The 256 entries and the three allocation types are the document's; the
// entry fields and their encoding are this design's choices.
//
// Interface (all writes at the rising edge, in this order of precedence):
//   free_mask    : entry returns to MODE_FREE, readers cleared
//   wr_mask      : entry gets wr_mode / wr_owner / wr_swid / wr_offset[i]
//   rd_add_mask  : PE rd_pe is added as a read-only user
//   rd_clr_mask  : PE rd_pe is removed as a read-only user
module alloc_table
  import socdmmu_pkg::*;
#(
  parameter int unsigned NUM_PE     = DEF_NUM_PE,
  parameter int unsigned NUM_BLOCKS = DEF_NUM_BLOCKS,
  localparam int unsigned PE_W      = (NUM_PE > 1) ? $clog2(NUM_PE) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // new allocation
  input  logic [NUM_BLOCKS-1:0] wr_mask,
  input  mode_e                 wr_mode,
  input  logic [PE_W-1:0]       wr_owner,
  input  swid_t                 wr_swid,
  input  size_t                 wr_offset [NUM_BLOCKS],
  // read-only users
  input  logic [NUM_BLOCKS-1:0] rd_add_mask,
  input  logic [NUM_BLOCKS-1:0] rd_clr_mask,
  input  logic [PE_W-1:0]       rd_pe,
  // release
  input  logic [NUM_BLOCKS-1:0] free_mask,
  // all entries
  output mode_e                 mode    [NUM_BLOCKS],
  output logic [PE_W-1:0]       owner   [NUM_BLOCKS],
  output swid_t                 swid    [NUM_BLOCKS],
  output size_t                 offset  [NUM_BLOCKS],
  output logic [NUM_PE-1:0]     readers [NUM_BLOCKS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_BLOCKS; i++) begin
        mode[i]    <= MODE_FREE;
        owner[i]   <= '0;
        swid[i]    <= '0;
        offset[i]  <= '0;
        readers[i] <= '0;
      end
    end else begin
      for (int i = 0; i < NUM_BLOCKS; i++) begin
        if (free_mask[i]) begin
          mode[i]    <= MODE_FREE;
          readers[i] <= '0;
        end else if (wr_mask[i]) begin
          mode[i]    <= wr_mode;
          owner[i]   <= wr_owner;
          swid[i]    <= wr_swid;
          offset[i]  <= wr_offset[i];
          readers[i] <= '0;
        end else if (rd_add_mask[i]) begin
          readers[i][rd_pe] <= 1'b1;
        end else if (rd_clr_mask[i]) begin
          readers[i][rd_pe] <= 1'b0;
        end
      end
    end
  end

endmodule

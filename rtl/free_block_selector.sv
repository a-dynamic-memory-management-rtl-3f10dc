// free_block_selector -- picks the blocks for a new allocation.
//
// Given the allocation vector and a size N, it selects the N lowest-numbered
// free blocks and gives each selected block its index inside the allocation
// (0 for the lowest). The index is a running count of the free blocks below
// each position, so the whole selection is one combinational prefix count
// over the vector: its time is the same for any N, which is what makes the
// allocation commands take a fixed number of cycles. The physical blocks need
// not be adjacent; the address converter presents them to the PE as N
// consecutive virtual blocks, in the order of their index.
//
// The fixed-time requirement is the document's; the lowest-first prefix-count
// method is this design's choice.
//
// Interface: purely combinational. enough is 1 when at least N blocks are
// free; sel is only meaningful then.
module free_block_selector
  import socdmmu_pkg::*;
#(
  parameter int unsigned NUM_BLOCKS = DEF_NUM_BLOCKS
) (
  input  logic [NUM_BLOCKS-1:0] used,
  input  size_t                 size,
  output logic [NUM_BLOCKS-1:0] sel,
  output size_t                 offset [NUM_BLOCKS],
  output logic                  enough
);

  logic [CNT_W-1:0] below;       // free blocks below the current position
  logic [CNT_W-1:0] free_count;  // free blocks in all

  always_comb begin
    below = '0;
    for (int i = 0; i < NUM_BLOCKS; i++) begin
      offset[i] = below[SIZE_W-1:0];
      sel[i]    = !used[i] && (below < CNT_W'(size));
      below     = below + CNT_W'(!used[i]);
    end
    free_count = below;
    enough     = (free_count >= CNT_W'(size));
  end

endmodule

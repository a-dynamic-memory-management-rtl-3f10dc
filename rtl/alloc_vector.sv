// alloc_vector -- the SoCDMMU allocation vector.
//
// One bit per block of global memory; a bit is 1 while its block is allocated.
// A command sets the bits of the blocks it allocates and clears the bits of
// the blocks it releases, each as a whole mask in a single clock edge, so the
// cost does not depend on how many blocks are involved. Reset marks the whole
// memory free.
//
// The 256-bit size follows the document (16 MB of 64 KB blocks); the bit
// polarity and reset state are this design's choices.
//
// Interface: set_mask / clr_mask take effect at the rising clock edge (a bit
// in both is cleared); used shows the stored vector.
module alloc_vector #(
  parameter int unsigned NUM_BLOCKS = socdmmu_pkg::DEF_NUM_BLOCKS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NUM_BLOCKS-1:0] set_mask,
  input  logic [NUM_BLOCKS-1:0] clr_mask,
  output logic [NUM_BLOCKS-1:0] used
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) used <= '0;
    else        used <= (used | set_mask) & ~clr_mask;
  end

endmodule

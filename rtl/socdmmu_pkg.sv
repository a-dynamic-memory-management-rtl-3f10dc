// socdmmu_pkg -- types and constants shared by the SoC Dynamic Memory
// Management Unit (SoCDMMU).
//
// The global on-chip memory is cut into equally sized blocks. Each PE
// (processing element) asks the SoCDMMU for blocks with a 32-bit command word
// and then addresses them through its own virtual block numbers (its "PE
// address"); the SoCDMMU's address converters translate those to physical
// block numbers.
//
// Following the document: four command types (exclusive, read/write and
// read-only allocation, de-allocation) with opcodes 000..011, a command word
// laid out, from the top bit down, as SW ID | Size | Virtual block number |
// opcode, 64 KB blocks, 16 MB of global memory (256 blocks), a 4 GB PE address
// space and four PEs. The field widths (5-bit SW ID, 8-bit size, 16-bit
// virtual block number), the status codes and the table field encodings are
// this design's own choices.
package socdmmu_pkg;

  // ---- sizes -------------------------------------------------------------
  localparam int unsigned DEF_NUM_PE     = 4;    // PEs sharing the memory
  localparam int unsigned DEF_NUM_BLOCKS = 256;  // 16 MB / 64 KB
  localparam int unsigned BLK_OFF_W      = 16;   // 64 KB block -> 16 offset bits
  localparam int unsigned PE_ADDR_W      = 32;   // 4 GB PE address space
  localparam int unsigned VBN_W          = PE_ADDR_W - BLK_OFF_W;  // virtual block number
  localparam int unsigned SIZE_W         = 8;    // block count in a command
  localparam int unsigned SWID_W         = 5;    // software (sharing) identifier
  localparam int unsigned CNT_W          = SIZE_W + 1;

  typedef logic [VBN_W-1:0]  vbn_t;
  typedef logic [SIZE_W-1:0] size_t;
  typedef logic [SWID_W-1:0] swid_t;

  // ---- commands ----------------------------------------------------------
  typedef enum logic [2:0] {
    OP_ALLOC_EX = 3'b000,   // G_alloc_ex : exclusive allocation
    OP_ALLOC_RW = 3'b001,   // G_alloc_rw : read/write allocation, shareable by SW ID
    OP_ALLOC_RO = 3'b010,   // G_alloc_ro : read-only mapping of a shared allocation
    OP_DEALLOC  = 3'b011    // G_dealloc  : release an allocation
  } op_e;

  // 32-bit command word, most significant field first.
  typedef struct packed {
    swid_t      swid;   // [31:27]
    size_t      size;   // [26:19]
    vbn_t       vbn;    // [18:3]
    logic [2:0] op;     // [2:0]  (op_e value; kept raw so bad codes can be seen)
  } cmd_t;

  // ---- responses ---------------------------------------------------------
  typedef enum logic [2:0] {
    ST_OK        = 3'd0,
    ST_NO_MEM    = 3'd1,   // not enough free blocks
    ST_VA_BUSY   = 3'd2,   // the virtual block range overlaps an existing mapping
    ST_NOT_FOUND = 3'd3,   // no allocation with that SW ID / virtual block
    ST_SWID_BUSY = 3'd4,   // SW ID already names a read/write allocation
    ST_BAD_CMD   = 3'd5    // unknown opcode or zero size
  } status_e;

  // ---- allocation table --------------------------------------------------
  typedef enum logic [1:0] {
    MODE_FREE = 2'd0,
    MODE_EX   = 2'd1,
    MODE_RW   = 2'd2
  } mode_e;

endpackage

// cmd_scheduler -- serialises SoCDMMU commands from several PEs.
//
// PEs may issue commands at the same time; the basic SoCDMMU executes one at
// a time. Whenever it is idle (enable), this round-robin arbiter grants the
// first requesting PE at or after the one following the last grant. A PE thus
// waits for at most one command of each other PE, which bounds the worst case:
// with four PEs and the longest command (G_dealloc, 5 cycles) the last one is
// done 20 cycles after all four were issued, the figure the document reports.
//
// Serialising concurrent commands and the 20-cycle bound are the document's;
// the round-robin policy is this design's choice.
//
// Interface: grant / grant_idx / grant_valid are combinational from req and
// enable; the pointer advances at the clock edge of a grant.
module cmd_scheduler #(
  parameter int unsigned NUM_PE = socdmmu_pkg::DEF_NUM_PE,
  localparam int unsigned PE_W  = (NUM_PE > 1) ? $clog2(NUM_PE) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_PE-1:0] req,
  input  logic              enable,
  output logic [NUM_PE-1:0] grant,
  output logic [PE_W-1:0]   grant_idx,
  output logic              grant_valid
);

  logic [PE_W-1:0] next_ptr;   // highest priority PE for the next grant

  always_comb begin
    grant       = '0;
    grant_idx   = '0;
    grant_valid = 1'b0;
    if (enable) begin
      for (int k = 0; k < NUM_PE; k++) begin
        automatic logic [PE_W-1:0] idx = PE_W'((int'(next_ptr) + k) % NUM_PE);
        if (!grant_valid && req[idx]) begin
          grant_valid = 1'b1;
          grant_idx   = idx;
          grant[idx]  = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) next_ptr <= '0;
    else if (grant_valid)
      next_ptr <= (int'(grant_idx) == NUM_PE - 1) ? '0 : grant_idx + 1'b1;
  end

  // at most one grant, and only to a requester
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);

endmodule

// pe_interface -- one PE's command and status registers on the SoCDMMU.
//
// The PE writes a 32-bit command word (SW ID | size | virtual block number |
// opcode). The interface holds it and raises req until the command scheduler
// grants it, and keeps busy high until the basic SoCDMMU answers. The answer
// (status code and number of blocks involved) is held in the status register
// and announced by a one-cycle done pulse. One command may be outstanding per
// PE; cmd_ready says when a new one is accepted.
//
// The document names this interface and gives the command word; the register
// set and handshake are this design's choices.
//
// Timing: a command written at clock edge 0 can be taken by the scheduler at
// edge 1, so the cycle counts of the basic SoCDMMU are counted from edge 0 to
// the edge that sets done.
module pe_interface
  import socdmmu_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // PE side
  input  logic             cmd_wr,
  input  cmd_t             cmd_in,
  output logic             cmd_ready,
  output logic             busy,
  output logic             done,
  output status_e          status,
  output logic [CNT_W-1:0] count,
  // scheduler side
  output logic             req,
  output cmd_t             cmd_out,
  input  logic             grant,
  // response from the basic SoCDMMU, already selected for this PE
  input  logic             rsp_valid,
  input  status_e          rsp_status,
  input  logic [CNT_W-1:0] rsp_count
);

  assign cmd_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      req     <= 1'b0;
      cmd_out <= '0;
      done    <= 1'b0;
      status  <= ST_OK;
      count   <= '0;
    end else begin
      done <= 1'b0;
      if (cmd_wr && !busy) begin
        busy    <= 1'b1;
        req     <= 1'b1;
        cmd_out <= cmd_in;
      end
      if (grant) req <= 1'b0;
      if (rsp_valid) begin
        busy   <= 1'b0;
        done   <= 1'b1;
        status <= rsp_status;
        count  <= rsp_count;
      end
    end
  end

  // the PE must wait for cmd_ready; a grant only answers a request;
  // a response only ends a command that was taken
  assert property (@(posedge clk) disable iff (!rst_n) cmd_wr |-> cmd_ready);
  assert property (@(posedge clk) disable iff (!rst_n) grant |-> req);
  assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> (busy && !req));

endmodule

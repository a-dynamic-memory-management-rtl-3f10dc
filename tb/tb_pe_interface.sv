// tb_pe_interface -- command handshake of one PE interface: a write sets
// busy and req and holds the word, a grant drops req but not busy, a
// response ends busy and gives a one-cycle done with the status and count;
// cmd_ready is low while a command is outstanding.
module tb_pe_interface;
  import socdmmu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cmd_wr = 0, cmd_ready, busy, done, req, grant = 0, rsp_valid = 0;
  cmd_t cmd_in = '0, cmd_out;
  status_e status, rsp_status = ST_OK;
  logic [CNT_W-1:0] count, rsp_count = '0;
  int checks = 0, failures = 0;

  pe_interface dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(cmd_ready && !busy && !req && !done, "idle after reset");
    for (int it = 0; it < 300; it++) begin
      cmd_t c;
      status_e st;
      logic [CNT_W-1:0] n;
      int gap;
      c = cmd_t'($urandom);
      st = status_e'($urandom_range(5));
      n = CNT_W'($urandom);
      cmd_in = c; cmd_wr = 1;
      @(negedge clk);
      cmd_wr = 0; cmd_in = '0;
      check(busy && req && !cmd_ready && cmd_out == c, "command held");
      gap = $urandom_range(4);
      repeat (gap) begin
        @(negedge clk);
        check(req && busy, "request held until grant");
      end
      grant = 1;
      @(negedge clk);
      grant = 0;
      check(!req && busy, "grant clears req only");
      repeat ($urandom_range(5)) begin
        @(negedge clk);
        check(busy && !done, "busy until response");
      end
      rsp_valid = 1; rsp_status = st; rsp_count = n;
      @(negedge clk);
      rsp_valid = 0;
      check(done && !busy && cmd_ready && status == st && count == n, "response latched");
      @(negedge clk);
      check(!done && status == st && count == n, "done is one cycle, status held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

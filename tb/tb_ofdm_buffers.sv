// tb_ofdm_buffers -- the two-DSP OFDM buffer-sharing scenario on the full
// SoCDMMU (4 PEs, 256 blocks).
//
// DSP1 (PE0) takes a read/write buffer under software ID 10 and fills it;
// DSP2 (PE1) maps the same buffer read-only at its own virtual address and
// takes an exclusive output buffer. The test checks that both PEs reach the
// same physical block for buffer 1, that DSP2 cannot write buffer 1, that
// DSP1 cannot reach DSP2's exclusive buffer, and that the buffers are
// released in order (readers first, then owners) with the memory all free
// at the end.
module tb_ofdm_buffers;
  import socdmmu_pkg::*;
  localparam int NPE = DEF_NUM_PE, NB = DEF_NUM_BLOCKS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NPE-1:0] cmd_wr = '0, cmd_ready, busy, done;
  cmd_t cmd [NPE];
  status_e status [NPE];
  logic [CNT_W-1:0] count [NPE];
  logic [NPE-1:0] pe_valid = '0, pe_write = '0, phys_valid, phys_write, fault;
  logic [31:0] pe_addr [NPE];
  logic [23:0] phys_addr [NPE];
  logic [NB-1:0] used;
  int checks = 0, failures = 0;

  socdmmu_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic command(int p, op_e op, int vbn, int size, int swid, status_e exp);
    cmd[p] = '{swid: 5'(swid), size: 8'(size), vbn: 16'(vbn), op: op};
    cmd_wr[p] = 1;
    @(negedge clk);
    cmd_wr[p] = 0;
    while (!done[p]) @(negedge clk);
    check(status[p] == exp, $sformatf("PE%0d op %0d status %0d", p, op, status[p]));
  endtask

  task automatic access(int p, logic [31:0] a, bit w, output logic [23:0] pa, output bit f);
    pe_valid[p] = 1; pe_write[p] = w; pe_addr[p] = a;
    @(negedge clk);
    pe_valid[p] = 0;
    pa = phys_addr[p]; f = fault[p];
  endtask

  initial begin
    logic [23:0] pa1, pa2, pa3;
    bit f1, f2, f3;
    for (int p = 0; p < NPE; p++) begin cmd[p] = '0; pe_addr[p] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    command(0, OP_ALLOC_RW, 16'h2000, 1, 10, ST_OK);   // DSP1: buffer 1, shared as ID 10
    command(1, OP_ALLOC_RO, 16'h3000, 0, 10, ST_OK);   // DSP2: buffer 1 read-only
    command(1, OP_ALLOC_EX, 16'h3001, 1, 0, ST_OK);    // DSP2: buffer 2 exclusive
    check(used == NB'(2'b11), "two blocks in use");
    access(0, 32'h2000_0123, 1, pa1, f1);              // DSP1 writes FFT output
    access(1, 32'h3000_0123, 0, pa2, f2);              // DSP2 reads it
    check(!f1 && !f2 && pa1 == pa2, "both DSPs reach the same word of buffer 1");
    access(1, 32'h3000_0123, 1, pa3, f3);
    check(f3, "DSP2 cannot write buffer 1");
    access(1, 32'h3001_0010, 1, pa3, f3);
    check(!f3 && pa3[23:16] != pa1[23:16], "DSP2 writes buffer 2 in another block");
    access(0, 32'h3001_0010, 0, pa3, f3);
    check(f3, "DSP1 cannot reach buffer 2");
    command(1, OP_DEALLOC, 16'h3000, 0, 0, ST_OK);
    command(1, OP_DEALLOC, 16'h3001, 0, 0, ST_OK);
    command(0, OP_DEALLOC, 16'h2000, 0, 0, ST_OK);
    check(used == '0, "all memory free again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_basic_socdmmu -- drives granted commands straight into the basic
// SoCDMMU, with a behavioural stand-in for the PEs' address converters that
// applies its set/clear outputs. Checks, in a directed sequence, the status,
// block count and allocation vector of each command, the blocks and virtual
// block numbers it maps, and its cycle count: the response comes L-1 edges
// after the take edge (L = 4, 4, 3, 5 for G_alloc_ex, G_alloc_rw,
// G_alloc_ro, G_dealloc), one edge later the unit is idle again.
module tb_basic_socdmmu;
  import socdmmu_pkg::*;
  localparam int NPE = 4, NB = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic gnt_valid = 0;
  logic [1:0] gnt_pe = '0;
  cmd_t gnt_cmd = '0;
  logic idle, rsp_valid;
  logic [1:0] rsp_pe;
  status_e rsp_status;
  logic [CNT_W-1:0] rsp_count;
  logic [NB-1:0] conv_valid [NPE];
  vbn_t conv_vbn [NPE][NB];
  logic conv_set, conv_set_wr;
  logic [1:0] conv_set_pe;
  logic [NB-1:0] conv_set_mask, used;
  vbn_t conv_set_base;
  size_t conv_set_off [NB];
  logic [NB-1:0] conv_clr [NPE];
  logic [NB-1:0] conv_wr [NPE];
  int checks = 0, failures = 0;

  basic_socdmmu #(.NUM_PE(NPE), .NUM_BLOCKS(NB)) dut (.*);

  // converter stand-in
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPE; p++) begin
        conv_valid[p] <= '0; conv_wr[p] <= '0;
        for (int i = 0; i < NB; i++) conv_vbn[p][i] <= '0;
      end
    end else begin
      for (int p = 0; p < NPE; p++)
        for (int i = 0; i < NB; i++)
          if (conv_clr[p][i]) conv_valid[p][i] <= 0;
          else if (conv_set && int'(conv_set_pe) == p && conv_set_mask[i]) begin
            conv_valid[p][i] <= 1;
            conv_vbn[p][i]   <= conv_set_base + 16'(conv_set_off[i]);
            conv_wr[p][i]    <= conv_set_wr;
          end
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // issue one command and check its response and cycle count
  task automatic cmd(int pe, int op, int vbn, int size, int swid,
                     status_e exp_st, int exp_cnt, int exp_lat);
    int n;
    gnt_valid = 1; gnt_pe = 2'(pe);
    gnt_cmd.op = 3'(op); gnt_cmd.vbn = 16'(vbn); gnt_cmd.size = 8'(size); gnt_cmd.swid = 5'(swid);
    check(idle, "idle before command");
    @(negedge clk);                 // take edge
    gnt_valid = 0;
    n = 1;
    while (!rsp_valid && n < 20) begin @(negedge clk); n++; end
    // rsp_valid is up in the cycle before the edge that ends the command
    check(n == exp_lat - 1, $sformatf("op %0d: response after %0d cycles, expected %0d", op, n, exp_lat - 1));
    check(int'(rsp_pe) == pe && rsp_status == exp_st && int'(rsp_count) == exp_cnt,
          $sformatf("op %0d: PE %0d status %0d count %0d, expected %0d %0d", op, rsp_pe, rsp_status, rsp_count, exp_st, exp_cnt));
    @(negedge clk);
    check(idle && !rsp_valid, "idle after response");
  endtask

  function automatic int nmapped(int p);
    int n = 0;
    for (int i = 0; i < NB; i++) n += conv_valid[p][i];
    return n;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // PE0: 3 exclusive blocks at VBN 10 -> blocks 0,1,2 at 10,11,12
    cmd(0, OP_ALLOC_EX, 10, 3, 0, ST_OK, 3, 4);
    check(used == NB'('b111), "vector after first allocation");
    check(conv_valid[0] == NB'('b111) && conv_vbn[0][0] == 10 && conv_vbn[0][2] == 12 && conv_wr[0][1],
          "PE0 mapping");
    // PE1: 2 read/write blocks, SW ID 5, at VBN 100 -> blocks 3,4
    cmd(1, OP_ALLOC_RW, 100, 2, 5, ST_OK, 2, 4);
    // PE2 maps them read-only at VBN 7
    cmd(2, OP_ALLOC_RO, 7, 0, 5, ST_OK, 2, 3);
    check(conv_valid[2] == NB'('b11000) && conv_vbn[2][3] == 7 && conv_vbn[2][4] == 8 && !conv_wr[2][3],
          "PE2 read-only mapping");
    check(used == NB'('b11111), "vector unchanged by read-only mapping");
    // PE2 again: already mapped
    cmd(2, OP_ALLOC_RO, 20, 0, 5, ST_NOT_FOUND, 0, 3);
    // PE1 cannot map its own allocation read-only
    cmd(1, OP_ALLOC_RO, 20, 0, 5, ST_NOT_FOUND, 0, 3);
    // failures
    cmd(0, OP_ALLOC_EX, 12, 1, 0, ST_VA_BUSY, 0, 4);
    cmd(3, OP_ALLOC_RW, 0, 1, 5, ST_SWID_BUSY, 0, 4);
    cmd(3, OP_ALLOC_EX, 0, 252, 0, ST_NO_MEM, 0, 4);
    cmd(3, OP_ALLOC_EX, 16'hFFFE, 3, 0, ST_VA_BUSY, 0, 4);
    cmd(3, 3'b111, 0, 0, 0, ST_BAD_CMD, 0, 2);
    cmd(3, OP_ALLOC_RW, 0, 0, 1, ST_BAD_CMD, 0, 2);
    // PE0 releases block 1..: wrong start, then right start
    cmd(0, OP_DEALLOC, 11, 0, 0, ST_NOT_FOUND, 0, 5);
    cmd(0, OP_DEALLOC, 10, 0, 0, ST_OK, 3, 5);
    check(used == NB'('b11000) && nmapped(0) == 0, "owner release frees the blocks");
    // PE3 takes 4 blocks: the free blocks 0,1,2 then 5
    cmd(3, OP_ALLOC_EX, 40, 4, 0, ST_OK, 4, 4);
    check(conv_valid[3] == NB'('b100111) && conv_vbn[3][5] == 43, "allocation over scattered blocks");
    // reader release keeps the blocks
    cmd(2, OP_DEALLOC, 7, 0, 0, ST_OK, 2, 5);
    check(nmapped(2) == 0 && used[4:3] == 2'b11, "reader release");
    // PE2 maps again, then the owner releases: the reader's mapping goes too
    cmd(2, OP_ALLOC_RO, 50, 0, 5, ST_OK, 2, 3);
    cmd(1, OP_DEALLOC, 100, 0, 0, ST_OK, 2, 5);
    check(nmapped(1) == 0 && nmapped(2) == 0 && used[4:3] == 2'b00, "owner release drops readers");
    // SW ID free again
    cmd(0, OP_ALLOC_RW, 0, 1, 5, ST_OK, 1, 4);
    check(used[3] && conv_vbn[0][3] == 0, "SW ID reusable after release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

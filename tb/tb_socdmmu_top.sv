// tb_socdmmu_top -- end-to-end test of the SoCDMMU at its default size
// (4 PEs, 256 blocks of 64 KB).
//
// A behavioural reference model of the allocation rules (written as plain
// sequential loops, independent of the RTL's parallel logic) follows every
// command in the order the responses arrive; each response's status and
// block count, the allocation vector, and the translation of PE addresses
// (physical address or fault) are compared with it. The test checks the
// command latencies (4 / 4 / 3 / 5 cycles, 2 for a rejected command), that
// four simultaneous commands are all done within 20 cycles, and counts how
// often each mechanism occurred: every one must occur at least once.
module tb_socdmmu_top;
  import socdmmu_pkg::*;

  localparam int NPE = DEF_NUM_PE;
  localparam int NB  = DEF_NUM_BLOCKS;
  localparam int PW  = $clog2(NB) + BLK_OFF_W;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NPE-1:0]       cmd_wr = '0;
  cmd_t                 cmd [NPE];
  logic [NPE-1:0]       cmd_ready, busy, done;
  status_e              status [NPE];
  logic [CNT_W-1:0]     count [NPE];
  logic [NPE-1:0]       pe_valid = '0, pe_write = '0;
  logic [PE_ADDR_W-1:0] pe_addr [NPE];
  logic [NPE-1:0]       phys_valid, phys_write, fault;
  logic [PW-1:0]        phys_addr [NPE];
  logic [NB-1:0]        used;

  socdmmu_top dut (.*);

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  bit      m_used [NB];
  int      m_mode [NB];      // 0 free, 1 exclusive, 2 read/write
  int      m_owner[NB];
  int      m_swid [NB];
  int      m_off  [NB];
  bit      m_rd   [NB][NPE];
  bit      mp_v   [NPE][NB];
  int      mp_vbn [NPE][NB];
  bit      mp_wr  [NPE][NB];

  // mechanism counters
  int n_ex, n_rw, n_ro, n_dl_own, n_dl_rd, n_nomem, n_vabusy, n_notfound,
      n_swidbusy, n_bad, n_scatter, n_hit, n_miss, n_wprot, n_wait, n_conc;

  function automatic bit range_busy(int pe, int v, int len);
    if (v + len - 1 > 16'hFFFF) return 1;
    for (int i = 0; i < NB; i++)
      if (mp_v[pe][i] && mp_vbn[pe][i] >= v && mp_vbn[pe][i] <= v + len - 1) return 1;
    return 0;
  endfunction

  function automatic void model_exec(int pe, cmd_t c, output status_e st, output int cnt);
    int v, n, nfree;
    bit own;
    v = c.vbn; cnt = 0; st = ST_OK;
    case (c.op)
      OP_ALLOC_EX, OP_ALLOC_RW: begin
        nfree = 0;
        for (int i = 0; i < NB; i++) nfree += !m_used[i];
        if (c.size == 0) st = ST_BAD_CMD;
        else begin
          bit taken = 0;
          for (int i = 0; i < NB; i++) if (m_mode[i] == 2 && m_swid[i] == c.swid) taken = 1;
          if (c.op == OP_ALLOC_RW && taken)  st = ST_SWID_BUSY;
          else if (range_busy(pe, v, c.size)) st = ST_VA_BUSY;
          else if (nfree < c.size)             st = ST_NO_MEM;
          else begin
            int k = 0, last = -2;
            bit gap = 0;
            for (int i = 0; i < NB && k < c.size; i++) if (!m_used[i]) begin
              if (last >= 0 && i != last + 1) gap = 1;
              last = i;
              m_used[i] = 1; m_mode[i] = (c.op == OP_ALLOC_RW) ? 2 : 1;
              m_owner[i] = pe; m_swid[i] = c.swid; m_off[i] = k;
              for (int q = 0; q < NPE; q++) m_rd[i][q] = 0;
              mp_v[pe][i] = 1; mp_vbn[pe][i] = v + k; mp_wr[pe][i] = 1;
              k++;
            end
            cnt = c.size;
            if (gap) n_scatter++;
            if (c.op == OP_ALLOC_RW) n_rw++; else n_ex++;
          end
        end
      end
      OP_ALLOC_RO: begin
        n = 0;
        for (int i = 0; i < NB; i++)
          if (m_mode[i] == 2 && m_swid[i] == c.swid && m_owner[i] != pe && !m_rd[i][pe]) n++;
        if (n == 0) st = ST_NOT_FOUND;
        else if (range_busy(pe, v, n)) st = ST_VA_BUSY;
        else begin
          for (int i = 0; i < NB; i++)
            if (m_mode[i] == 2 && m_swid[i] == c.swid && m_owner[i] != pe && !m_rd[i][pe]) begin
              m_rd[i][pe] = 1;
              mp_v[pe][i] = 1; mp_vbn[pe][i] = (v + m_off[i]) & 16'hFFFF; mp_wr[pe][i] = 0;
            end
          cnt = n; n_ro++;
        end
      end
      OP_DEALLOC: begin
        n = 0; own = 0;
        for (int i = 0; i < NB; i++)
          if (mp_v[pe][i] && ((mp_vbn[pe][i] - m_off[i]) & 16'hFFFF) == v) begin
            n++;
            if (m_mode[i] != 0 && m_owner[i] == pe) own = 1;
          end
        if (n == 0) st = ST_NOT_FOUND;
        else begin
          for (int i = 0; i < NB; i++)
            if (mp_v[pe][i] && ((mp_vbn[pe][i] - m_off[i]) & 16'hFFFF) == v) begin
              if (own) begin
                m_used[i] = 0; m_mode[i] = 0;
                for (int q = 0; q < NPE; q++) begin m_rd[i][q] = 0; mp_v[q][i] = 0; end
              end else begin
                m_rd[i][pe] = 0; mp_v[pe][i] = 0;
              end
            end
          cnt = n;
          if (own) n_dl_own++; else n_dl_rd++;
        end
      end
      default: st = ST_BAD_CMD;
    endcase
    case (st)
      ST_NO_MEM:    n_nomem++;
      ST_VA_BUSY:   n_vabusy++;
      ST_NOT_FOUND: n_notfound++;
      ST_SWID_BUSY: n_swidbusy++;
      ST_BAD_CMD:   n_bad++;
      default: ;
    endcase
  endfunction

  function automatic int exp_latency(cmd_t c);
    case (c.op)
      OP_ALLOC_EX, OP_ALLOC_RW: return (c.size == 0) ? 2 : 4;
      OP_ALLOC_RO: return 3;
      OP_DEALLOC:  return 5;
      default:     return 2;
    endcase
  endfunction

  // ---------------- response monitor ----------------
  cmd_t        pend [NPE];
  int unsigned t_wr [NPE];
  int          lat  [NPE];

  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < NPE; p++) if (done[p]) begin
      status_e st; int cnt;
      model_exec(p, pend[p], st, cnt);
      lat[p] = int'(cyc - t_wr[p]);
      check(status[p] == st, $sformatf("PE%0d op%0d status %0d expected %0d", p, pend[p].op, status[p], st));
      check(int'(count[p]) == cnt, $sformatf("PE%0d count %0d expected %0d", p, count[p], cnt));
      for (int i = 0; i < NB; i++)
        if (used[i] != m_used[i]) begin
          check(0, $sformatf("allocation vector bit %0d", i));
          break;
        end
    end
  end

  // write one command for PE p (call at a negedge)
  task automatic issue(int p, cmd_t c);
    while (!cmd_ready[p]) @(negedge clk);
    pend[p]   = c;
    cmd[p]    = c;
    t_wr[p]   = cyc + 1;
    cmd_wr[p] = 1'b1;
    @(negedge clk);
    cmd_wr[p] = 1'b0;
  endtask

  task automatic wait_done(int p);
    while (busy[p] || cmd_wr[p]) @(negedge clk);
    #1;  // let the response monitor of this edge run first
  endtask

  // one command alone, with its latency checked
  task automatic run(int p, int op, int vbn, int size, int swid);
    cmd_t c;
    c.op = 3'(op); c.vbn = 16'(vbn); c.size = 8'(size); c.swid = 5'(swid);
    issue(p, c);
    wait_done(p);
    check(lat[p] == exp_latency(c), $sformatf("op %0d latency %0d expected %0d", op, lat[p], exp_latency(c)));
  endtask

  // translate one access and compare with the model
  task automatic access(int p, int unsigned addr, bit wr);
    int vbn, hit;
    vbn = addr >> BLK_OFF_W; hit = -1;
    for (int i = 0; i < NB; i++) if (mp_v[p][i] && mp_vbn[p][i] == vbn) hit = i;
    pe_valid[p] = 1; pe_write[p] = wr; pe_addr[p] = addr;
    @(negedge clk);
    pe_valid[p] = 0;
    if (hit < 0) begin
      n_miss++;
      check(fault[p] && !phys_valid[p], $sformatf("PE%0d miss at %h not flagged", p, addr));
    end else if (wr && !mp_wr[p][hit]) begin
      n_wprot++;
      check(fault[p] && !phys_valid[p], $sformatf("PE%0d write to read-only %h not flagged", p, addr));
    end else begin
      n_hit++;
      check(phys_valid[p] && !fault[p] && phys_write[p] == wr &&
            phys_addr[p] == PW'((hit << BLK_OFF_W) | (addr & 16'hFFFF)),
            $sformatf("PE%0d %h -> %h expected block %0d", p, addr, phys_addr[p], hit));
    end
  endtask

  // probe every mapping of a PE plus a few random addresses
  task automatic probe(int p);
    for (int i = 0; i < NB; i++)
      if (mp_v[p][i] && $urandom_range(3) == 0)
        access(p, (mp_vbn[p][i] << BLK_OFF_W) | $urandom_range(16'hFFFF), 1'($urandom));
    access(p, $urandom, 1'($urandom));
  endtask

  initial begin
    for (int p = 0; p < NPE; p++) begin cmd[p] = '0; pe_addr[p] = '0; end
    for (int i = 0; i < NB; i++) begin
      m_used[i] = 0; m_mode[i] = 0; m_owner[i] = 0; m_swid[i] = 0; m_off[i] = 0;
      for (int p = 0; p < NPE; p++) begin m_rd[i][p] = 0; mp_v[p][i] = 0; mp_vbn[p][i] = 0; mp_wr[p][i] = 0; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---- directed: the four commands and their cycle counts ----
    run(0, OP_ALLOC_EX, 16'h0100, 3, 0);     // PE0: 3 blocks exclusive at VBN 0x100
    run(1, OP_ALLOC_RW, 16'h0200, 2, 7);     // PE1: 2 blocks shared as SW ID 7
    run(2, OP_ALLOC_RO, 16'h0300, 0, 7);     // PE2 maps them read-only
    run(3, OP_ALLOC_RO, 16'h0010, 0, 7);     // PE3 too
    probe(0); probe(1); probe(2); probe(3);
    access(2, 32'h0300_0040, 1);              // write to read-only
    access(0, 32'h0102_1234, 0);              // read exclusive
    access(1, 32'h0100_0000, 0);              // PE1 has nothing at 0x100
    run(2, OP_DEALLOC, 16'h0300, 0, 0);      // reader releases
    run(0, OP_DEALLOC, 16'h0101, 0, 0);      // not the start: not found
    run(0, OP_DEALLOC, 16'h0100, 0, 0);      // owner releases
    run(0, OP_ALLOC_EX, 16'h0000, 4, 0);     // fills the hole, then continues past PE1's blocks
    run(0, OP_ALLOC_EX, 16'h0002, 1, 0);     // overlaps its own range
    run(1, OP_ALLOC_RW, 16'h0400, 1, 7);     // SW ID 7 already shared
    run(1, OP_ALLOC_EX, 16'h0500, 255, 0);   // too large
    run(1, OP_ALLOC_EX, 16'hFFFF, 2, 0);     // runs off the address space
    run(3, 3'b110, 0, 0, 0);                 // unknown opcode
    run(3, OP_ALLOC_EX, 16'h0700, 0, 0);     // size 0
    run(1, OP_DEALLOC, 16'h0200, 0, 0);      // owner releases shared blocks: PE3 loses them
    probe(3);

    // ---- four PEs at once: worst case 4 x 5 = 20 cycles ----
    begin
      int worst;
      worst = 0;
      @(negedge clk);
      for (int p = 0; p < NPE; p++) begin
        cmd_t c;
        c = '0; c.op = OP_DEALLOC; c.vbn = 16'(p);
        pend[p] = c; cmd[p] = c; t_wr[p] = cyc + 1;
      end
      cmd_wr = '1;
      @(negedge clk);
      cmd_wr = '0;
      for (int p = 0; p < NPE; p++) wait_done(p);
      for (int p = 0; p < NPE; p++) if (lat[p] > worst) worst = lat[p];
      check(worst == 20, $sformatf("4-PE worst case %0d cycles, expected 20", worst));
      n_conc++;
    end

    // ---- random traffic, sometimes from several PEs at once ----
    for (int it = 0; it < 3000; it++) begin
      int np;
      np = ($urandom_range(3) == 0) ? NPE : 1;
      if (np > 1) n_conc++;
      fork
        begin
          for (int k = 0; k < NPE; k++) begin
            automatic int p = (np == 1) ? $urandom_range(NPE - 1) : k;
            automatic cmd_t c;
            c.op   = 3'($urandom_range(9) < 8 ? $urandom_range(3) : $urandom_range(7));
            c.vbn  = 16'($urandom_range(15) * 4);
            c.size = 8'(($urandom_range(15) == 0) ? $urandom_range(255) : $urandom_range(1, 6));
            c.swid = 5'($urandom_range(3));
            if (c.op == OP_DEALLOC && $urandom_range(1)) begin
              // release something the PE really has
              for (int i = 0; i < NB; i++)
                if (mp_v[p][i]) begin c.vbn = 16'(mp_vbn[p][i] - m_off[i]); break; end
            end
            if (k < np) begin
              pend[p] = c; cmd[p] = c; t_wr[p] = cyc + 1; cmd_wr[p] = 1'b1;
            end
          end
          @(negedge clk);
          cmd_wr = '0;
        end
      join
      for (int p = 0; p < NPE; p++) begin
        if (busy[p] && np > 1 && p != 0) n_wait++;
      end
      for (int p = 0; p < NPE; p++) wait_done(p);
      if (np > 1) begin
        int worst;
        worst = 0;
        for (int p = 0; p < NPE; p++) if (lat[p] > worst) worst = lat[p];
        check(worst <= 20, $sformatf("simultaneous commands took %0d cycles", worst));
      end
      if ($urandom_range(3) == 0) probe($urandom_range(NPE - 1));
    end

    // ---- every mechanism must have happened ----
    $display("ex=%0d rw=%0d ro=%0d dealloc_owner=%0d dealloc_reader=%0d nomem=%0d vabusy=%0d notfound=%0d swidbusy=%0d bad=%0d scattered=%0d hit=%0d miss=%0d wprot=%0d waited=%0d concurrent=%0d",
             n_ex, n_rw, n_ro, n_dl_own, n_dl_rd, n_nomem, n_vabusy, n_notfound, n_swidbusy, n_bad,
             n_scatter, n_hit, n_miss, n_wprot, n_wait, n_conc);
    check(n_ex > 0, "no exclusive allocation");
    check(n_rw > 0, "no read/write allocation");
    check(n_ro > 0, "no read-only mapping");
    check(n_dl_own > 0, "no owner release");
    check(n_dl_rd > 0, "no reader release");
    check(n_nomem > 0, "no out-of-memory");
    check(n_vabusy > 0, "no virtual range conflict");
    check(n_notfound > 0, "no not-found");
    check(n_swidbusy > 0, "no SW ID conflict");
    check(n_bad > 0, "no bad command");
    check(n_scatter > 0, "no allocation over scattered blocks");
    check(n_hit > 0, "no translated access");
    check(n_miss > 0, "no unmapped access");
    check(n_wprot > 0, "no write-protect fault");
    check(n_wait > 0, "no command waited for the scheduler");
    check(n_conc > 0, "no simultaneous commands");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

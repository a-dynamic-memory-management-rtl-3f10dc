// tb_addr_converter -- builds random non-overlapping mappings (writable and
// read-only, at random virtual block numbers) through the set/clear ports
// and checks, against a list model, that each access is translated to
// {physical block, offset} one cycle later, that unmapped accesses and writes
// to read-only blocks fault, and that cleared mappings stop translating.
module tb_addr_converter;
  import socdmmu_pkg::*;
  localparam int NB = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pe_valid = 0, pe_write = 0;
  logic [31:0] pe_addr = '0;
  logic phys_valid, phys_write, fault;
  logic [23:0] phys_addr;
  logic set = 0, set_wr = 0;
  logic [NB-1:0] set_mask = '0, clr_mask = '0, map_valid;
  vbn_t set_base = '0;
  size_t set_off [NB];
  vbn_t map_vbn [NB];
  // model
  bit m_v [NB];
  int m_vbn [NB];
  bit m_wr [NB];
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_wp = 0;

  addr_converter #(.NUM_BLOCKS(NB)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit vbn_used(int v);
    for (int i = 0; i < NB; i++) if (m_v[i] && m_vbn[i] == v) return 1;
    return 0;
  endfunction

  task automatic access(logic [31:0] a, bit w);
    int hit = -1;
    for (int i = 0; i < NB; i++) if (m_v[i] && m_vbn[i] == int'(a[31:16])) hit = i;
    pe_valid = 1; pe_write = w; pe_addr = a;
    @(negedge clk);
    pe_valid = 0;
    checks++;
    if (hit < 0) begin
      n_miss++;
      if (!fault || phys_valid) begin failures++; $display("FAIL miss %h", a); end
    end else if (w && !m_wr[hit]) begin
      n_wp++;
      if (!fault || phys_valid) begin failures++; $display("FAIL write-protect %h", a); end
    end else begin
      n_hit++;
      if (fault || !phys_valid || phys_write != w || phys_addr != {8'(hit), a[15:0]}) begin
        failures++; $display("FAIL %h -> %h, block %0d", a, phys_addr, hit);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < NB; i++) begin set_off[i] = '0; m_v[i] = 0; m_vbn[i] = 0; m_wr[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    access(32'h0000_0000, 0);
    for (int it = 0; it < 300; it++) begin
      // add a group of up to 6 blocks at base + 0..k-1 if the range is free
      int base, k, found;
      bit ok;
      base = $urandom_range(16'hFFF0);
      if ($urandom_range(1)) base = $urandom_range(63);
      k = $urandom_range(1, 6);
      ok = 1;
      for (int j = 0; j < k; j++) if (vbn_used(base + j)) ok = 0;
      if (ok) begin
        set_mask = '0; found = 0;
        set_wr = 1'($urandom);
        for (int i = 0; i < NB && found < k; i++)
          if (!m_v[i] && $urandom_range(3) == 0) begin
            set_mask[i] = 1; set_off[i] = 8'(found);
            m_v[i] = 1; m_vbn[i] = base + found; m_wr[i] = set_wr;
            found++;
          end
        set = 1; set_base = 16'(base);
        @(negedge clk);
        set = 0;
      end
      // sometimes remove a few mappings
      if ($urandom_range(2) == 0) begin
        clr_mask = '0;
        for (int i = 0; i < NB; i++) if (m_v[i] && $urandom_range(3) == 0) begin
          clr_mask[i] = 1; m_v[i] = 0;
        end
        @(negedge clk);
        clr_mask = '0;
      end
      checks++;
      for (int i = 0; i < NB; i++)
        if (map_valid[i] != m_v[i] || (m_v[i] && int'(map_vbn[i]) != m_vbn[i])) begin
          failures++; $display("FAIL map entry %0d", i); break;
        end
      for (int i = 0; i < NB; i++)
        if (m_v[i] && $urandom_range(2) == 0) access({16'(m_vbn[i]), 16'($urandom)}, 1'($urandom));
      access($urandom, 1'($urandom));
    end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_wp == 0) begin
      failures++; $display("FAIL coverage hit %0d miss %0d wp %0d", n_hit, n_miss, n_wp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

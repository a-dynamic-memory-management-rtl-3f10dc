// tb_alloc_table -- random mask writes (new allocation, add/remove reader,
// release) against an entry-by-entry model of the allocation table,
// including the precedence free > write > add reader > remove reader.
module tb_alloc_table;
  import socdmmu_pkg::*;
  localparam int NPE = 4, NB = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NB-1:0] wr_mask = '0, rd_add_mask = '0, rd_clr_mask = '0, free_mask = '0;
  mode_e wr_mode = MODE_EX;
  logic [1:0] wr_owner = '0, rd_pe = '0;
  swid_t wr_swid = '0;
  size_t wr_offset [NB];
  mode_e mode [NB];
  logic [1:0] owner [NB];
  swid_t swid [NB];
  size_t offset [NB];
  logic [NPE-1:0] readers [NB];
  // model
  mode_e m_mode [NB];
  logic [1:0] m_owner [NB];
  swid_t m_swid [NB];
  size_t m_offset [NB];
  logic [NPE-1:0] m_readers [NB];
  int checks = 0, failures = 0;

  alloc_table #(.NUM_PE(NPE), .NUM_BLOCKS(NB)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NB-1:0] rmask(int density);
    logic [NB-1:0] m;
    for (int i = 0; i < NB; i++) m[i] = ($urandom_range(15) < density);
    return m;
  endfunction

  initial begin
    for (int i = 0; i < NB; i++) begin
      wr_offset[i] = '0; m_mode[i] = MODE_FREE; m_owner[i] = '0; m_swid[i] = '0;
      m_offset[i] = '0; m_readers[i] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 800; it++) begin
      wr_mask     = rmask(2);
      rd_add_mask = rmask(3);
      rd_clr_mask = rmask(2);
      free_mask   = rmask(1);
      wr_mode     = $urandom_range(1) ? MODE_EX : MODE_RW;
      wr_owner    = 2'($urandom);
      rd_pe       = 2'($urandom);
      wr_swid     = 5'($urandom);
      for (int i = 0; i < NB; i++) wr_offset[i] = 8'($urandom);
      @(negedge clk);
      for (int i = 0; i < NB; i++) begin
        if (free_mask[i]) begin
          m_mode[i] = MODE_FREE; m_readers[i] = '0;
        end else if (wr_mask[i]) begin
          m_mode[i] = wr_mode; m_owner[i] = wr_owner; m_swid[i] = wr_swid;
          m_offset[i] = wr_offset[i]; m_readers[i] = '0;
        end else if (rd_add_mask[i]) m_readers[i][rd_pe] = 1;
        else if (rd_clr_mask[i]) m_readers[i][rd_pe] = 0;
        checks++;
        if (mode[i] != m_mode[i] || readers[i] != m_readers[i] ||
            (m_mode[i] != MODE_FREE && (owner[i] != m_owner[i] || swid[i] != m_swid[i] ||
                                        offset[i] != m_offset[i]))) begin
          failures++;
          if (failures < 10) $display("FAIL it %0d entry %0d", it, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

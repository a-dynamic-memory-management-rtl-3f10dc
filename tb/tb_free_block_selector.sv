// tb_free_block_selector -- random allocation vectors and sizes. The
// expected selection is built by walking the vector and collecting free
// block numbers in a list; the first N of them must be selected, each with
// its position in the list as index, and enough must say whether the list
// holds N.
module tb_free_block_selector;
  import socdmmu_pkg::*;
  localparam int NB = 256;
  logic [NB-1:0] used, sel;
  size_t size;
  size_t offset [NB];
  logic enough;
  int checks = 0, failures = 0;

  free_block_selector #(.NUM_BLOCKS(NB)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      int freelist[$];
      int density;
      density = $urandom_range(8);
      for (int i = 0; i < NB; i++) used[i] = ($urandom_range(7) < density);
      if (it == 0) used = '0;
      if (it == 1) used = '1;
      size = 8'($urandom_range(255));
      if (it % 3 == 0) size = 8'($urandom_range(8));
      #1;
      freelist = {};
      for (int i = 0; i < NB; i++) if (!used[i]) freelist.push_back(i);
      checks++;
      if (enough != (freelist.size() >= int'(size))) begin
        failures++; $display("FAIL enough it %0d", it);
      end
      if (enough) begin
        logic [NB-1:0] exp_sel;
        exp_sel = '0;
        for (int k = 0; k < int'(size); k++) begin
          exp_sel[freelist[k]] = 1;
          checks++;
          if (offset[freelist[k]] != 8'(k)) begin
            failures++; $display("FAIL offset it %0d", it);
          end
        end
        checks++;
        if (sel != exp_sel) begin
          failures++; $display("FAIL sel it %0d", it);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

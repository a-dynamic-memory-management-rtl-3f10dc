// tb_alloc_vector -- random set/clear masks against a bit-by-bit model of
// the allocation vector; checks reset to all-free and clear-wins-over-set.
module tb_alloc_vector;
  localparam int NB = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NB-1:0] set_mask = '0, clr_mask = '0, used, model;
  int checks = 0, failures = 0;

  alloc_vector #(.NUM_BLOCKS(NB)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++; if (used != '0) failures++;
    rst_n = 1;
    model = '0;
    for (int it = 0; it < 500; it++) begin
      for (int w = 0; w < NB; w += 32) begin
        set_mask[w +: 32] = $urandom & $urandom;
        clr_mask[w +: 32] = $urandom & $urandom & $urandom;
      end
      @(negedge clk);
      for (int i = 0; i < NB; i++)
        if (clr_mask[i]) model[i] = 0; else if (set_mask[i]) model[i] = 1;
      checks++;
      if (used != model) begin
        failures++;
        $display("FAIL it %0d", it);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

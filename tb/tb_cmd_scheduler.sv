// tb_cmd_scheduler -- random request patterns against a round-robin model:
// the grant must go to the first requester at or after the PE following the
// previous grant, only while enabled, and every PE must be granted within
// NUM_PE grants of asking while its request is held.
module tb_cmd_scheduler;
  localparam int NPE = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NPE-1:0] req = '0, grant;
  logic [1:0] grant_idx;
  logic enable = 0, grant_valid;
  int checks = 0, failures = 0;
  int ptr = 0;
  int waits [NPE];

  cmd_scheduler #(.NUM_PE(NPE)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NPE-1:0] held;
    held = '0;
    foreach (waits[p]) waits[p] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      int exp_idx;
      // requests stay up until granted; new ones arrive at random
      held   = held | 4'($urandom);
      req    = held;
      enable = ($urandom_range(3) != 0);
      #1;
      exp_idx = -1;
      if (enable)
        for (int k = 0; k < NPE; k++)
          if (exp_idx < 0 && req[(ptr + k) % NPE]) exp_idx = (ptr + k) % NPE;
      checks++;
      if (exp_idx < 0) begin
        if (grant_valid || grant != '0) begin failures++; $display("FAIL spurious grant"); end
      end else begin
        if (!grant_valid || int'(grant_idx) != exp_idx || grant != 4'(1 << exp_idx)) begin
          failures++; $display("FAIL it %0d grant %b expected %0d", it, grant, exp_idx);
        end
        ptr = (exp_idx + 1) % NPE;
        held[exp_idx] = 0;
        waits[exp_idx] = 0;
      end
      for (int p = 0; p < NPE; p++)
        if (held[p] && enable && exp_idx >= 0) begin
          waits[p]++;
          checks++;
          if (waits[p] >= NPE) begin failures++; $display("FAIL PE%0d starved", p); end
        end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

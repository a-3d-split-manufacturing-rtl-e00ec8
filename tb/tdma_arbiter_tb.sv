// tdma_arbiter_tb: checks the slot sequence of a 3-core, 5-cycle schedule:
// exactly one core connected at any time, slots of SLOT_CYCLES cycles in
// round-robin order starting with core 0 after reset.
module tdma_arbiter_tb;
  localparam int N = 3, SLOT = 5;
  logic clk = 0, rst = 1;
  logic [N-1:0] dis_n;
  logic [$clog2(N)-1:0] slot;
  int checks = 0, failures = 0;

  tdma_arbiter #(.NUM_CORES(N), .SLOT_CYCLES(SLOT)) dut (.clk, .rst, .dis_n, .slot);
  always #5 clk = ~clk;

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    for (int c = 0; c < 10 * N * SLOT; c++) begin
      int exp_slot;
      exp_slot = (c / SLOT) % N;
      checks++;
      if (int'(slot) != exp_slot || dis_n != N'(1 << exp_slot)) begin
        failures++;
        $display("FAIL cycle %0d slot %0d dis_n %b expected slot %0d", c, slot, dis_n, exp_slot);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

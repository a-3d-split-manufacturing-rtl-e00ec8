// evict_monitor_tb: random secure updates and grant queries against a model
// of the security bits: grant = !V | !L | PID match. Also checks that the
// reset sweep leaves every line grantable.
module evict_monitor_tb;
  localparam int SETS = 16, WAYS = 4, PID_W = 4;
  logic clk = 0, rst = 1;
  logic [$clog2(SETS)-1:0] set_i = 0;
  logic [PID_W-1:0] pid = 0;
  logic upd = 0;
  logic [$clog2(WAYS)-1:0] way = 0;
  logic [WAYS-1:0] grant;
  int checks = 0, failures = 0, n_deny = 0, n_own = 0;
  logic v [SETS][WAYS];
  logic [PID_W-1:0] p [SETS][WAYS];

  evict_monitor #(.SETS(SETS), .WAYS(WAYS), .PID_W(PID_W)) dut (.clk, .rst, .tap_set(set_i),
      .tap_pid(pid), .tap_upd(upd), .tap_upd_way(way), .grant);
  always #5 clk = ~clk;

  initial begin
    foreach (v[s, w]) v[s][w] = 0;
    @(negedge clk); rst = 0;
    repeat (SETS + 1) @(negedge clk);
    for (int i = 0; i < 4000; i++) begin
      logic [WAYS-1:0] exp;
      set_i = $clog2(SETS)'($urandom_range(0, SETS - 1));
      pid   = PID_W'($urandom_range(0, 3));
      upd   = ($urandom_range(0, 5) == 0);
      way   = $clog2(WAYS)'($urandom_range(0, WAYS - 1));
      #1;
      for (int w = 0; w < WAYS; w++) begin
        exp[w] = !v[set_i][w] || p[set_i][w] == pid;
        if (v[set_i][w] && p[set_i][w] != pid) n_deny++;
        if (v[set_i][w] && p[set_i][w] == pid) n_own++;
      end
      checks++;
      if (grant !== exp) begin
        failures++;
        $display("FAIL set %0d pid %0d grant %b expected %b", set_i, pid, grant, exp);
      end
      if (upd) begin v[set_i][way] = 1; p[set_i][way] = pid; end
      @(negedge clk);
    end
    upd = 0;
    if (n_deny == 0 || n_own == 0) failures++;
    $display("denied=%0d own=%0d", n_deny, n_own);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

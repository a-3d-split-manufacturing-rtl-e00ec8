// cache_ctrl_tb: the 4-way cache with its eviction monitor and main memory,
// at a reduced number of sets so that conflicts are frequent. Three processes
// issue random loads and stores; process 1 (the "crypto" process) sometimes
// uses secure accesses, which lock lines to it. A reference model of the
// cache state and of the security bits predicts, for every access, the data
// returned, hit or miss, whether the fill was denied, and the latency
// (hit load: 1 cycle after acceptance, anything reaching memory: 1 + LAT).
// It also checks that no line locked by one process is ever replaced by
// another. A second phase runs with the control plane absent (all ways
// granted), where no access may be denied.
module cache_ctrl_tb;
  localparam int SETS = 8, WAYS = 4, PID_W = 8, MWORDS = 1024, LAT = 3;

  logic clk = 0, rst = 1, attached = 1;
  logic req_valid = 0, req_ready, req_we = 0, req_secure = 0;
  logic [31:0] req_addr = 0, req_wdata = 0;
  logic [PID_W-1:0] req_pid = 0;
  logic resp_valid, resp_hit, resp_denied;
  logic [31:0] resp_rdata;
  logic mem_req, mem_we, mem_ack;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [$clog2(SETS)-1:0] tap_set;
  logic [PID_W-1:0] tap_pid;
  logic tap_upd;
  logic [$clog2(WAYS)-1:0] tap_upd_way;
  logic [WAYS-1:0] grant_cp, grant;
  logic mld_we = 0;
  logic [31:0] mld_addr = 0, mld_data = 0;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_denied = 0, n_lock = 0;

  cache_ctrl #(.SETS(SETS), .WAYS(WAYS), .PID_W(PID_W)) dut (.clk, .rst, .req_valid,
      .req_ready, .req_we, .req_addr, .req_wdata, .req_pid, .req_secure, .resp_valid,
      .resp_rdata, .resp_hit, .resp_denied, .mem_req, .mem_we, .mem_addr, .mem_wdata,
      .mem_ack, .mem_rdata, .tap_en(attached), .tap_set, .tap_pid, .tap_upd, .tap_upd_way,
      .grant);
  evict_monitor #(.SETS(SETS), .WAYS(WAYS), .PID_W(PID_W)) mon (.clk, .rst, .tap_set,
      .tap_pid, .tap_upd, .tap_upd_way, .grant(grant_cp));
  main_mem #(.WORDS(MWORDS), .LAT(LAT)) mm (.clk, .rst, .mem_req, .mem_we, .mem_addr,
      .mem_wdata, .mem_ack, .mem_rdata, .ld_we(mld_we), .ld_addr(mld_addr), .ld_data(mld_data));
  assign grant = attached ? grant_cp : '1;

  always #5 clk = ~clk;

  // reference state
  logic [31:0] rmem [MWORDS];
  logic        cv [SETS][WAYS];
  logic [31:0] ctag [SETS][WAYS];
  logic [31:0] cdat [SETS][WAYS];
  logic        sv [SETS][WAYS];
  logic        sl [SETS][WAYS];
  logic [PID_W-1:0] sp [SETS][WAYS];
  int          rr;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic reset_all();
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < MWORDS; i++) begin
      rmem[i] = $urandom;
      mld_we = 1; mld_addr = 32'(4 * i); mld_data = rmem[i];
      @(negedge clk);
    end
    mld_we = 0;
    rst = 0;
    foreach (cv[s, w]) begin cv[s][w] = 0; sv[s][w] = 0; end
    rr = 0;
    while (!req_ready) @(negedge clk);
  endtask

  task automatic access(input logic we, input logic [31:0] addr, input logic [31:0] wd,
                        input int pid, input logic secure);
    int s, hw, vic, lat, word;
    logic [31:0] tag, exp_data;
    logic hit, vok, g [WAYS];
    word = int'(addr[31:2]) % MWORDS;
    s    = int'(addr[31:2]) % SETS;
    tag  = addr >> ($clog2(SETS) + 2);
    hit = 0; hw = 0;
    for (int w = 0; w < WAYS; w++) begin
      g[w] = !attached || !sv[s][w] || !sl[s][w] || sp[s][w] == PID_W'(pid);
      if (cv[s][w] && ctag[s][w] == tag) begin hit = 1; hw = w; end
    end
    vok = 0; vic = 0;
    if (!hit) begin
      for (int k = 0; k < WAYS; k++) begin
        int w = (rr + k) % WAYS;
        if (!vok && g[w]) begin vok = 1; vic = w; end
      end
      for (int w = WAYS - 1; w >= 0; w--) if (g[w] && !cv[s][w]) begin vok = 1; vic = w; end
    end
    // model update
    exp_data = hit ? cdat[s][hw] : rmem[word];
    if (we) rmem[word] = wd;
    if (hit) begin
      if (we) cdat[s][hw] = wd;
      if (secure && g[hw]) begin sv[s][hw] = 1; sl[s][hw] = 1; sp[s][hw] = PID_W'(pid); n_lock++; end
    end else if (vok) begin
      check(!(attached && sv[s][vic] && sl[s][vic] && sp[s][vic] != PID_W'(pid)),
            "model evicts a locked line");
      cv[s][vic] = 1; ctag[s][vic] = tag; cdat[s][vic] = we ? wd : exp_data;
      rr = (vic + 1) % WAYS;
      if (secure) begin sv[s][vic] = 1; sl[s][vic] = 1; sp[s][vic] = PID_W'(pid); n_lock++; end
    end
    // drive the request
    req_valid = 1; req_we = we; req_addr = addr; req_wdata = wd;
    req_pid = PID_W'(pid); req_secure = secure;
    @(negedge clk);
    req_valid = 0;
    lat = 0;
    while (!resp_valid && lat < 100) begin @(negedge clk); lat++; end
    lat++;
    check(resp_hit == hit, $sformatf("hit %0d expected %0d (addr %h pid %0d)", resp_hit, hit, addr, pid));
    check(resp_denied == (!hit && !vok), $sformatf("denied %0d expected %0d", resp_denied, !hit && !vok));
    if (!we) check(resp_rdata == exp_data, $sformatf("data %h expected %h addr %h", resp_rdata, exp_data, addr));
    check(lat == ((hit && !we) ? 1 : 1 + LAT), $sformatf("latency %0d (hit %0d we %0d)", lat, hit, we));
    if (hit) n_hit++; else n_miss++;
    if (!hit && !vok) n_denied++;
    @(negedge clk);
  endtask

  initial begin
    for (int phase = 0; phase < 2; phase++) begin
      attached = (phase == 0);
      reset_all();
      for (int i = 0; i < 3000; i++) begin
        int pid;
        logic [31:0] addr;
        pid  = int'($urandom_range(0, 2));
        addr = {20'd0, 5'($urandom_range(0, 31)), 3'($urandom_range(0, SETS - 1)), 2'b00};
        access($urandom_range(0, 3) == 0, addr, $urandom, pid,
               pid == 1 && $urandom_range(0, 2) == 0);
      end
      if (phase == 0) check(n_denied > 0, "some evictions denied with the monitor attached");
      if (phase == 1) check(n_denied == 0, "no eviction denied without the monitor");
      $display("phase %0d: hits=%0d misses=%0d denied=%0d locks=%0d", phase, n_hit, n_miss, n_denied, n_lock);
      n_denied = 0;
    end
    check(n_hit > 0 && n_miss > 0 && n_lock > 0, "hits, misses and locks exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

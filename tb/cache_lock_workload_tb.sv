// cache_lock_workload_tb: the cache-locking workload at full size (32 KB,
// 4-way, 2048 one-word sets), run through split3d_top's system C.
//   1. A crypto process (PID 1) reads its 4640-byte working set (1160 words,
//      the size of an AES implementation with enlarged T-boxes) with secure
//      loads, so each word is locked into one way of its set.
//   2. A second process (PID 2) streams random loads and stores over a 28 KB
//      working set, more than the three ways left to it can hold.
//   3. The crypto process reads its set again.
// With the eviction monitor attached, every word of step 3 must hit, and the
// second process still runs, just with less capacity.
// The same run is then repeated without the monitor, where the second
// process evicts crypto lines. Every load's data is compared with a model of
// memory. The hit rates of both runs are printed, as a stand-in for the
// performance comparison between the 32 KB 4-way cache and the same cache
// with one way locked.
module cache_lock_workload_tb;
  import split3d_pkg::*;

  localparam int AES_WORDS   = 4640 / 4;
  localparam int BENCH_WORDS = 28 * 1024 / 4;
  localparam int BENCH_OPS   = 30000;
  localparam logic [31:0] AES_BASE   = 32'h0001_0000;
  localparam logic [31:0] BENCH_BASE = 32'h0002_0000;

  logic clk = 0, rst = 1, att = 1;
  logic c_req_valid = 0, c_req_ready, c_req_we = 0, c_req_secure = 0;
  logic [31:0] c_req_addr = 0, c_req_wdata = 0, c_rdata;
  logic [7:0] c_req_pid = 0;
  logic c_resp_valid, c_hit, c_denied, c_mm_ld_we = 0;
  logic [31:0] c_mm_ld_addr = 0, c_mm_ld_data = 0;
  bus_req_t [1:0] d_core_req = '0;

  int checks = 0, failures = 0;

  // systems A, B and D are idle here
  split3d_top dut (
    .clk, .rst,
    .a_cp_attached(1'b0), .a_proc_level(level_t'(0)), .a_ld_we(1'b0), .a_ld_addr(32'd0),
    .a_ld_data(32'd0), .a_tld_we(1'b0), .a_tld_addr(32'd0), .a_tld_data(level_t'(0)),
    .a_pc(), .a_state(), .a_reg_state(), .a_ev_skip(), .a_ev_deny_ld(), .a_ev_deny_st(),
    .a_ev_creep(),
    .b_cp_attached(1'b0), .b_ld_we(1'b0), .b_ld_addr(32'd0), .b_ld_data(32'd0), .b_pc(),
    .b_state(), .b_enc_in(), .b_enc_out(32'd0), .b_dec_in(), .b_dec_out(32'd0),
    .b_ev_encrypt(), .b_ev_decrypt(),
    .c_cp_attached(att), .c_req_valid, .c_req_ready, .c_req_we, .c_req_addr, .c_req_wdata,
    .c_req_pid, .c_req_secure, .c_resp_valid, .c_resp_rdata(c_rdata), .c_resp_hit(c_hit),
    .c_resp_denied(c_denied), .c_mm_ld_we, .c_mm_ld_addr, .c_mm_ld_data,
    .d_cp_attached(1'b0), .d_core_req, .d_core_ack(), .d_core_rdata(), .d_l2_req(),
    .d_l2_ack(1'b0), .d_l2_rdata(32'd0), .d_conflict(), .d_slot());

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  logic [31:0] aes_model [AES_WORDS];
  logic [31:0] bench_model [BENCH_WORDS];

  task automatic access(input logic we, input logic [31:0] addr, input logic [31:0] wd,
                        input int pid, input logic secure, output logic hit,
                        output logic [31:0] data);
    c_req_valid = 1; c_req_we = we; c_req_addr = addr; c_req_wdata = wd;
    c_req_pid = 8'(pid); c_req_secure = secure;
    @(negedge clk);
    c_req_valid = 0;
    while (!c_resp_valid) @(negedge clk);
    hit = c_hit; data = c_rdata;
    check(!c_denied, "no set is ever fully locked in this workload");
    @(negedge clk);
  endtask

  initial begin
    int aes_hits [2], bench_hits [2], bench_loads [2];
    logic h;
    logic [31:0] data;
    for (int run = 0; run < 2; run++) begin
      att = (run == 0);
      aes_hits[run] = 0; bench_hits[run] = 0; bench_loads[run] = 0;
      rst = 1;
      for (int i = 0; i < AES_WORDS; i++) begin
        aes_model[i] = $urandom;
        c_mm_ld_we = 1; c_mm_ld_addr = AES_BASE + 32'(4 * i); c_mm_ld_data = aes_model[i];
        @(negedge clk);
      end
      for (int i = 0; i < BENCH_WORDS; i++) begin
        bench_model[i] = $urandom;
        c_mm_ld_we = 1; c_mm_ld_addr = BENCH_BASE + 32'(4 * i); c_mm_ld_data = bench_model[i];
        @(negedge clk);
      end
      c_mm_ld_we = 0;
      rst = 0;
      while (!c_req_ready) @(negedge clk);

      for (int i = 0; i < AES_WORDS; i++) begin
        access(0, AES_BASE + 32'(4 * i), 0, 1, 1, h, data);
        check(data == aes_model[i], "crypto working set loaded");
      end
      for (int n = 0; n < BENCH_OPS; n++) begin
        int i;
        logic we;
        i = int'($urandom_range(0, BENCH_WORDS - 1));
        we = ($urandom_range(0, 3) == 0);
        if (we) begin
          bench_model[i] = $urandom;
          access(1, BENCH_BASE + 32'(4 * i), bench_model[i], 2, 0, h, data);
        end else begin
          access(0, BENCH_BASE + 32'(4 * i), 0, 2, 0, h, data);
          check(data == bench_model[i], $sformatf("benchmark load %0d data", n));
          bench_loads[run]++;
          bench_hits[run] += int'(h);
        end
      end
      for (int i = 0; i < AES_WORDS; i++) begin
        access(0, AES_BASE + 32'(4 * i), 0, 1, 0, h, data);
        check(data == aes_model[i], "crypto working set re-read");
        aes_hits[run] += int'(h);
      end
      $display("%s: crypto lines still cached %0d of %0d; benchmark load hit rate %0d/%0d",
               att ? "monitor attached (one way locked)" : "no monitor (plain 4-way)",
               aes_hits[run], AES_WORDS, bench_hits[run], bench_loads[run]);
    end
    check(aes_hits[0] == AES_WORDS, "with the monitor no crypto line was evicted");
    check(aes_hits[1] < AES_WORDS, "without the monitor crypto lines were evicted");
    check(bench_hits[0] > 0 && bench_hits[0] <= bench_hits[1],
          "locking one way costs the benchmark hits, never gains any");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

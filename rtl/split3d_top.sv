// split3d_top: the two-tier systems side by side.
//
// Each system is a computation plane (made anywhere) with posts, plus an
// optional control plane (made in a trusted fab) that is either bonded on top
// (`*_cp_attached` = 1) or absent. When it is absent every control post floats
// to its pull-up level: overrides and disables are inactive, taps are off and
// every cache way is granted, so the computation plane works exactly as if the
// posts were not there.
//   A  MIPS multi-cycle CPU + multilevel-security regulator
//   B  MIPS multi-cycle CPU + memory-encryption coprocessor; the cipher cores
//      are external (enc_*/dec_* ports)
//   C  4-way cache and controller + cache eviction monitor + main memory
//   D  shared-bus guard of two cores + TDMA schedule; the cores and the shared
//      L2 are external (core_*/l2_* ports)
// Program and table load ports of A, B and C are for setup while in reset.
module split3d_top
  import split3d_pkg::*;
#(
  parameter int unsigned MIPS_MEM_WORDS = 256,
  parameter int unsigned CACHE_SETS     = 2048,
  parameter int unsigned CACHE_WAYS     = 4,
  parameter int unsigned PID_W          = 8,
  parameter int unsigned MM_WORDS       = 65536,
  parameter int unsigned MM_LAT         = 4,
  parameter int unsigned NUM_CORES      = 2,
  parameter int unsigned SLOT_CYCLES    = 16
) (
  input  logic        clk,
  input  logic        rst,

  // ---- A: MIPS + regulator ----
  input  logic        a_cp_attached,
  input  level_t      a_proc_level,
  input  logic        a_ld_we,
  input  logic [31:0] a_ld_addr,
  input  logic [31:0] a_ld_data,
  input  logic        a_tld_we,
  input  logic [31:0] a_tld_addr,
  input  level_t      a_tld_data,
  output logic [31:0] a_pc,
  output mips_state_e a_state,
  output reg_state_e  a_reg_state,
  output logic        a_ev_skip,
  output logic        a_ev_deny_ld,
  output logic        a_ev_deny_st,
  output logic        a_ev_creep,

  // ---- B: MIPS + crypto coprocessor ----
  input  logic        b_cp_attached,
  input  logic        b_ld_we,
  input  logic [31:0] b_ld_addr,
  input  logic [31:0] b_ld_data,
  output logic [31:0] b_pc,
  output mips_state_e b_state,
  output logic [31:0] b_enc_in,
  input  logic [31:0] b_enc_out,
  output logic [31:0] b_dec_in,
  input  logic [31:0] b_dec_out,
  output logic        b_ev_encrypt,
  output logic        b_ev_decrypt,

  // ---- C: cache + eviction monitor ----
  input  logic                  c_cp_attached,
  input  logic                  c_req_valid,
  output logic                  c_req_ready,
  input  logic                  c_req_we,
  input  logic [31:0]           c_req_addr,
  input  logic [31:0]           c_req_wdata,
  input  logic [PID_W-1:0]      c_req_pid,
  input  logic                  c_req_secure,
  output logic                  c_resp_valid,
  output logic [31:0]           c_resp_rdata,
  output logic                  c_resp_hit,
  output logic                  c_resp_denied,
  input  logic                  c_mm_ld_we,
  input  logic [31:0]           c_mm_ld_addr,
  input  logic [31:0]           c_mm_ld_data,

  // ---- D: shared bus isolation ----
  input  logic                              d_cp_attached,
  input  bus_req_t [NUM_CORES-1:0]          d_core_req,
  output logic     [NUM_CORES-1:0]          d_core_ack,
  output logic     [NUM_CORES-1:0][31:0]    d_core_rdata,
  output bus_req_t                          d_l2_req,
  input  logic                              d_l2_ack,
  input  logic     [31:0]                   d_l2_rdata,
  output logic                              d_conflict,
  output logic [$clog2(NUM_CORES)-1:0]      d_slot
);

  // =================== A ===================
  mips_taps_t a_taps;
  mips_ovr_t  a_ovr_cp, a_ovr;
  logic       a_tap_en_cp;

  mips_cpu #(.MEM_WORDS(MIPS_MEM_WORDS)) u_a_cpu (
    .clk, .rst, .ld_we(a_ld_we), .ld_addr(a_ld_addr), .ld_data(a_ld_data),
    .tap_en(a_cp_attached & a_tap_en_cp), .taps(a_taps), .ovr(a_ovr),
    .state_o(a_state), .pc_o(a_pc));

  mls_regulator #(.MEM_WORDS(MIPS_MEM_WORDS)) u_a_reg (
    .clk, .rst, .proc_level(a_proc_level),
    .tld_we(a_tld_we), .tld_addr(a_tld_addr), .tld_data(a_tld_data),
    .tap_en(a_tap_en_cp), .taps(a_taps), .ovr(a_ovr_cp),
    .state_o(a_reg_state), .ev_skip(a_ev_skip), .ev_deny_ld(a_ev_deny_ld),
    .ev_deny_st(a_ev_deny_st), .ev_creep(a_ev_creep));

  assign a_ovr = a_cp_attached ? a_ovr_cp : MIPS_OVR_NATIVE;

  // =================== B ===================
  mips_taps_t b_taps;
  mips_ovr_t  b_ovr_cp, b_ovr;
  logic       b_tap_en_cp;

  mips_cpu #(.MEM_WORDS(MIPS_MEM_WORDS)) u_b_cpu (
    .clk, .rst, .ld_we(b_ld_we), .ld_addr(b_ld_addr), .ld_data(b_ld_data),
    .tap_en(b_cp_attached & b_tap_en_cp), .taps(b_taps), .ovr(b_ovr),
    .state_o(b_state), .pc_o(b_pc));

  crypto_coproc u_b_crypto (
    .tap_en(b_tap_en_cp), .taps(b_taps), .ovr(b_ovr_cp),
    .enc_in(b_enc_in), .enc_out(b_enc_out), .dec_in(b_dec_in), .dec_out(b_dec_out),
    .ev_encrypt(b_ev_encrypt), .ev_decrypt(b_ev_decrypt));

  assign b_ovr = b_cp_attached ? b_ovr_cp : MIPS_OVR_NATIVE;

  // =================== C ===================
  localparam int unsigned IDX_W = $clog2(CACHE_SETS);
  localparam int unsigned WAY_W = $clog2(CACHE_WAYS);

  logic                  c_mem_req, c_mem_we, c_mem_ack;
  logic [31:0]           c_mem_addr, c_mem_wdata, c_mem_rdata;
  logic [IDX_W-1:0]      c_tap_set;
  logic [PID_W-1:0]      c_tap_pid;
  logic                  c_tap_upd;
  logic [WAY_W-1:0]      c_tap_upd_way;
  logic [CACHE_WAYS-1:0] c_grant_cp, c_grant;

  cache_ctrl #(.SETS(CACHE_SETS), .WAYS(CACHE_WAYS), .PID_W(PID_W)) u_c_cache (
    .clk, .rst,
    .req_valid(c_req_valid), .req_ready(c_req_ready), .req_we(c_req_we),
    .req_addr(c_req_addr), .req_wdata(c_req_wdata), .req_pid(c_req_pid),
    .req_secure(c_req_secure), .resp_valid(c_resp_valid), .resp_rdata(c_resp_rdata),
    .resp_hit(c_resp_hit), .resp_denied(c_resp_denied),
    .mem_req(c_mem_req), .mem_we(c_mem_we), .mem_addr(c_mem_addr),
    .mem_wdata(c_mem_wdata), .mem_ack(c_mem_ack), .mem_rdata(c_mem_rdata),
    .tap_en(c_cp_attached), .tap_set(c_tap_set), .tap_pid(c_tap_pid),
    .tap_upd(c_tap_upd), .tap_upd_way(c_tap_upd_way), .grant(c_grant));

  evict_monitor #(.SETS(CACHE_SETS), .WAYS(CACHE_WAYS), .PID_W(PID_W)) u_c_mon (
    .clk, .rst, .tap_set(c_tap_set), .tap_pid(c_tap_pid), .tap_upd(c_tap_upd),
    .tap_upd_way(c_tap_upd_way), .grant(c_grant_cp));

  assign c_grant = c_cp_attached ? c_grant_cp : '1;

  main_mem #(.WORDS(MM_WORDS), .LAT(MM_LAT)) u_c_mem (
    .clk, .rst, .mem_req(c_mem_req), .mem_we(c_mem_we), .mem_addr(c_mem_addr),
    .mem_wdata(c_mem_wdata), .mem_ack(c_mem_ack), .mem_rdata(c_mem_rdata),
    .ld_we(c_mm_ld_we), .ld_addr(c_mm_ld_addr), .ld_data(c_mm_ld_data));

  // =================== D ===================
  logic [NUM_CORES-1:0] d_dis_n_cp, d_dis_n;

  tdma_arbiter #(.NUM_CORES(NUM_CORES), .SLOT_CYCLES(SLOT_CYCLES)) u_d_tdma (
    .clk, .rst, .dis_n(d_dis_n_cp), .slot(d_slot));

  assign d_dis_n = d_cp_attached ? d_dis_n_cp : '1;

  shared_bus_guard #(.NUM_CORES(NUM_CORES)) u_d_bus (
    .core_req(d_core_req), .core_ack(d_core_ack), .core_rdata(d_core_rdata),
    .dis_n(d_dis_n), .bus_req(d_l2_req), .bus_ack(d_l2_ack), .bus_rdata(d_l2_rdata),
    .conflict(d_conflict));
endmodule

// cache_ctrl: set-associative cache and cache controller (computation plane)
// with posts for the 3D cache eviction monitor.
//
// WAYS-way set-associative, one 32-bit word per line, write-through with
// write-allocate, so a line is never dirty and replacing it needs no
// write-back. Every load or store:
//   hit   - the word is read or updated in place (a store also goes on to
//           memory); no line is evicted.
//   miss  - the controller looks for a victim among the ways the monitor
//           grants (an invalid granted way first, else the next granted way
//           after a round-robin pointer). If one exists the word is fetched
//           (load) or taken from the store and written into it; if none is
//           granted the access goes to memory and no cache line changes.
// A secure load/store (req_secure) that ends on a granted line tells the
// monitor (tapped upd/way) to lock that line to the requesting process.
// Without a control plane the grant posts float high (all granted) and the
// cache behaves as a plain cache. The line-fill write enable of every way
// passes an overriding receptacle controlled by that way's grant, so even a
// wrong victim choice cannot evict a locked line.
// Interface: req_valid/req_ready handshake (a request is taken in IDLE); the
// result comes with a one-cycle resp_valid: in the cycle after the request is
// taken for a hit load, in the cycle mem_ack arrives for anything that goes
// to memory. Memory: mem_req held until
// mem_ack. After a (synchronous) reset the controller spends SETS cycles
// invalidating one set per cycle, with req_ready low.
// Line size, write policy, victim order and handshakes are this design's
// choices; the 4-way organisation, the grant check and the secure update
// follow the monitor description.
module cache_ctrl #(
  parameter int unsigned SETS  = 2048,
  parameter int unsigned WAYS  = 4,
  parameter int unsigned PID_W = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  // processor side
  input  logic                    req_valid,
  output logic                    req_ready,
  input  logic                    req_we,
  input  logic [31:0]             req_addr,
  input  logic [31:0]             req_wdata,
  input  logic [PID_W-1:0]        req_pid,
  input  logic                    req_secure,
  output logic                    resp_valid,
  output logic [31:0]             resp_rdata,
  output logic                    resp_hit,
  output logic                    resp_denied,   // miss with no grantable way
  // memory side
  output logic                    mem_req,
  output logic                    mem_we,
  output logic [31:0]             mem_addr,
  output logic [31:0]             mem_wdata,
  input  logic                    mem_ack,
  input  logic [31:0]             mem_rdata,
  // posts to the eviction monitor
  input  logic                    tap_en,
  output logic [$clog2(SETS)-1:0] tap_set,
  output logic [PID_W-1:0]        tap_pid,
  output logic                    tap_upd,
  output logic [$clog2(WAYS)-1:0] tap_upd_way,
  input  logic [WAYS-1:0]         grant          // pulled up
);
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned WAY_W = $clog2(WAYS);
  localparam int unsigned TAG_W = 32 - IDX_W - 2;

  typedef enum logic [2:0] {C_INIT, C_IDLE, C_LOOKUP, C_MEM_RD, C_MEM_WR} cstate_e;

  cstate_e          state;
  logic             r_we, r_secure;
  logic [31:0]      r_addr, r_wdata;
  logic [PID_W-1:0] r_pid;
  logic             r_hit, r_fill;
  logic [WAY_W-1:0] r_way;
  logic [WAY_W-1:0] rr_ptr;
  logic [IDX_W-1:0] init_idx;

  logic [TAG_W-1:0] tag_rd  [WAYS];   // tag of each way at idx
  logic [WAYS-1:0]  valid [SETS];

  logic [IDX_W-1:0] idx;
  logic [TAG_W-1:0] tag;
  assign idx = r_addr[IDX_W+1:2];
  assign tag = r_addr[31:IDX_W+2];

  // ---------------- lookup ----------------
  logic [WAYS-1:0]  hit_vec;
  logic             hit;
  logic [WAY_W-1:0] hit_way, vic_way;
  logic             vic_ok;

  always_comb begin
    hit_vec = '0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      hit_vec[w] = valid[idx][w] && (tag_rd[w] == tag);
      if (hit_vec[w]) hit_way = WAY_W'(w);
    end
    hit = |hit_vec;
  end

  // victim: first granted invalid way, else first granted way from rr_ptr on
  always_comb begin
    vic_ok  = 1'b0;
    vic_way = '0;
    for (int k = 0; k < WAYS; k++) begin
      automatic logic [WAY_W-1:0] w = rr_ptr + WAY_W'(k);
      if (!vic_ok && grant[w]) begin
        vic_ok  = 1'b1;
        vic_way = w;
      end
    end
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (grant[w] && !valid[idx][w]) begin
        vic_ok  = 1'b1;
        vic_way = WAY_W'(w);
      end
    end
  end

  // ---------------- line write enables through override posts ----------------
  logic [WAYS-1:0] fill_we_native, fill_we;
  logic            fill_now;
  logic [31:0]     fill_data;
  assign fill_now = r_fill && mem_ack && (state == C_MEM_RD || state == C_MEM_WR);
  assign fill_data = (state == C_MEM_RD) ? mem_rdata : r_wdata;
  always_comb begin
    fill_we_native = '0;
    if (fill_now) fill_we_native[r_way] = 1'b1;
  end
  for (genvar w = 0; w < WAYS; w++) begin : g_we_ovr
    tsv_override #(.WIDTH(1)) u_we (.in(fill_we_native[w]), .ovr_val(1'b0),
                                    .control_n(grant[w]), .out(fill_we[w]));
  end

  // store hit: the word is updated in place (no eviction, not overridden)
  logic st_hit_now;
  assign st_hit_now = (state == C_LOOKUP) && r_we && hit;

  // ---------------- controller ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= C_INIT;
      init_idx <= '0;
      rr_ptr   <= '0;
      r_we     <= 1'b0;
      r_secure <= 1'b0;
      r_addr   <= '0;
      r_wdata  <= '0;
      r_pid    <= '0;
      r_hit    <= 1'b0;
      r_fill   <= 1'b0;
      r_way    <= '0;
    end else begin
      unique case (state)
        C_INIT: begin
          init_idx <= init_idx + 1'b1;
          if (init_idx == IDX_W'(SETS - 1)) state <= C_IDLE;
        end
        C_IDLE: if (req_valid) begin
          r_we     <= req_we;
          r_addr   <= req_addr;
          r_wdata  <= req_wdata;
          r_pid    <= req_pid;
          r_secure <= req_secure;
          state    <= C_LOOKUP;
        end
        C_LOOKUP: begin
          r_hit  <= hit;
          r_fill <= !hit && vic_ok;
          r_way  <= hit ? hit_way : vic_way;
          if (hit && !r_we) state <= C_IDLE;
          else              state <= r_we ? C_MEM_WR : C_MEM_RD;
          if (!hit && vic_ok) rr_ptr <= vic_way + 1'b1;
        end
        C_MEM_RD, C_MEM_WR: if (mem_ack) state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end

  // arrays: one tag and one data memory per way
  logic [31:0] data_rd [WAYS];
  for (genvar w = 0; w < WAYS; w++) begin : g_way
    logic [TAG_W-1:0] tags [SETS];
    logic [31:0]      data [SETS];
    always_ff @(posedge clk) begin
      if (fill_we[w]) tags[idx] <= tag;
      if (fill_we[w])                                   data[idx] <= fill_data;
      else if (st_hit_now && hit_way == WAY_W'(w))      data[idx] <= r_wdata;
    end
    assign tag_rd[w]  = tags[idx];
    assign data_rd[w] = data[idx];
  end

  // valid bits: cleared one set per cycle after reset, then set by fills
  logic [WAYS-1:0] valid_set;
  always_comb begin
    valid_set = valid[idx];
    for (int w = 0; w < WAYS; w++) if (fill_we[w]) valid_set[w] = 1'b1;
  end
  always_ff @(posedge clk) begin
    if (state == C_INIT) valid[init_idx] <= '0;
    else if (|fill_we)   valid[idx]      <= valid_set;
  end

  // ---------------- outputs ----------------
  assign req_ready = (state == C_IDLE);
  assign mem_req   = (state == C_MEM_RD) || (state == C_MEM_WR);
  assign mem_we    = (state == C_MEM_WR);
  assign mem_addr  = r_addr;
  assign mem_wdata = r_wdata;

  always_comb begin
    resp_valid  = 1'b0;
    resp_rdata  = '0;
    resp_hit    = 1'b0;
    resp_denied = 1'b0;
    if (state == C_LOOKUP && hit && !r_we) begin
      resp_valid = 1'b1;
      resp_rdata = data_rd[hit_way];
      resp_hit   = 1'b1;
    end else if ((state == C_MEM_RD || state == C_MEM_WR) && mem_ack) begin
      resp_valid  = 1'b1;
      resp_rdata  = (state == C_MEM_RD) ? mem_rdata : '0;
      resp_hit    = r_hit;
      resp_denied = !r_hit && !r_fill;
    end
  end

  // secure access completing on a granted line locks it to the process
  logic             upd_native;
  logic [WAY_W-1:0] upd_way_native;
  always_comb begin
    upd_native     = 1'b0;
    upd_way_native = hit_way;
    if (state == C_LOOKUP && hit && r_secure && grant[hit_way]) begin
      upd_native = 1'b1;
    end else if (fill_now && r_secure) begin
      upd_native     = 1'b1;
      upd_way_native = r_way;
    end
  end

  tsv_tap #(.WIDTH(IDX_W)) u_tap_set (.c(idx),   .b(tap_en), .a(tap_set), .tap_vld());
  tsv_tap #(.WIDTH(PID_W)) u_tap_pid (.c(r_pid), .b(tap_en), .a(tap_pid), .tap_vld());
  tsv_tap #(.WIDTH(1 + WAY_W)) u_tap_upd (.c({upd_native, upd_way_native}), .b(tap_en),
                                          .a({tap_upd, tap_upd_way}), .tap_vld());

`ifndef SYNTHESIS
  a_fill_granted: assert property (@(posedge clk) disable iff (rst)
                                   fill_now |-> grant[r_way])
    else $error("cache_ctrl: fill of a way the monitor did not grant");
`endif
endmodule

// evict_monitor: 3D cache eviction monitor (control plane).
//
// Holds the security bits of every line of the cache below it: a valid bit,
// the ID of the process that owns the line and a lock bit. For the set of the
// load or store in progress (tapped index) and the tapped process ID it
// returns one Grant bit per way:
//   grant[w] = !V | !L | (PID == requesting PID)
// i.e. a line may be evicted unless another process has locked it. Grant
// drives the pulled-up override posts of the cache's line write enables and is
// also seen by the cache controller so that it can pick a granted way.
// Only a secure load or store changes the bits: when it completes on way w of
// the set (tapped `upd`), that line becomes {V=1, PID, L=1}. Unlocking is not
// part of the scheme.
// Timing: grant is combinational from the taps; the update is written on the
// clock edge. After reset the valid bits are cleared one set per cycle (SETS
// cycles); grants are not meaningful until then. Line layout of the bits follows
// the monitor description; the PID width is this design's choice.
module evict_monitor #(
  parameter int unsigned SETS  = 2048,
  parameter int unsigned WAYS  = 4,
  parameter int unsigned PID_W = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(SETS)-1:0]  tap_set,
  input  logic [PID_W-1:0]         tap_pid,
  input  logic                     tap_upd,
  input  logic [$clog2(WAYS)-1:0]  tap_upd_way,
  output logic [WAYS-1:0]          grant
);
  typedef struct packed {
    logic [PID_W-1:0] pid;
    logic             lock;
  } sec_bits_t;

  logic [WAYS-1:0] sec_v [SETS];
  sec_bits_t       sec_rd [WAYS];

  // one security-bit memory per way
  for (genvar w = 0; w < WAYS; w++) begin : g_way
    sec_bits_t sec [SETS];
    always_ff @(posedge clk) begin
      if (tap_upd && tap_upd_way == $clog2(WAYS)'(w))
        sec[tap_set] <= '{pid: tap_pid, lock: 1'b1};
    end
    assign sec_rd[w] = sec[tap_set];
  end

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      grant[w] = !sec_v[tap_set][w] || !sec_rd[w].lock || (sec_rd[w].pid == tap_pid);
    end
  end

  // valid bits: cleared one set per cycle after reset (SETS cycles, while the
  // cache below runs its own invalidation sweep), then set by secure updates
  logic                    init;
  logic [$clog2(SETS)-1:0] init_idx;
  logic [WAYS-1:0]         v_set;
  always_ff @(posedge clk) begin
    if (rst) begin
      init     <= 1'b1;
      init_idx <= '0;
    end else if (init) begin
      init_idx <= init_idx + 1'b1;
      if (init_idx == $clog2(SETS)'(SETS - 1)) init <= 1'b0;
    end
  end
  always_comb begin
    v_set = sec_v[tap_set];
    v_set[tap_upd_way] = 1'b1;
  end
  always_ff @(posedge clk) begin
    if (init)         sec_v[init_idx] <= '0;
    else if (tap_upd) sec_v[tap_set]  <= v_set;
  end
endmodule

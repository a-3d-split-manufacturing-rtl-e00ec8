// tdma_arbiter: time-division schedule for the shared bus (control plane).
//
// The cores of a multi-core processor arbitrate a shared bus among themselves
// and so must trust each other. With a control plane bonded, this block takes
// that decision away from them: time is cut into slots of SLOT_CYCLES cycles,
// given to the cores in turn, and for every core it drives the active-low
// disable post of that core's bus connection low except during the core's own
// slot. Outputs are registered; the slot changes on the clock edge after the
// last cycle of the previous slot. Reset starts with core 0. The slot length
// and round-robin order are this design's choices.
module tdma_arbiter #(
  parameter int unsigned NUM_CORES   = 2,
  parameter int unsigned SLOT_CYCLES = 16
) (
  input  logic                         clk,
  input  logic                         rst,
  output logic [NUM_CORES-1:0]         dis_n,   // 1 = connected
  output logic [$clog2(NUM_CORES)-1:0] slot
);
  localparam int unsigned CW = $clog2(SLOT_CYCLES);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      slot <= '0;
    end else if (cnt == CW'(SLOT_CYCLES - 1)) begin
      cnt  <= '0;
      slot <= (slot == $clog2(NUM_CORES)'(NUM_CORES - 1)) ? '0 : slot + 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  always_comb begin
    dis_n = '0;
    dis_n[slot] = 1'b1;
  end
endmodule

// shared_bus_guard: shared bus of the multi-core isolation example
// (computation plane).
//
// Each core's request (valid, we, address, write data) reaches the shared bus
// through a disabling receptacle on every bit, and the bus response (ack,
// read data) reaches each core through another one; all receptacles of a core
// share that core's active-low, pulled-up disable post. The bus is the OR of
// the driven requests, as an open bus with mutually trusting masters would
// be. Without a control plane every core stays connected and two cores can
// collide (`conflict`); with the TDMA schedule only one core is connected at a
// time and a disconnected core sees neither the bus nor its responses.
// Timing: purely combinational.
module shared_bus_guard
  import split3d_pkg::*;
#(
  parameter int unsigned NUM_CORES = 2
) (
  input  bus_req_t [NUM_CORES-1:0] core_req,
  output logic     [NUM_CORES-1:0] core_ack,
  output logic     [NUM_CORES-1:0][31:0] core_rdata,
  input  logic     [NUM_CORES-1:0] dis_n,     // disable posts, pulled up
  output bus_req_t                 bus_req,   // to the shared L2
  input  logic                     bus_ack,
  input  logic     [31:0]          bus_rdata,
  output logic                     conflict   // more than one valid request driven
);
  bus_req_t [NUM_CORES-1:0] drv;

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    tsv_disable #(.WIDTH($bits(bus_req_t))) u_req (.b(core_req[c]), .a_n(dis_n[c]),
                                                   .c(drv[c]), .drive());
    tsv_disable #(.WIDTH(33)) u_rsp (.b({bus_ack, bus_rdata}), .a_n(dis_n[c]),
                                     .c({core_ack[c], core_rdata[c]}), .drive());
  end

  always_comb begin
    int unsigned n;
    bus_req = '0;
    n = 0;
    for (int c = 0; c < NUM_CORES; c++) begin
      bus_req = bus_req | drv[c];
      if (drv[c].valid) n++;
    end
    conflict = (n > 1);
  end
endmodule

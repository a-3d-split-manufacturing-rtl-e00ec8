// tsv_disable: disabling TSV receptacle (computation plane).
//
// Lets the computation-plane signal B through to C while the control post A is
// high and blocks it while A is low. A is pulled up, so without a bonded
// control plane the signal always passes. In silicon the switch is a restoring
// (inverting) tri-state buffer whose inversion is undone downstream; here the
// logical value is passed and a blocked output reads as zero, with `drive`
// telling whether the output is driven (so that several disabled drivers can
// share one bus).
// Timing: purely combinational.
module tsv_disable #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] b,        // computation-plane signal
  input  logic             a_n,      // control post, active-low disable, pulled up
  output logic [WIDTH-1:0] c,        // signal after the receptacle
  output logic             drive     // c is driven
);
  always_comb begin
    c     = a_n ? b : '0;
    drive = a_n;
  end
endmodule

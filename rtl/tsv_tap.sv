// tsv_tap: tapping TSV receptacle (computation plane).
//
// Copies a computation-plane signal C up to a control-plane post A while the
// tap-enable post B is high; the native path of C is not touched and is not
// part of this module. In silicon the switch is a non-restoring tri-state
// buffer; an undriven tap post reads here as all zeros and `tap_vld` tells the
// control plane whether the post carries data. The enable post has no pull-up,
// so an absent control plane leaves the tap off.
// Timing: purely combinational.
module tsv_tap #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] c,        // computation-plane signal being tapped
  input  logic             b,        // control post: tap on
  output logic [WIDTH-1:0] a,        // post to the control plane
  output logic             tap_vld   // a is driven
);
  always_comb begin
    a       = b ? c : '0;
    tap_vld = b;
  end
endmodule

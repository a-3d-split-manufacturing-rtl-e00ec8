// tsv_override: overriding TSV receptacle (computation plane).
//
// A two-input multiplexer in front of a computation-plane signal. Its select
// comes from the Control post through an inverter: Control is pulled up, so a
// missing control plane selects the native input IN; driving Control low
// selects the value on the Override post instead.
// Timing: purely combinational.
module tsv_override #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] in,        // native computation-plane value
  input  logic [WIDTH-1:0] ovr_val,   // Override post: value from the control plane
  input  logic             control_n, // control post, active low, pulled up
  output logic [WIDTH-1:0] out
);
  always_comb out = control_n ? in : ovr_val;
endmodule

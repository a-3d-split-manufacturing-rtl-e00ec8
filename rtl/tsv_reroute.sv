// tsv_reroute: re-routing TSV receptacle (computation plane).
//
// Tapping and disabling combined: while tap post B is high the signal C goes
// up to the control plane on post A, and while disable post D is low its
// native continuation E is blocked. D is pulled up, so without a control plane
// C reaches E as if the receptacle were not there. Together with an
// overriding receptacle downstream this builds a "controlled" path through
// the control plane.
// Timing: purely combinational.
module tsv_reroute #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] c,        // computation-plane signal
  input  logic             b,        // control post: tap on
  input  logic             d_n,      // control post: active-low disable, pulled up
  output logic [WIDTH-1:0] a,        // post to the control plane
  output logic             a_vld,
  output logic [WIDTH-1:0] e,        // native continuation
  output logic             e_drive
);
  tsv_tap #(.WIDTH(WIDTH)) u_tap (.c(c), .b(b), .a(a), .tap_vld(a_vld));
  tsv_disable #(.WIDTH(WIDTH)) u_dis (.b(c), .a_n(d_n), .c(e), .drive(e_drive));
endmodule

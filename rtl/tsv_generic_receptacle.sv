// tsv_generic_receptacle: improved (assured) generic TSV receptacle.
//
// One socket that serves every primitive, chosen by the control posts:
//   tap      B=1                       (IN is copied to post A)
//   override D=0, value on post C      (OUT takes C instead of IN)
//   disable  E=0                       (OUT is not driven)
//   re-route B=1 and E=0
//   native   no post driven            (D and E pulled up: OUT = IN)
// The tapping path uses a restoring buffer, so post A is an output only and
// the control plane can never inject a value through it; IN and C are
// inverted on the way in and the output buffer inverts again, so OUT has the
// polarity of the selected input. This module is the logic-level behaviour of
// that circuit: an undriven output reads as zero with `out_drive` low.
// Timing: purely combinational.
module tsv_generic_receptacle #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] in,        // native computation-plane signal
  input  logic             b,         // tap enable post
  output logic [WIDTH-1:0] a,         // tap post (read only)
  input  logic             d_n,       // override select post, active low, pulled up
  input  logic [WIDTH-1:0] c,         // override value post
  input  logic             e_n,       // disable post, active low, pulled up
  output logic [WIDTH-1:0] out,
  output logic             out_drive
);
  logic [WIDTH-1:0] in_inv, c_inv, mux_inv;
  logic             a_vld_unused;

  // input inverters of the improved circuit
  always_comb begin
    in_inv = ~in;
    c_inv  = ~c;
  end

  // tapping portion (restoring buffer: re-inverts the inverted input)
  tsv_tap #(.WIDTH(WIDTH)) u_tap (.c(~in_inv), .b(b), .a(a), .tap_vld(a_vld_unused));

  // overriding portion
  tsv_override #(.WIDTH(WIDTH)) u_ovr (.in(in_inv), .ovr_val(c_inv), .control_n(d_n),
                                      .out(mux_inv));

  // disabling portion (restoring, inverting tri-state output)
  tsv_disable #(.WIDTH(WIDTH)) u_dis (.b(~mux_inv), .a_n(e_n), .c(out), .drive(out_drive));
endmodule

// tsv_generic_receptacle_tb: checks the generic receptacle in every post
// combination at WIDTH=3, including the native mode (no post driven), tap,
// override, disable and re-route, and that OUT keeps the polarity of the
// selected input.
module tsv_generic_receptacle_tb;
  localparam int W = 3;
  logic [W-1:0] in, c, a, out;
  logic b, d_n, e_n, drive;
  int checks = 0, failures = 0;
  int n_native = 0, n_tap = 0, n_ovr = 0, n_dis = 0, n_rrt = 0;

  tsv_generic_receptacle #(.WIDTH(W)) dut (.in(in), .b(b), .a(a), .d_n(d_n), .c(c),
                                           .e_n(e_n), .out(out), .out_drive(drive));

  initial begin
    for (int m = 0; m < 8; m++)
      for (int i = 0; i < (1 << W); i++)
        for (int v = 0; v < (1 << W); v++) begin
          logic [W-1:0] exp_a, exp_out;
          b = m[0]; d_n = m[1]; e_n = m[2]; in = W'(i); c = W'(v);
          #1;
          exp_a   = b ? in : '0;
          exp_out = !e_n ? '0 : (d_n ? in : c);
          checks++;
          if (a !== exp_a || out !== exp_out || drive !== e_n) begin
            failures++;
            $display("FAIL b=%b d_n=%b e_n=%b in=%h c=%h a=%h out=%h", b, d_n, e_n, in, c, a, out);
          end
          if (i == 0 && v == 0) begin
            if (!b && d_n && e_n) n_native++;
            if (b && d_n && e_n)  n_tap++;
            if (!d_n && e_n)      n_ovr++;
            if (!b && !e_n)       n_dis++;
            if (b && !e_n)        n_rrt++;
          end
        end
    if (n_native == 0 || n_tap == 0 || n_ovr == 0 || n_dis == 0 || n_rrt == 0) failures++;
    $display("modes: native=%0d tap=%0d override=%0d disable=%0d reroute=%0d",
             n_native, n_tap, n_ovr, n_dis, n_rrt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

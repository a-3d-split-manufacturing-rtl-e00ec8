// tsv_reroute_tb: exhaustive check of the re-routing receptacle at WIDTH=3:
// tap post A follows C when B is high; the native output E is blocked when the
// pulled-up disable post D is low.
module tsv_reroute_tb;
  localparam int W = 3;
  logic [W-1:0] c, a, e;
  logic b, d_n, a_vld, e_drive;
  int checks = 0, failures = 0;

  tsv_reroute #(.WIDTH(W)) dut (.c(c), .b(b), .d_n(d_n), .a(a), .a_vld(a_vld),
                                .e(e), .e_drive(e_drive));

  initial begin
    for (int bi = 0; bi < 2; bi++)
      for (int di = 0; di < 2; di++)
        for (int ci = 0; ci < (1 << W); ci++) begin
          b = bi[0]; d_n = di[0]; c = W'(ci);
          #1;
          checks++;
          if (a !== (bi ? W'(ci) : '0) || a_vld !== bi[0] ||
              e !== (di ? W'(ci) : '0) || e_drive !== di[0]) begin
            failures++;
            $display("FAIL b=%0d d_n=%0d c=%h a=%h e=%h", bi, di, ci, a, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tsv_tap_tb: exhaustive check of the tapping receptacle at WIDTH=4.
// The tap post must copy C only while B is high and read zero otherwise.
module tsv_tap_tb;
  localparam int W = 4;
  logic [W-1:0] c, a;
  logic b, vld;
  int checks = 0, failures = 0;

  tsv_tap #(.WIDTH(W)) dut (.c(c), .b(b), .a(a), .tap_vld(vld));

  initial begin
    for (int bi = 0; bi < 2; bi++) begin
      for (int ci = 0; ci < (1 << W); ci++) begin
        b = bi[0]; c = W'(ci);
        #1;
        checks++;
        if (a !== (bi ? W'(ci) : '0) || vld !== bi[0]) begin
          failures++;
          $display("FAIL b=%0d c=%h a=%h vld=%b", bi, ci, a, vld);
        end
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

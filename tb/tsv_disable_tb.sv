// tsv_disable_tb: exhaustive check of the disabling receptacle at WIDTH=4.
// With the (pulled-up) post high the signal passes; low, it is blocked.
module tsv_disable_tb;
  localparam int W = 4;
  logic [W-1:0] b, c;
  logic a_n, drive;
  int checks = 0, failures = 0;

  tsv_disable #(.WIDTH(W)) dut (.b(b), .a_n(a_n), .c(c), .drive(drive));

  initial begin
    for (int ai = 0; ai < 2; ai++) begin
      for (int bi = 0; bi < (1 << W); bi++) begin
        a_n = ai[0]; b = W'(bi);
        #1;
        checks++;
        if (c !== (ai ? W'(bi) : '0) || drive !== ai[0]) begin
          failures++;
          $display("FAIL a_n=%0d b=%h c=%h drive=%b", ai, bi, c, drive);
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

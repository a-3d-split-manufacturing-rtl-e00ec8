// tsv_override_tb: exhaustive check of the overriding receptacle at WIDTH=3.
// Control high (the pulled-up default) selects IN, low selects Override.
module tsv_override_tb;
  localparam int W = 3;
  logic [W-1:0] in, ov, out;
  logic ctl_n;
  int checks = 0, failures = 0;

  tsv_override #(.WIDTH(W)) dut (.in(in), .ovr_val(ov), .control_n(ctl_n), .out(out));

  initial begin
    for (int k = 0; k < 2; k++)
      for (int i = 0; i < (1 << W); i++)
        for (int o = 0; o < (1 << W); o++) begin
          ctl_n = k[0]; in = W'(i); ov = W'(o);
          #1;
          checks++;
          if (out !== (k ? W'(i) : W'(o))) begin
            failures++;
            $display("FAIL ctl_n=%0d in=%h ov=%h out=%h", k, i, o, out);
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

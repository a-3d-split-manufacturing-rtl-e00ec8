// main_mem_tb: random reads and writes against a model; every request must be
// acknowledged exactly LAT cycles after mem_req rises.
module main_mem_tb;
  localparam int WORDS = 64, LAT = 5;
  logic clk = 0, rst = 1, req = 0, we = 0, ack, ld_we = 0;
  logic [31:0] addr = 0, wdata = 0, rdata, ld_addr = 0, ld_data = 0;
  logic [31:0] m [WORDS];
  int checks = 0, failures = 0;

  main_mem #(.WORDS(WORDS), .LAT(LAT)) dut (.clk, .rst, .mem_req(req), .mem_we(we),
      .mem_addr(addr), .mem_wdata(wdata), .mem_ack(ack), .mem_rdata(rdata), .ld_we, .ld_addr, .ld_data);
  always #5 clk = ~clk;

  initial begin
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) begin
      m[i] = $urandom; ld_we = 1; ld_addr = 32'(4 * i); ld_data = m[i];
      @(negedge clk);
    end
    ld_we = 0; rst = 0;
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      int a, n;
      a = int'($urandom_range(0, WORDS - 1));
      req = 1; we = $urandom_range(0, 1) == 1; addr = 32'(4 * a); wdata = $urandom;
      n = 1;
      #1;
      while (!ack && n < 50) begin @(negedge clk); n++; #1; end
      checks++;
      if (n != LAT) begin failures++; $display("FAIL latency %0d", n); end
      if (!we) begin
        checks++;
        if (rdata != m[a]) begin failures++; $display("FAIL read %h expected %h", rdata, m[a]); end
      end else m[a] = wdata;
      @(negedge clk);
      req = 0;
      if ($urandom_range(0, 1) == 1) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

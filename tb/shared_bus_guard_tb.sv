// shared_bus_guard_tb: random requests from two cores under random disable
// posts. The bus must carry the OR of the connected cores' requests, a
// disconnected core must see no response, and `conflict` must flag two
// connected valid requests.
module shared_bus_guard_tb;
  import split3d_pkg::*;
  localparam int N = 2;
  bus_req_t [N-1:0] creq;
  logic [N-1:0] cack, dis_n;
  logic [N-1:0][31:0] crd;
  bus_req_t breq;
  logic back, conflict;
  logic [31:0] brd;
  int checks = 0, failures = 0, n_conf = 0, n_block = 0;

  shared_bus_guard #(.NUM_CORES(N)) dut (.core_req(creq), .core_ack(cack), .core_rdata(crd),
      .dis_n, .bus_req(breq), .bus_ack(back), .bus_rdata(brd), .conflict);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      bus_req_t exp;
      int nv;
      for (int c = 0; c < N; c++) creq[c] = '{valid: 1'($urandom), we: 1'($urandom), addr: $urandom, wdata: $urandom};
      dis_n = N'($urandom);
      back = 1'($urandom); brd = $urandom;
      #1;
      exp = '0; nv = 0;
      for (int c = 0; c < N; c++) if (dis_n[c]) begin
        exp = exp | creq[c];
        if (creq[c].valid) nv++;
      end
      checks++;
      if (breq !== exp || conflict !== (nv > 1)) begin failures++; $display("FAIL bus"); end
      for (int c = 0; c < N; c++) begin
        checks++;
        if (cack[c] !== (dis_n[c] & back) || crd[c] !== (dis_n[c] ? brd : 32'd0)) begin
          failures++; $display("FAIL response core %0d", c);
        end
        if (!dis_n[c] && creq[c].valid) n_block++;
      end
      if (nv > 1) n_conf++;
    end
    if (n_conf == 0 || n_block == 0) failures++;
    $display("conflicts=%0d blocked=%0d", n_conf, n_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

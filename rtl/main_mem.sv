// main_mem: word-addressed main memory behind the cache, fixed latency.
//
// A request (mem_req held high) is answered after LAT cycles with a one-cycle
// mem_ack; a write is performed and read data is valid in the ack cycle. The
// requester drops mem_req after the ack. The size, the latency and the
// handshake are this design's choices: the document only shows a memory block.
// Address bits above the memory size are ignored; contents start at zero
// only where written through the load port or by a store.
module main_mem #(
  parameter int unsigned WORDS = 65536,
  parameter int unsigned LAT   = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        mem_req,
  input  logic        mem_we,
  input  logic [31:0] mem_addr,     // byte address
  input  logic [31:0] mem_wdata,
  output logic        mem_ack,
  output logic [31:0] mem_rdata,
  // back-door load port
  input  logic        ld_we,
  input  logic [31:0] ld_addr,
  input  logic [31:0] ld_data
);
  localparam int unsigned AW = $clog2(WORDS);
  localparam int unsigned CW = $clog2(LAT + 1);

  logic [31:0]   mem [WORDS];
  logic [CW-1:0] cnt;

  assign mem_ack   = mem_req && (cnt == CW'(LAT - 1));
  assign mem_rdata = mem[mem_addr[AW+1:2]];

  always_ff @(posedge clk) begin
    if (rst)          cnt <= '0;
    else if (mem_ack) cnt <= '0;
    else if (mem_req) cnt <= cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (ld_we)                  mem[ld_addr[AW+1:2]]  <= ld_data;
    else if (mem_ack && mem_we) mem[mem_addr[AW+1:2]] <= mem_wdata;
  end
endmodule

// ecdsa_ram: the 16 x 409-bit RAM of the ECDSA core, holding the domain
// and key parameters, the hash, and intermediate and final results. One
// write port (from Bus 1) and one synchronous read port (onto Bus 2):
// rdata shows mem[raddr] one clock after raddr is presented. The size
// follows the paper; the port arrangement and the read latency are this
// design's choices. Contents are not reset.
module ecdsa_ram #(
  parameter int unsigned M     = 409,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [M-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [M-1:0]             rdata
);
  logic [M-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule

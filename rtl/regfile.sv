// regfile: co-processor RAM for point coordinates, temporaries and constants.
//
// NREGS words of L bits with one synchronous write port and one synchronous
// read port, the shape of an FPGA block RAM: 'rdata' shows the word addressed
// in the previous clock. A read of the word being written returns the old
// value. Contents are not reset; the host loads every word it uses.
//
// That the operands and the four temporaries live in a co-processor RAM
// follows the design description; the word count and the port arrangement
// are this design's choice.
module regfile #(
  parameter int unsigned L     = ecc_pkg::L,
  parameter int unsigned NREGS = ecc_pkg::NREGS,
  parameter int unsigned AW    = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [L-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [L-1:0]  rdata
);
  logic [L-1:0] mem [NREGS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule

// node_ram: storage for the nonzero matrix entries held by one mesh node.
//
// Each node keeps the list of nonzero entries of the matrix columns it owns.
// The list is written once, when the device is initialised, and read strictly
// in order once per multiplication, one entry per routing iteration, so a
// dense one-transistor DRAM bank next to the node is enough in silicon.  This
// module is the logical equivalent: a DEPTH x WIDTH array with one write port
// and one read port whose data appears one clock after the address
// (registered read), as a synchronous RAM macro would deliver it.  The
// registered read is this design's choice.
module node_ram #(
  parameter int unsigned DEPTH = 4200, // entries per node (h * rho)
  parameter int unsigned WIDTH = 27,   // bits per entry
  parameter int unsigned AW    = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (32'(raddr) < DEPTH) rdata <= mem[raddr];
    else                    rdata <= '0;
  end

endmodule

// frame_buffer: simple dual-port frame memory (one write port, one read port,
// one clock). The serial-concatenation transmitter keeps the m data blocks of
// a frame here until the outer parity that travels with them is known, and
// the receiver keeps the m received data blocks here while the outer codes
// regenerate and correct them.
//
// Writes take effect at the clock edge where we is high. Reads are
// synchronous: rdata shows the word at raddr one cycle after raddr is
// presented (read-before-write when both addresses match), which maps onto a
// standard SRAM macro or block RAM. Contents are not reset.
//
// The need for roughly 3*m*k1 bits of buffering comes from the reference
// design; the organisation (bit-wide, DEPTH words) is this design's choice.
module frame_buffer #(
  parameter int WIDTH = 1,
  parameter int DEPTH = 36 * 1311,
  localparam int AW   = $clog2(DEPTH)
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
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule

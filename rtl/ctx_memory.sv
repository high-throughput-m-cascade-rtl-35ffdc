// ctx_memory: single-port context memory, ROWS words of WIDTH bits.
//
// The default 55 x 70 bits is the 550 x 7-bit context memory of the design:
// each word holds the ten contexts that the CSR loads at once. One access per
// cycle: a write when we is set, otherwise rdata shows the word at addr
// (asynchronous read, so that the context-memory-load cycle can capture it in
// the CSR at the end of the same cycle). The contents are not reset; they are
// initialised through the write port before a slice is decoded.
//
// From the design document: the single-port 550 x 7-bit memory and its rows of
// ten contexts. This design's own choices: the asynchronous read and the
// initialisation through the normal write port.
module ctx_memory #(
  parameter int ROWS  = 55,
  parameter int WIDTH = 70,
  localparam int AW   = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (we && 32'(addr) < ROWS) mem[addr] <= wdata;
  end

  assign rdata = (32'(addr) < ROWS) ? mem[addr] : '0;

endmodule

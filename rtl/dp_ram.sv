// dp_ram: one "Dual Port 8 x 8" memory of the register file.
//
// DEPTH words of WIDTH bits with one synchronous write port and two
// asynchronous read ports. Following the register-file diagram, the two read
// addresses are Addr_S and Addr_D, and the write goes to Addr_D with the
// common input data. A write is taken on the rising clock edge when we = 1;
// the read outputs follow their addresses combinationally, so a location
// written at an edge shows its new value right after that edge.
// The sizes (8 x 8) follow the document; the read timing is this design's
// choice. The memory has no reset: contents are undefined until written.
module dp_ram #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr_s,
  input  logic [AW-1:0]    addr_d,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout_s,
  output logic [WIDTH-1:0] dout_d
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr_d] <= din;
  end

  assign dout_s = mem[addr_s];
  assign dout_d = mem[addr_d];

endmodule

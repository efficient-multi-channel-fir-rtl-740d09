// dp_ram: true dual-port block memory, as used for the sample memory and the
// coefficient memory of every MAC unit (one FPGA block RAM each, 1024 x 18).
//
// Both ports are synchronous: address, write enable and write data are taken
// at the rising clock edge, and the read data of the addressed word appears
// on dout_* one cycle later. A port reads the old content of a word it writes
// in the same cycle (read-first). If both ports write the same word in one
// cycle, port B's data is kept. The contents start at zero, as FPGA block RAM
// does after configuration; no reset clears them. The 18-bit width and the
// dual-port use (a 32-bit value written in one cycle through both ports) are
// the architecture's; depth, read-first and collision behaviour are choices
// of this design.
module dp_ram #(
  parameter int unsigned WIDTH = 18,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr_a,
  input  logic             we_a,
  input  logic [WIDTH-1:0] din_a,
  output logic [WIDTH-1:0] dout_a,
  input  logic [AW-1:0]    addr_b,
  input  logic             we_b,
  input  logic [WIDTH-1:0] din_b,
  output logic [WIDTH-1:0] dout_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    dout_a <= mem[addr_a];
    dout_b <= mem[addr_b];
    if (we_a) mem[addr_a] <= din_a;
    if (we_b) mem[addr_b] <= din_b;
  end

endmodule

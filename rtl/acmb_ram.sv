// acmb_ram: the semiconductor RAM array inside one memory module.
//
// One read/write port with a registered read: rdata shows the word at addr
// one clock after a cycle with en=1 and we=0. A cycle with en=1 and we=1
// stores wdata at addr. Each word is WIDTH bits; a memory module uses
// 24 data bits plus one parity bit. The bus carries up to 24 data bits per
// location; the array depth per module is a parameter (the specification
// leaves module capacity open). Written as a plain array so that a synthesis
// tool maps it onto RAM blocks. Contents are not initialised: a module
// clears locations with CLEAR cycles.
module acmb_ram #(
  parameter int unsigned ADDR_BITS = 16,
  parameter int unsigned WIDTH     = 25
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic                 we,
  input  logic [ADDR_BITS-1:0] addr,
  input  logic [WIDTH-1:0]     wdata,
  output logic [WIDTH-1:0]     rdata
);
  logic [WIDTH-1:0] mem [2**ADDR_BITS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule

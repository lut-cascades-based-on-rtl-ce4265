// lut_ram: the memory of one LUT of a cascade (or of the translation
// memory). 2^AW words of DW bits, LANES read ports with a registered output
// (one cycle, like a block RAM) and one write port.
//
// Reads are write-before-read: a read of the address being written in the
// same cycle returns the new word. This is what lets an update ride through
// the pipeline as a write bubble and be seen by every lookup behind it.
// Two read ports model the dual-port use of the block RAMs (two headers per
// clock); the write port is the update path. Contents start at zero, which
// makes every cascade map every key to index 0 and so every header to the
// default rule 0 until the tables are loaded.
module lut_ram #(
  parameter int unsigned AW    = 4,
  parameter int unsigned DW    = 8,
  parameter int unsigned LANES = 2
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr [LANES],
  output logic [DW-1:0] rdata [LANES]
);

  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  for (genvar l = 0; l < LANES; l++) begin : g_rd
    always_ff @(posedge clk) begin
      if (we && (waddr == raddr[l])) rdata[l] <= wdata;
      else                           rdata[l] <= mem[raddr[l]];
    end
  end

endmodule

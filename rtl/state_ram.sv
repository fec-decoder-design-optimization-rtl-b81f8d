// state_ram: one 32 x 6 state metric RAM.
//
// Single-port synchronous RAM: in each cycle it either writes 'wdata' at
// 'addr' (we = 1) or, with en = 1 and we = 0, reads 'addr' into 'rdata',
// which is valid in the next cycle and holds until the next read. The
// decoder uses two of them, one for the metrics of even-parity states and
// one for odd-parity states, and alternates read and write cycles on them.
// Size and the even/odd split follow the document (which used pseudo-static
// RAM); the synchronous single-port behaviour is this design's choice.
// Contents are not reset.
module state_ram #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 6
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule

// trellis_ram: byte-addressable trellis (survivor pointer) memory.
//
// Every trellis step stores 64 pointer bits, one per state, as 8 bytes:
// byte b of a step holds the pointers of states 8b..8b+7, bit s[2:0] for
// state s. The address is {step slot, byte}. The RAM has one port, shared
// by the state metric unit's writes and the traceback's reads, which are
// interleaved within each information bit period. A read issued in cycle n
// delivers its byte in cycle n+1; 'rdata' holds until the next read. The
// byte organisation and the shared port follow the document; the number of
// steps held (TM_STEPS) is this design's choice. Contents are not reset.
module trellis_ram #(
  parameter int unsigned TM_STEPS = 64
) (
  input  logic                            clk,
  input  logic                            en,
  input  logic                            we,
  input  logic [$clog2(TM_STEPS*8)-1:0]   addr,
  input  logic [7:0]                      wdata,
  output logic [7:0]                      rdata
);

  logic [7:0] mem [TM_STEPS*8];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule

// traceback: follows the survivor path back through the trellis memory and
// releases one decoded bit per run.
//
// A run starts at the best state of the newest trellis step. The address
// generator is a 6-bit shift register holding the current state s: the
// pointer bit of s, read from byte s[5:3] of the current step, says whether
// s came from 2s or 2s+1, so the predecessor is the register shifted left by
// one with the pointer bit entering at the bottom. After 'depth' steps back
// the bit shifted out of the top on the last step, which is the information
// bit of the oldest step visited, is the decoded output. Each read address
// depends on the previous read's data; with a one-cycle memory the unit
// issues a read every cycle it is granted the shared trellis memory port.
// The shift-register address generator, the start at the best state and the
// full-depth search follow the document; the request/grant port sharing and
// the run-time depth input are this design's own.
//
// Timing: 'start' loads the state and slot; reads follow in the cycles where
// 'grant' is high, from the cycle after 'start'. 'bit_valid' is a one-cycle
// pulse, depth+2 cycles after 'start' when never stalled and one cycle later
// for every cycle without grant.
module traceback
  import fec_pkg::*;
#(
  parameter int unsigned TM_STEPS = 64
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            start,
  input  state_t                          start_state,
  input  logic [$clog2(TM_STEPS)-1:0]     start_slot,   // newest step
  input  logic [6:0]                      depth,        // 1 .. TM_STEPS-1
  output logic                            busy,
  output logic                            rd_req,
  output logic [$clog2(TM_STEPS*8)-1:0]   rd_addr,
  input  logic                            grant,
  input  logic [7:0]                      rdata,
  output logic                            bit_valid,
  output logic                            bit_out
);

  localparam int unsigned SLW = $clog2(TM_STEPS);

  state_t         sreg;       // address shift register
  logic [SLW-1:0] slot;
  logic [6:0]     issued, returned;
  logic           pend;

  state_t s_cur;
  assign s_cur   = pend ? {sreg[4:0], rdata[sreg[2:0]]} : sreg;
  assign rd_req  = busy && (issued < depth);
  assign rd_addr = {slot, s_cur[5:3]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; sreg <= '0; slot <= '0; issued <= '0; returned <= '0;
      pend <= 1'b0; bit_valid <= 1'b0; bit_out <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      if (start && !busy) begin
        busy     <= 1'b1;
        sreg     <= start_state;
        slot     <= start_slot;
        issued   <= '0;
        returned <= '0;
        pend     <= 1'b0;
      end else if (busy) begin
        sreg <= s_cur;
        pend <= rd_req && grant;
        if (rd_req && grant) begin
          issued <= issued + 7'd1;
          slot   <= slot - 1'b1;
        end
        if (pend) begin
          returned <= returned + 7'd1;
          if (returned + 7'd1 == depth) begin
            bit_valid <= 1'b1;
            bit_out   <= sreg[5];
            busy      <= 1'b0;
          end
        end
      end
    end
  end

endmodule

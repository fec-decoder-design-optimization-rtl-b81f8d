// decoder_control: sequencing of one information bit period and sharing of
// the trellis memory port.
//
// For every symbol pair the controller takes the pair from the input side,
// has the branch metrics computed, and then starts two concurrent tasks: the
// state metric unit (new metrics and pointers of step t) and the traceback
// (from the best state of step t-1 back over 'depth' steps, giving the bit
// of step t-depth). It waits for both to finish before taking the next
// pair. Trellis memory accesses are interleaved on one port: a pointer write
// always wins, and the traceback read waits for a free cycle. Traceback only
// runs once 'depth' steps have been stored since the frame started, so every
// decoded bit it releases belongs to the current frame. Depth is TB_DEPTH_R12
// at rate 1/2 and TB_DEPTH_R34 at rate 3/4. Running both tasks concurrently,
// the interleaved memory and the longer rate 3/4 depth follow the document;
// the depths, the handshakes and the frame rules are this design's choices.
//
// Timing: IDLE (pair taken, metrics computed) -> START -> RUN -> IDLE; with
// a pair always waiting a step takes 71 cycles.
module decoder_control
  import fec_pkg::*;
#(
  parameter int unsigned TM_STEPS     = 64,
  parameter int unsigned TB_DEPTH_R12 = 35,
  parameter int unsigned TB_DEPTH_R34 = 56
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            frame_start,
  input  logic                            rate34,
  // symbol pair side
  input  logic                            pair_valid,
  output logic                            pair_ready,
  output logic                            bm_load,
  // state metric unit
  output logic                            smu_start,
  output logic [$clog2(TM_STEPS)-1:0]     smu_slot,
  input  logic                            smu_done,
  input  logic                            smu_busy,
  // traceback
  output logic                            tb_start,
  output logic [$clog2(TM_STEPS)-1:0]     tb_slot,
  output logic [6:0]                      tb_depth,
  input  logic                            tb_busy,
  // trellis memory port
  input  logic                            tw_req,
  input  logic [$clog2(TM_STEPS*8)-1:0]   tw_addr,
  input  logic                            tr_req,
  input  logic [$clog2(TM_STEPS*8)-1:0]   tr_addr,
  output logic                            tr_grant,
  output logic                            tm_en,
  output logic                            tm_we,
  output logic [$clog2(TM_STEPS*8)-1:0]   tm_addr
);

  localparam int unsigned SLW = $clog2(TM_STEPS);

  typedef enum logic [1:0] {S_IDLE, S_START, S_RUN} st_e;
  st_e st;

  logic [15:0]    t;       // steps done in this frame (wraps)
  logic [SLW-1:0] slot;    // trellis slot of the next step
  logic [6:0]     fill;    // steps stored, saturating at 127
  assign tb_depth   = rate34 ? 7'(TB_DEPTH_R34) : 7'(TB_DEPTH_R12);

  assign pair_ready = (st == S_IDLE) && !frame_start;
  assign bm_load    = pair_valid && pair_ready;
  assign smu_start  = (st == S_START);
  assign smu_slot   = slot;
  assign tb_start   = (st == S_START) && (fill >= tb_depth);
  assign tb_slot    = slot - 1'b1;

  // Shared trellis port: writes have priority.
  assign tr_grant = !tw_req;
  assign tm_en    = tw_req || tr_req;
  assign tm_we    = tw_req;
  assign tm_addr  = tw_req ? tw_addr : tr_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; t <= '0; slot <= '0; fill <= '0;
    end else if (frame_start) begin
      st <= S_IDLE; t <= '0; slot <= '0; fill <= '0;
    end else begin
      unique case (st)
        S_IDLE:  if (bm_load) st <= S_START;
        S_START: st <= S_RUN;
        S_RUN:   if (!smu_busy && !tb_busy) begin
                   st <= S_IDLE;
                   t    <= t + 16'd1;
                   slot <= slot + 1'b1;
                   fill <= (fill == 7'h7F) ? fill : fill + 7'd1;
                 end
        default: st <= S_IDLE;
      endcase
    end
  end

  // A state metric step only ends while the controller waits for it.
  assert property (@(posedge clk) disable iff (!rst_n) smu_done |-> st == S_RUN);

endmodule

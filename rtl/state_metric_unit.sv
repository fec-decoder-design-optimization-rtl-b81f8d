// state_metric_unit: computes all 64 new state metrics and trellis pointers
// of one information bit with two ALUs and two 32 x 6 state RAMs.
//
// Butterfly p (p = 0..31) reads the metrics of states 2p and 2p+1 and
// produces states p (ALU 0) and p+32 (ALU 1), Eq. 3-8. The metric of state
// s lives in the even RAM if s has an even number of one bits and in the odd
// RAM otherwise, so the two predecessors of a butterfly, and its two
// results, always sit in different RAMs: every butterfly is one read and one
// write on each RAM. The results are written back in place, to the very
// addresses just read. To make that consistent from step to step, the word
// address of state s after g steps is bits [5:1] of s rotated left by
// (g mod 6) places: in-place writing of the shuffle turns into a rotation of
// the state number, which the 'rot' counter tracks.
//
// Pipeline (2 cycles per butterfly, RAM bus busy every cycle):
//   cycle 2n   : RD(n)   and SEL(n-1)
//   cycle 2n+1 : ADD(n)  and WR(n-1)
// so one step takes 64 cycles of ACS work, plus 2 cycles of pipeline drain
// and 2 cycles for the last two trellis bytes: 'done' pulses 68 clocks
// after the clock edge that samples 'start', and 'busy' falls with it. Metrics read are normalised by subtracting the smallest
// metric of the previous step; ALU results saturate at 63. In the first step
// of a frame the RAM contents are replaced by 0 for state 0 and INIT_METRIC
// for every other state, since the encoder starts in state 0. Pointer bits
// are packed into bytes (byte b = states 8b..8b+7) and written to the
// trellis memory through tw_*; the bytes for states p..p+7 and p+32..p+39
// leave right after butterfly p+7.
//
// Follows the document: two ALUs, two 32 x 6 RAMs split by state parity,
// the RD/ADD/SEL/WR pipeline, best state search, byte-wide pointer storage.
// This design's own: the rotating address map, normalisation by the
// previous minimum, saturation, the frame-start initialisation.
module state_metric_unit
  import fec_pkg::*;
#(
  parameter int unsigned TM_STEPS    = 64,
  parameter int unsigned INIT_METRIC = 63
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            frame_start,
  input  logic                            start,
  input  logic [$clog2(TM_STEPS)-1:0]     slot,
  input  bm_t                             bm [4],
  output logic                            busy,
  output logic                            done,
  output state_t                          best_state,
  output logic                            tw_req,
  output logic [$clog2(TM_STEPS*8)-1:0]   tw_addr,
  output logic [7:0]                      tw_data
);

  localparam int unsigned SLW = $clog2(TM_STEPS);
  localparam logic [6:0]  LAST_CYC = 7'd67;

  typedef struct packed {
    logic [4:0] p;
    logic       par;
    logic [4:0] a0;   // address used on the even RAM
    logic [4:0] a1;   // address used on the odd RAM
  } bfly_t;

  logic [6:0]     cyc;
  logic           first;       // first step of a frame
  logic [2:0]     rot;         // generation of the stored metrics, mod 6
  sm_t            min_prev;
  logic [SLW-1:0] slot_q;

  // ---------------- cycle decode ----------------
  logic do_rd, do_add, do_sel, do_wr;
  always_comb begin
    do_rd  = busy && !cyc[0] && (cyc < 7'd64);
    do_add = busy &&  cyc[0] && (cyc < 7'd64);
    do_sel = busy && !cyc[0] && (cyc >= 7'd2) && (cyc <= 7'd64);
    do_wr  = busy &&  cyc[0] && (cyc >= 7'd3) && (cyc <= 7'd65);
  end

  // ---------------- address generation (RD) ----------------
  bfly_t rd_info, st_a, st_b;
  always_comb begin
    logic [4:0] p;
    logic [4:0] la, lb;
    logic       unused_a, unused_b;
    p  = cyc[5:1];
    {la, unused_a} = rotl({p, 1'b0}, rot);
    {lb, unused_b} = rotl({p, 1'b1}, rot);
    rd_info.p   = p;
    rd_info.par = ^p;
    rd_info.a0  = rd_info.par ? lb : la;
    rd_info.a1  = rd_info.par ? la : lb;
  end

  // ---------------- state RAMs ----------------
  logic       ram_en, ram_we;
  logic [4:0] ram_a0, ram_a1;
  sm_t        wd0, wd1, rd0, rd1;
  sm_t        alu0_s, alu1_s;
  logic       alu0_d, alu1_d;

  assign ram_en = do_rd || do_wr;
  assign ram_we = do_wr;
  assign ram_a0 = do_wr ? st_b.a0 : rd_info.a0;
  assign ram_a1 = do_wr ? st_b.a1 : rd_info.a1;
  assign wd0    = st_b.par ? alu1_s : alu0_s;
  assign wd1    = st_b.par ? alu0_s : alu1_s;

  state_ram #(.DEPTH(32), .WIDTH(SM_W)) u_even (
    .clk, .en(ram_en), .we(ram_we), .addr(ram_a0), .wdata(wd0), .rdata(rd0));
  state_ram #(.DEPTH(32), .WIDTH(SM_W)) u_odd (
    .clk, .en(ram_en), .we(ram_we), .addr(ram_a1), .wdata(wd1), .rdata(rd1));

  // ---------------- operand preparation (ADD) ----------------
  sm_t        sa, sb;
  logic [1:0] cw;
  bm_t        m_i, m_j;
  always_comb begin
    sm_t ra, rb;
    ra = st_a.par ? rd1 : rd0;   // metric of state 2p
    rb = st_a.par ? rd0 : rd1;   // metric of state 2p+1
    if (first) begin
      sa = (st_a.p == 5'd0) ? sm_t'(0) : sm_t'(INIT_METRIC);
      sb = sm_t'(INIT_METRIC);
    end else begin
      sa = ra - min_prev;
      sb = rb - min_prev;
    end
    cw  = base_codeword(st_a.p);
    m_i = bm[cw];
    m_j = bm[~cw];
  end

  acs_alu u_alu0 (
    .clk, .rst_n, .add_en(do_add), .sa(sa), .sb(sb), .ma(m_i), .mb(m_j),
    .sel_en(do_sel), .s_new(alu0_s), .dec(alu0_d));
  acs_alu u_alu1 (
    .clk, .rst_n, .add_en(do_add), .sa(sa), .sb(sb), .ma(m_j), .mb(m_i),
    .sel_en(do_sel), .s_new(alu1_s), .dec(alu1_d));

  // ---------------- best state (WR) ----------------
  sm_t    cur_min;
  state_t cur_best;
  best_state u_best (
    .clk, .rst_n, .clr(do_wr && cyc == 7'd3), .upd(do_wr),
    .ma(alu0_s), .sta({1'b0, st_b.p}), .mb(alu1_s), .stb({1'b1, st_b.p}),
    .min_metric(cur_min), .best(cur_best));

  // ---------------- pointer packing ----------------
  logic [6:0] lo_acc, hi_acc;
  logic [7:0] q_lo, q_hi;
  logic [1:0] q_idx;
  logic [1:0] q_cnt;

  assign tw_req  = (q_cnt != 2'd0);
  assign tw_data = (q_cnt == 2'd2) ? q_lo : q_hi;
  assign tw_addr = {slot_q, (q_cnt == 2'd2) ? {1'b0, q_idx} : {1'b1, q_idx}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; cyc <= '0;
      first <= 1'b1; rot <= 3'd5; min_prev <= '0; slot_q <= '0;
      st_a <= '0; st_b <= '0;
      lo_acc <= '0; hi_acc <= '0; q_lo <= '0; q_hi <= '0; q_idx <= '0; q_cnt <= '0;
      best_state <= '0;
    end else begin
      done <= 1'b0;
      if (frame_start) begin
        first <= 1'b1;
        rot   <= 3'd5;
      end
      if (start && !busy) begin
        busy   <= 1'b1;
        cyc    <= '0;
        slot_q <= slot;
      end else if (busy) begin
        cyc <= cyc + 7'd1;
        if (cyc == LAST_CYC) begin
          busy        <= 1'b0;
          done        <= 1'b1;
          first       <= 1'b0;
          rot         <= (rot == 3'd5) ? 3'd0 : rot + 3'd1;
          min_prev    <= cur_min;
          best_state  <= cur_best;
        end
      end
      if (do_rd)  st_a <= rd_info;
      if (do_add) st_b <= st_a;
      // trellis byte queue: lo byte first, then hi byte
      if (tw_req) q_cnt <= q_cnt - 2'd1;
      if (do_wr) begin
        if (st_b.p[2:0] != 3'd7) begin
          lo_acc[st_b.p[2:0]] <= alu0_d;
          hi_acc[st_b.p[2:0]] <= alu1_d;
        end
        if (st_b.p[2:0] == 3'd7) begin
          q_lo  <= {alu0_d, lo_acc[6:0]};
          q_hi  <= {alu1_d, hi_acc[6:0]};
          q_idx <= st_b.p[4:3];
          q_cnt <= 2'd2;
        end
      end
    end
  end

  // The byte queue is always empty when a new group of 8 completes.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (do_wr && st_b.p[2:0] == 3'd7) |-> (q_cnt == 2'd0));

endmodule

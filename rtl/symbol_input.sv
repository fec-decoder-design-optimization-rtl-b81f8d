// symbol_input: demodulator interface and depuncturer.
//
// The demodulator delivers 3-bit sign-magnitude soft symbols either one at a
// time (serial format, BPSK) or as an I/Q pair (parallel format, QPSK). Each
// symbol may carry an external puncture flag, which marks it as a dummy to be
// ignored. Symbols go into a small buffer; the output side takes them out as
// decoder symbol pairs. In rate 1/2 mode every pair uses two buffered
// symbols. In rate 3/4 mode the puncture pattern I = 110, Q = 101 is undone:
// per three information bits the channel carries I0 Q0 I1 Q2, and the output
// is the three pairs (I0,Q0), (I1,-), (-,Q2), where '-' is an erased
// position. The puncture pattern and the two input formats follow the
// document; the buffer, its depth, the valid/ready output and the sticky
// overflow flag are this design's own choices.
//
// Timing: a symbol pushed in cycle n can leave as part of a pair from cycle
// n+1. frame_start empties the buffer and restarts the puncture phase. A
// symbol that does not fit is dropped and sets 'overflow' until frame_start.
module symbol_input
  import fec_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  frame_start,
  input  logic  rate34,        // 1: rate 3/4 punctured stream
  input  logic  serial_mode,   // 1: one symbol per strobe on sym_i
  input  logic  sym_valid,
  input  sym_t  sym_i,
  input  sym_t  sym_q,
  input  logic  punct_i,
  input  logic  punct_q,
  output logic  pair_valid,
  input  logic  pair_ready,
  output pair_t pair,
  output logic  overflow
);

  localparam int unsigned AW = $clog2(FIFO_DEPTH);

  typedef struct packed {
    sym_t s;
    logic era;
  } entry_t;

  entry_t            mem [FIFO_DEPTH];
  logic [AW-1:0]     wp, rp;
  logic [AW:0]       cnt;
  logic [1:0]        phase;          // rate 3/4 position within 3 bits

  // Entries offered this cycle.
  logic [1:0]        n_push;
  entry_t            e0, e1;
  always_comb begin
    e0 = '{s: sym_i, era: punct_i};
    e1 = '{s: sym_q, era: punct_q};
    n_push = '0;
    if (sym_valid) n_push = serial_mode ? 2'd1 : 2'd2;
  end

  // Entries needed for the next output pair.
  logic [1:0] n_need;
  always_comb begin
    if (!rate34 || phase == 2'd0) n_need = 2'd2;
    else                          n_need = 2'd1;
  end

  entry_t h0, h1;
  assign h0 = mem[rp];
  assign h1 = mem[AW'(rp + 1'b1)];

  assign pair_valid = (cnt >= {{(AW-1){1'b0}}, n_need});

  always_comb begin
    pair = '0;
    if (!rate34 || phase == 2'd0) begin
      pair.i = h0.s; pair.era_i = h0.era;
      pair.q = h1.s; pair.era_q = h1.era;
    end else if (phase == 2'd1) begin
      pair.i = h0.s; pair.era_i = h0.era;
      pair.q = '0;   pair.era_q = 1'b1;
    end else begin
      pair.i = '0;   pair.era_i = 1'b1;
      pair.q = h0.s; pair.era_q = h0.era;
    end
  end

  logic          pop;
  logic [1:0]    n_pop;
  logic [AW:0]   space;
  logic          fits;
  assign pop   = pair_valid && pair_ready;
  assign n_pop = pop ? n_need : 2'd0;
  assign space = (AW+1)'(FIFO_DEPTH) - cnt + {{(AW-1){1'b0}}, n_pop};
  assign fits  = space >= {{(AW-1){1'b0}}, n_push};

  // Buffer storage (not reset; only entries counted in 'cnt' are read).
  always_ff @(posedge clk) begin
    if (!frame_start && n_push != 0 && fits) begin
      mem[wp] <= e0;
      if (n_push == 2'd2) mem[AW'(wp + 1'b1)] <= e1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0; phase <= '0; overflow <= 1'b0;
    end else if (frame_start) begin
      wp <= '0; rp <= '0; cnt <= '0; phase <= '0; overflow <= 1'b0;
    end else begin
      if (n_push != 0) begin
        if (fits) begin
          wp <= AW'(wp + n_push);
        end else begin
          overflow <= 1'b1;
        end
      end
      if (pop) begin
        rp <= AW'(rp + n_pop);
        if (rate34) phase <= (phase == 2'd2) ? 2'd0 : phase + 2'd1;
      end
      cnt <= cnt - {{(AW-1){1'b0}}, n_pop}
                 + ((n_push != 0 && fits) ? {{(AW-1){1'b0}}, n_push} : '0);
    end
  end

  // The buffer must never report more entries than it holds.
  property p_cnt_bound;
    @(posedge clk) disable iff (!rst_n) cnt <= (AW+1)'(FIFO_DEPTH);
  endproperty
  assert property (p_cnt_bound);

endmodule

// acs_alu: one add-compare-select unit of the state metric datapath.
//
// It computes one new state metric S = min(A + Ma, B + Mb) (Eq. 3-8), where
// A and B are the already normalised metrics of the two predecessor states
// 2p and 2p+1 and Ma, Mb their branch metrics, and returns the decision bit
// (0: the path came from 2p, 1: from 2p+1; ties go to 2p). The work is split
// over two pipeline stages as in the document's ALU pipeline: ADD registers
// the two sums, SEL registers the comparison result. The new metric
// saturates at the largest 6-bit value; that overflow guard (together with
// the normalisation done before the ALU) is this design's own choice.
//
// Timing: operands presented with add_en in cycle n give sums in n+1; with
// sel_en in that cycle the metric and decision are valid from n+2.
module acs_alu
  import fec_pkg::*;
#(
  parameter int unsigned SM_W_P = SM_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              add_en,
  input  logic [SM_W_P-1:0] sa,     // metric of predecessor 2p
  input  logic [SM_W_P-1:0] sb,     // metric of predecessor 2p+1
  input  bm_t               ma,     // branch metric from 2p
  input  bm_t               mb,     // branch metric from 2p+1
  input  logic              sel_en,
  output logic [SM_W_P-1:0] s_new,
  output logic              dec
);

  localparam int unsigned XW = SM_W_P + 1;
  localparam logic [SM_W_P-1:0] SMAX = '1;

  logic [XW-1:0] x_q, y_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0; y_q <= '0;
    end else if (add_en) begin
      x_q <= XW'(sa) + XW'(ma);
      y_q <= XW'(sb) + XW'(mb);
    end
  end

  logic          pick_b;
  logic [XW-1:0] win;
  assign pick_b = (y_q < x_q);
  assign win    = pick_b ? y_q : x_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_new <= '0; dec <= 1'b0;
    end else if (sel_en) begin
      s_new <= win[XW-1] ? SMAX : win[SM_W_P-1:0];
      dec   <= pick_b;
    end
  end

endmodule

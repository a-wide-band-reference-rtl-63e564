// mdqfd: two-phase modified digital quadricorrelator, the fine frequency
// detector.
//
// On every rising data edge the in-phase and quadrature clocks are sampled
// (Q1 <= CKI, Q2 <= CKQ) and the previous samples move on (Q3 <= Q1,
// Q4 <= Q2). The pair (CKI, CKQ) splits each clock period into four states:
// 1 = (1,0), 2 = (1,1), 3 = (0,1), 4 = (0,0), in order of time. At lock
// consecutive data edges see the same state. A data edge that first falls in
// state 2 and next in state 1 has moved earlier in the clock period, so the
// data is faster than the clock and UP_F is raised; a move from state 2 to
// state 3 means the data is slower and raises DN_F. Each output holds until the
// next rising data edge.
// The four data-clocked flip-flops follow the published circuit. The gate
// equations are written from the published state diagram and its state-2 to
// state-3 rule for DN: the earlier sample (Q3,Q4) must be state 2 and the later
// (Q1,Q2) state 1 for UP or state 3 for DN. No reset: the outputs are valid
// after two rising data edges.
`timescale 1ps / 1fs
module mdqfd
  import fll_pkg::*;
(
  input  logic  data,  // serial data, its rising edges clock the samplers
  input  logic  cki,   // in-phase half-rate clock
  input  logic  ckq,   // quadrature clock (lags CKI by a quarter period)
  output updn_t fine   // UP_F / DN_F
);

  logic q1, q2, q3, q4;

  always_ff @(posedge data) begin
    q1 <= cki;
    q2 <= ckq;
    q3 <= q1;
    q4 <= q2;
  end

  always_comb begin
    fine.up =  q1 & ~q2 & q3 & q4;   // state 2 -> state 1
    fine.dn = ~q1 &  q2 & q3 & q4;   // state 2 -> state 3
  end

endmodule

// clock_recovery: rebuilds the bit clock (sync) and a clock at twice the bit
// rate (dbl) from the edge counters and the half-cycle estimates.
//
// The rules follow the original description:
//   - right after any Manchester edge (either counter reads 0) both sync and
//     dbl are inverted;
//   - otherwise the counter of the most recent edge is used (pos_cnt when
//     pos_cnt < neg_cnt, with hc1; neg_cnt otherwise, with hc2). When it
//     reaches hc + jitter no boundary edge has come, so the bit boundary is
//     marked by inverting both sync and dbl;
//   - when it reaches a quarter (hc/2) or three quarters (3*hc/2) of the
//     Manchester period, only dbl is inverted.
// The half-cycle and quarter rules wait for a valid estimate of the
// polarity in use; edge-driven inversions work from the first edge on.
//
// Both outputs reset to 0 and the first edge is taken as a mid-bit
// (significant) one, so sync rises right after every mid-bit edge and falls
// at every bit boundary. dbl rises at the first edge and, as no estimate
// exists yet, stays high for that whole half-cycle; from the second edge on it
// falls at every edge and bit boundary and rises a quarter bit later. When a
// boundary has no edge, both are inverted jitter cycles late, so their high
// pulses before it are longer than normal, as in the original description.
// The reset values are this design's choice.
//
// Timing: outputs are registered; they change two CLK cycles after the edge
// strobe of edge_counters (counter cleared, then output toggled).
module clock_recovery #(
  parameter int unsigned CNT_W = manch_pkg::CNT_W_DEFAULT
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [CNT_W-1:0] pos_cnt,
  input  logic [CNT_W-1:0] neg_cnt,
  input  logic [CNT_W-1:0] hc1,
  input  logic [CNT_W-1:0] hc2,
  input  logic [CNT_W-1:0] jitter,
  input  logic             hc1_valid,
  input  logic             hc2_valid,
  output logic             sync,      // recovered bit clock (SYNC)
  output logic             dbl        // doubled-rate clock (DBL_BSB)
);

  logic             last_pos;          // most recent edge was rising
  logic [CNT_W-1:0] cnt;               // cycles since the most recent edge
  logic [CNT_W-1:0] hc;                // half-cycle belonging to that edge
  logic             hc_ok;
  logic             edge_seen;         // an edge happened one cycle ago
  logic             boundary;          // missing boundary edge: hc + jitter
  logic             quarter;           // 1/4 or 3/4 of the Manchester period
  logic [CNT_W+1:0] t_boundary, t_q1, t_q3;

  always_comb begin
    last_pos   = pos_cnt < neg_cnt;
    cnt        = last_pos ? pos_cnt   : neg_cnt;
    hc         = last_pos ? hc1       : hc2;
    hc_ok      = last_pos ? hc1_valid : hc2_valid;
    t_boundary = {2'b00, hc} + {2'b00, jitter};
    t_q1       = {3'b000, hc[CNT_W-1:1]};
    t_q3       = {2'b00, hc} + {3'b000, hc[CNT_W-1:1]};
    edge_seen  = (pos_cnt == '0) || (neg_cnt == '0);
    boundary   = hc_ok && ({2'b00, cnt} == t_boundary);
    quarter    = hc_ok && ({2'b00, cnt} == t_q1 || {2'b00, cnt} == t_q3);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sync <= 1'b0;
      dbl  <= 1'b0;
    end else if (edge_seen || boundary) begin
      sync <= !sync;
      dbl  <= !dbl;
    end else if (quarter) begin
      dbl  <= !dbl;
    end
  end

endmodule

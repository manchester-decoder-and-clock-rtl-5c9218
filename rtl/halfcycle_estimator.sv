// halfcycle_estimator: tracks the Manchester half-cycle length in CLK cycles.
//
// Two estimates are kept, as in the original description: hc1 is updated on
// rising edges of the line from the time since the last falling edge
// (neg_cnt + 1), and hc2 on falling edges from the time since the last
// rising edge (pos_cnt + 1). Each is checked against the other estimate:
//   - interval m in [other - jitter, other + jitter]        -> store m
//   - m in [2*(other - jitter), 2*(other + jitter)]         -> store m / 2
//   - otherwise (a glitch or a long gap)                     -> keep old value
// A single jitter register, one eighth of the half-cycle just computed
// (truncated), is recomputed on every edge and used by the next one. It is
// CNT_W bits wide for simple arithmetic; its top three bits are always 0.
//
// Start-up: the first edge after reset only arms the estimator (there is no
// earlier edge to measure from). The interval between the first and second
// edges is taken as one half-cycle without any check, which is right when the
// first two data bits are equal, as the original design requires. The
// estimate of a polarity is marked valid from its first update on.
//
// An interval that saturated the counter is ignored. All updates are
// registered: new values are visible the cycle after the edge strobe, which
// is the same cycle in which the edge's counter reads 0.
//
// The half-range test and the handling of out-of-range intervals are this
// design's reading where the description is incomplete.
module halfcycle_estimator
  import manch_pkg::*;
#(
  parameter int unsigned CNT_W = manch_pkg::CNT_W_DEFAULT
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             pos_edge,
  input  logic             neg_edge,
  input  logic [CNT_W-1:0] pos_cnt,
  input  logic [CNT_W-1:0] neg_cnt,
  output logic [CNT_W-1:0] hc1,        // half-cycle measured on rising edges
  output logic [CNT_W-1:0] hc2,        // half-cycle measured on falling edges
  output logic [CNT_W-1:0] jitter,     // tolerance, hc/8 of the last update
  output logic             hc1_valid,
  output logic             hc2_valid
);

  logic             seen_edge;   // at least one edge since reset
  logic [CNT_W-1:0] m_pos;       // interval ending at this rising edge
  logic [CNT_W-1:0] m_neg;       // interval ending at this falling edge
  upd_e             kind_pos, kind_neg;
  logic [CNT_W-1:0] new_hc1, new_hc2;

  // Classify interval m against the reference estimate ref_hc +/- jit.
  function automatic upd_e classify(input logic [CNT_W-1:0] m,
                                    input logic [CNT_W-1:0] ref_hc,
                                    input logic             ref_valid,
                                    input logic [CNT_W-1:0] jit,
                                    input logic             armed,
                                    input logic [CNT_W-1:0] cnt);
    logic [CNT_W+1:0] lo, hi;
    lo = (ref_hc > jit) ? {2'b00, ref_hc - jit} : '0;
    hi = {2'b00, ref_hc} + {2'b00, jit};
    if (!armed || cnt == '1)                    return UPD_HOLD;
    if (!ref_valid)                             return UPD_INIT;
    if ({2'b00, m} >= lo && {2'b00, m} <= hi)   return UPD_SINGLE;
    if ({2'b00, m} >= (lo << 1) && {2'b00, m} <= (hi << 1))
                                                return UPD_DOUBLE;
    return UPD_HOLD;
  endfunction

  function automatic logic [CNT_W-1:0] apply(input upd_e             kind,
                                             input logic [CNT_W-1:0] m,
                                             input logic [CNT_W-1:0] old);
    case (kind)
      UPD_SINGLE, UPD_INIT: return m;
      UPD_DOUBLE:           return m >> 1;
      default:              return old;
    endcase
  endfunction

  always_comb begin
    m_pos    = neg_cnt + 1'b1;
    m_neg    = pos_cnt + 1'b1;
    kind_pos = classify(m_pos, hc2, hc2_valid, jitter, seen_edge, neg_cnt);
    kind_neg = classify(m_neg, hc1, hc1_valid, jitter, seen_edge, pos_cnt);
    new_hc1  = apply(kind_pos, m_pos, hc1);
    new_hc2  = apply(kind_neg, m_neg, hc2);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      seen_edge <= 1'b0;
      hc1       <= '0;
      hc2       <= '0;
      jitter    <= '0;
      hc1_valid <= 1'b0;
      hc2_valid <= 1'b0;
    end else if (pos_edge) begin
      seen_edge <= 1'b1;
      hc1       <= new_hc1;
      jitter    <= new_hc1 >> 3;
      if (kind_pos != UPD_HOLD) hc1_valid <= 1'b1;
    end else if (neg_edge) begin
      seen_edge <= 1'b1;
      hc2       <= new_hc2;
      jitter    <= new_hc2 >> 3;
      if (kind_neg != UPD_HOLD) hc2_valid <= 1'b1;
    end
  end

  // The two strobes come from one line and can never be high together.
  a_one_edge : assert property (@(posedge clk) disable iff (rst)
                                !(pos_edge && neg_edge));

endmodule

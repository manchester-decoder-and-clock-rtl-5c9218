// mydecoder: Manchester decoder and clock recovery module.
//
// A Manchester line (MANCH) is oversampled by a free-running clock (CLK).
// The time between consecutive line edges is measured with two counters, one
// cleared by rising and one by falling edges; from these the half-cycle
// length of the code is estimated and continuously refined. The recovered
// clocks are produced by inverting them after every line edge and, where a
// bit boundary has no edge, half a cycle (plus a jitter margin) after the
// last one:
//   SYNC       - bit-rate clock; rises just after each mid-bit edge
//   DBL_BSB    - clock at twice the bit rate
//   SERIALDATA - decoded bits, one per SYNC period, valid at SYNC's fall
//
// Structure (all in the CLK domain):
//   edge_counters       synchroniser, edge strobes, pos/neg counters
//   halfcycle_estimator hc1 / hc2 / jitter
//   clock_recovery      SYNC and DBL_BSB
//   bit_decoder         SERIALDATA
//
// Requirements carried over from the original design: the line must idle at
// the level of the first half of the first bit, so that the first edge is a
// mid-bit one, and the first two data bits must be equal, so that the first
// measured interval is one half-cycle. The half-cycle should be at least 8
// CLK cycles for the jitter margin (hc/8) to be non-zero. RST is synchronous
// and active high; it should be held for at least SYNC_STAGES cycles.
module mydecoder #(
  parameter int unsigned          CNT_W       = manch_pkg::CNT_W_DEFAULT,
  parameter int unsigned          SYNC_STAGES = manch_pkg::SYNC_STAGES_DEFAULT,
  parameter manch_pkg::convention_e CONVENTION = manch_pkg::CONV_THOMAS
) (
  input  logic CLK,
  input  logic RST,
  input  logic MANCH,
  output logic SYNC,
  output logic DBL_BSB,
  output logic SERIALDATA
);

  logic             manch_s, pos_edge, neg_edge;
  logic [CNT_W-1:0] pos_cnt, neg_cnt;
  logic [CNT_W-1:0] hc1, hc2, jitter;
  logic             hc1_valid, hc2_valid;

  edge_counters #(.CNT_W(CNT_W), .SYNC_STAGES(SYNC_STAGES)) u_cnt (
    .clk(CLK), .rst(RST), .manch(MANCH),
    .manch_s, .pos_edge, .neg_edge, .pos_cnt, .neg_cnt
  );

  halfcycle_estimator #(.CNT_W(CNT_W)) u_est (
    .clk(CLK), .rst(RST),
    .pos_edge, .neg_edge, .pos_cnt, .neg_cnt,
    .hc1, .hc2, .jitter, .hc1_valid, .hc2_valid
  );

  clock_recovery #(.CNT_W(CNT_W)) u_clk (
    .clk(CLK), .rst(RST),
    .pos_cnt, .neg_cnt, .hc1, .hc2, .jitter, .hc1_valid, .hc2_valid,
    .sync(SYNC), .dbl(DBL_BSB)
  );

  bit_decoder #(.CONVENTION(CONVENTION)) u_dec (
    .clk(CLK), .rst(RST), .manch_s, .sync(SYNC), .data(SERIALDATA)
  );

endmodule

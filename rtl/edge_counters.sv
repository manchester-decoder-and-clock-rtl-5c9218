// edge_counters: Manchester input conditioning and the two edge-interval
// counters.
//
// MANCH is asynchronous to CLK, so it first passes a SYNC_STAGES-deep
// flip-flop synchroniser (this design's addition; the counters themselves
// follow the original description). One more register holds the previous
// synchronised value, and comparing the two gives single-cycle strobes
// pos_edge / neg_edge for rising / falling edges of the line.
//
// pos_cnt is cleared by a rising edge and neg_cnt by a falling edge; otherwise
// each counts CLK cycles and saturates at all ones. A counter reads 0 in the
// cycle right after its edge, so at the moment of a rising edge (pos_edge
// high) neg_cnt + 1 is the number of CLK cycles since the last falling edge,
// and vice versa. Both counters reset to all ones ("no edge seen yet"), which
// keeps the zero test in clock_recovery from firing out of reset.
//
// Reset is synchronous and active high. The synchroniser and the
// previous-value register run during reset, so the line state is tracked and
// no false edge is reported once reset is released.
module edge_counters #(
  parameter int unsigned CNT_W       = manch_pkg::CNT_W_DEFAULT,
  parameter int unsigned SYNC_STAGES = manch_pkg::SYNC_STAGES_DEFAULT
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             manch,     // raw Manchester line
  output logic             manch_s,   // synchronised line
  output logic             pos_edge,  // rising edge seen this cycle
  output logic             neg_edge,  // falling edge seen this cycle
  output logic [CNT_W-1:0] pos_cnt,   // cycles since last rising edge, minus 1
  output logic [CNT_W-1:0] neg_cnt    // cycles since last falling edge, minus 1
);

  logic [SYNC_STAGES-1:0] sync_q;
  logic                   manch_prev;

  always_ff @(posedge clk) begin
    sync_q     <= {sync_q[SYNC_STAGES-2:0], manch};
    manch_prev <= manch_s;
  end

  assign manch_s  = sync_q[SYNC_STAGES-1];
  assign pos_edge = !rst &&  manch_s && !manch_prev;
  assign neg_edge = !rst && !manch_s &&  manch_prev;

  always_ff @(posedge clk) begin
    if (rst)                   pos_cnt <= '1;
    else if (pos_edge)         pos_cnt <= '0;
    else if (pos_cnt != '1)    pos_cnt <= pos_cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst)                   neg_cnt <= '1;
    else if (neg_edge)         neg_cnt <= '0;
    else if (neg_cnt != '1)    neg_cnt <= neg_cnt + 1'b1;
  end

endmodule

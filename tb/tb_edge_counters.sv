// tb_edge_counters: self-checking test of the synchroniser, edge strobes and
// saturating edge-interval counters.
//
// The line is driven with random run lengths (1..12 cycles, plus a few long
// gaps that saturate a 6-bit counter). The reference is a record of the line
// value at every clock edge; from it the expected synchronised line, edge
// strobes and counter values are computed by index arithmetic (a counter
// reads n - k - 2 at clock n for a line edge sampled at clock k, with two
// synchroniser stages), independently of the RTL's own registers.
module tb_edge_counters;
  localparam int unsigned CNT_W = 6;
  localparam int unsigned NCYC  = 6000;
  localparam logic [CNT_W-1:0] CMAX = '1;

  logic clk = 0, rst = 1, manch = 0;
  logic manch_s, pos_edge, neg_edge;
  logic [CNT_W-1:0] pos_cnt, neg_cnt;
  int checks = 0, failures = 0;

  edge_counters #(.CNT_W(CNT_W), .SYNC_STAGES(2)) dut (.*);

  always #5 clk = !clk;

  logic v [0:NCYC+16];
  int   n = 0;             // clock edges since start
  int   last_rise = -1000, last_fall = -1000;
  int   rst_end = 0;       // first clock edge with rst low
  int   sat_seen = 0;

  function automatic logic [CNT_W-1:0] expect_cnt(int k, int now);
    int d;
    if (k < rst_end) return CMAX;          // no edge since reset
    d = now - k - 2;
    if (d < 0) return CMAX;                 // not yet cleared
    if (d >= int'(CMAX)) return CMAX;
    return CNT_W'(d);
  endfunction

  task automatic check(string what, logic [CNT_W-1:0] got, logic [CNT_W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at n=%0d: got %0d expected %0d", what, n, got, exp);
    end
  endtask

  // sample the line and check outputs one step after each clock edge
  always @(posedge clk) begin
    v[n] = manch;
    if (n >= 1 && !rst) begin
      // a line edge sampled at clock k clears its counter at clock k+2
      if (n >= 3 && v[n-2] == 1'b1 && v[n-3] == 1'b0 && n - 2 >= rst_end) last_rise = n - 2;
      if (n >= 3 && v[n-2] == 1'b0 && v[n-3] == 1'b1 && n - 2 >= rst_end) last_fall = n - 2;
    end
    #1;
    if (n >= 3 && !rst) begin
      check("manch_s", {5'b0, manch_s}, {5'b0, v[n-1]});
      check("pos_edge", {5'b0, pos_edge}, {5'b0, v[n-1] & !v[n-2]});
      check("neg_edge", {5'b0, neg_edge}, {5'b0, !v[n-1] & v[n-2]});
    end
    if (n >= 3 && n > rst_end) begin
      check("pos_cnt", pos_cnt, (last_rise >= 0) ? expect_cnt(last_rise, n) : CMAX);
      check("neg_cnt", neg_cnt, (last_fall >= 0) ? expect_cnt(last_fall, n) : CMAX);
      if (pos_cnt == CMAX && last_rise > rst_end) sat_seen++;
    end
    n++;
  end

  initial begin
    int run;
    repeat (6) @(negedge clk);
    rst = 0;
    rst_end = n;
    repeat (4) @(negedge clk);
    for (int i = 0; i < 400; i++) begin
      run = (i % 97 == 50) ? 90 : 1 + int'($urandom_range(11));
      manch = !manch;
      repeat (run) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL counter saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (NCYC + 100));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

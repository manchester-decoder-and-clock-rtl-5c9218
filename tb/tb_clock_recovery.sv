// tb_clock_recovery: self-checking test of SYNC / DBL_BSB generation.
//
// A random Manchester bit stream (half-cycle about 25 cycles, edges moved by
// up to +/-1 cycle) is turned into a list of edge times. The testbench models
// the edge counters itself (a counter reads c - E - 1 in cycle c after an edge
// strobed in cycle E) and drives them with fixed estimates hc1 = 24,
// hc2 = 26, jitter = 3. The expected outputs come from toggle times worked
// out from the edge list: every edge toggles both clocks two cycles later;
// when the gap to the next edge allows it, offset hc+jitter toggles both and
// offsets hc/2 and 3hc/2 toggle DBL_BSB. For the first bits hc1 is marked
// invalid, which must suppress the timed toggles after rising edges. The
// stream must contain both missing-boundary and quarter-point toggles.
module tb_clock_recovery;
  localparam int unsigned CNT_W = 16;
  localparam int NBITS = 200;
  localparam int HC = 25;
  localparam int HC1 = 24, HC2 = 26, JIT = 3;
  localparam int T0 = 20;          // first edge
  localparam int NT = T0 + 2 * HC * (NBITS + 4);

  logic clk = 0, rst = 1;
  logic [CNT_W-1:0] pos_cnt = '1, neg_cnt = '1;
  logic [CNT_W-1:0] hc1 = CNT_W'(HC1), hc2 = CNT_W'(HC2), jitter = CNT_W'(JIT);
  logic hc1_valid = 0, hc2_valid = 1;
  logic sync, dbl;
  int checks = 0, failures = 0;
  int n_boundary = 0, n_quarter = 0;

  clock_recovery #(.CNT_W(CNT_W)) dut (.*);

  always #5 clk = !clk;

  int  e_time[$];                  // edge strobe cycles
  bit  e_rise[$];                  // polarity of each edge
  bit  tog_s [0:NT];               // toggle of sync visible from this cycle
  bit  tog_d [0:NT];
  int  valid_until;                // cycle from which hc1 is valid

  task automatic build_stream();
    bit level, b, prev_b;
    int t, half;
    // line idles at the first half of bit 0 (Thomas: 0 = low-to-high)
    prev_b = 0;
    level  = 0;
    t = T0;
    for (int i = 0; i < NBITS; i++) begin
      b = (i < 2) ? 1'b0 : 1'($urandom_range(1));
      if (i > 0 && b == prev_b) begin
        // boundary edge
        level = !level;
        e_time.push_back(t - HC + int'($urandom_range(2)) - 1);
        e_rise.push_back(level);
      end
      // mid-bit edge
      level = !level;
      e_time.push_back(t + (i == 0 ? 0 : int'($urandom_range(2)) - 1));
      e_rise.push_back(level);
      t += 2 * HC;
      prev_b = b;
    end
  endtask

  task automatic build_expect();
    int e, gap, hc;
    for (int i = 0; i < e_time.size(); i++) begin
      e   = e_time[i];
      gap = (i + 1 < e_time.size()) ? e_time[i+1] - e : 4 * HC;
      hc  = e_rise[i] ? HC1 : HC2;
      tog_s[e + 2] ^= 1; tog_d[e + 2] ^= 1;
      if (e_rise[i] && e + 1 < valid_until) continue;
      if (hc + JIT <= gap - 1) begin
        tog_s[e + 2 + hc + JIT] ^= 1; tog_d[e + 2 + hc + JIT] ^= 1;
        n_boundary++;
      end
      if (hc / 2 <= gap - 1)      begin tog_d[e + 2 + hc / 2] ^= 1;      n_quarter++; end
      if (hc + hc / 2 <= gap - 1) begin tog_d[e + 2 + hc + hc / 2] ^= 1; n_quarter++; end
    end
  endtask

  initial begin
    bit es, ed;
    int last_r, last_f, k;
    build_stream();
    valid_until = e_time[6];
    build_expect();
    repeat (3) @(negedge clk);
    rst = 0;
    es = 0; ed = 0;
    last_r = -1; last_f = -1; k = 0;
    // cycle c runs from posedge c to posedge c+1; drive and check at negedge
    for (int c = 4; c < NT - 4; c++) begin
      @(negedge clk);
      // outputs in this cycle
      es ^= tog_s[c]; ed ^= tog_d[c];
      checks += 2;
      if (sync !== es || dbl !== ed) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: sync %0b/%0b dbl %0b/%0b", c, sync, es, dbl, ed);
      end
      // counters for this cycle
      while (k < e_time.size() && e_time[k] < c) begin
        if (e_rise[k]) last_r = e_time[k]; else last_f = e_time[k];
        k++;
      end
      pos_cnt   = (last_r < 0) ? '1 : CNT_W'(c - last_r - 1);
      neg_cnt   = (last_f < 0) ? '1 : CNT_W'(c - last_f - 1);
      hc1_valid = (c >= valid_until);
    end
    checks++;
    if (n_boundary == 0 || n_quarter == 0) begin
      failures++;
      $display("FAIL mechanisms: boundary=%0d quarter=%0d", n_boundary, n_quarter);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NT + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

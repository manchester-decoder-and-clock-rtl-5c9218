// tb_halfcycle_estimator: self-checking test of the half-cycle estimator.
//
// Edge strobes and counter values are driven directly. A directed part
// checks hand-computed results for start-up (first edge ignored, second
// interval taken as is), acceptance within +/- jitter, halving of a
// two-half-cycle interval, rejection of an out-of-range interval and of a
// saturated counter, and jitter = hc/8. A random part then compares against
// an integer reference model of the same rules.
module tb_halfcycle_estimator;
  localparam int unsigned CNT_W = 16;
  localparam logic [CNT_W-1:0] CMAX = '1;

  logic clk = 0, rst = 1;
  logic pos_edge = 0, neg_edge = 0;
  logic [CNT_W-1:0] pos_cnt = '1, neg_cnt = '1;
  logic [CNT_W-1:0] hc1, hc2, jitter;
  logic hc1_valid, hc2_valid;
  int checks = 0, failures = 0;
  int n_single = 0, n_double = 0, n_hold = 0;

  halfcycle_estimator #(.CNT_W(CNT_W)) dut (.*);

  always #5 clk = !clk;

  // reference model state
  int r_hc1, r_hc2, r_jit;
  bit r_v1, r_v2, r_armed;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic model(bit rising, int m, bit saturated);
    int o, lo, hi, h;
    bit ov;
    o  = rising ? r_hc2 : r_hc1;
    ov = rising ? r_v2  : r_v1;
    h  = rising ? r_hc1 : r_hc2;
    lo = (o > r_jit) ? o - r_jit : 0;
    hi = o + r_jit;
    if (!r_armed || saturated) begin
      n_hold++;
    end else if (!ov) begin
      h = m;
      if (rising) r_v1 = 1; else r_v2 = 1;
    end else if (m >= lo && m <= hi) begin
      h = m; n_single++;
      if (rising) r_v1 = 1; else r_v2 = 1;
    end else if (m >= 2 * lo && m <= 2 * hi) begin
      h = m / 2; n_double++;
      if (rising) r_v1 = 1; else r_v2 = 1;
    end else begin
      n_hold++;
    end
    r_armed = 1;
    if (rising) r_hc1 = h; else r_hc2 = h;
    r_jit = h / 8;
  endtask

  // one edge: m = interval in clock cycles (counter reads m - 1); 0 = saturated
  task automatic do_edge(bit rising, int m);
    logic [CNT_W-1:0] c;
    c = (m == 0) ? CMAX : CNT_W'(m - 1);
    @(negedge clk);
    if (rising) begin pos_edge = 1; neg_cnt = c; end
    else        begin neg_edge = 1; pos_cnt = c; end
    @(negedge clk);
    pos_edge = 0; neg_edge = 0;
    model(rising, m, m == 0);
    chk("hc1", int'(hc1), r_hc1);
    chk("hc2", int'(hc2), r_hc2);
    chk("jitter", int'(jitter), r_jit);
    chk("hc1_valid", int'(hc1_valid), int'(r_v1));
    chk("hc2_valid", int'(hc2_valid), int'(r_v2));
  endtask

  task automatic reset_all();
    rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    r_hc1 = 0; r_hc2 = 0; r_jit = 0; r_v1 = 0; r_v2 = 0; r_armed = 0;
  endtask

  initial begin
    int hc, m;
    bit pol;
    reset_all();
    // directed, with hand-worked expectations
    do_edge(1, 0);      // first edge: nothing known
    chk("start v1", int'(hc1_valid), 0); chk("start v2", int'(hc2_valid), 0);
    do_edge(0, 40);     // start-up interval taken as one half-cycle
    chk("init hc2", int'(hc2), 40); chk("init jit", int'(jitter), 5);
    do_edge(1, 44);     // 40-5 <= 44 <= 40+5
    chk("single hc1", int'(hc1), 44); chk("single jit", int'(jitter), 5);
    do_edge(0, 90);     // 2*(44-5)=78 <= 90 <= 2*(44+5)=98 -> 45
    chk("double hc2", int'(hc2), 45); chk("double jit", int'(jitter), 5);
    do_edge(1, 62);     // neither range -> hold 44
    chk("hold hc1", int'(hc1), 44); chk("hold jit", int'(jitter), 5);
    do_edge(0, 0);      // saturated -> hold 45
    chk("sat hc2", int'(hc2), 45);
    do_edge(1, 39);     // 45-5=40 > 39 -> outside; 2*40=80 > 39 -> hold
    chk("edge hc1", int'(hc1), 44);
    do_edge(1, 50);     // 45+5 = 50 accepted
    chk("upper hc1", int'(hc1), 50); chk("upper jit", int'(jitter), 6);

    // random: drifting half-cycle with jitter, glitches, missing edges
    for (int run = 0; run < 20; run++) begin
      reset_all();
      hc  = 10 + int'($urandom_range(200));
      pol = 1'($urandom_range(1));
      do_edge(pol, 0);
      pol = !pol;
      do_edge(pol, hc);
      for (int i = 0; i < 200; i++) begin
        pol = !pol;
        case ($urandom_range(9))
          0:       m = 2 * hc + int'($urandom_range(4)) - 2;
          1:       m = 1 + int'($urandom_range(3 * hc));
          default: m = hc + int'($urandom_range(hc / 8)) - hc / 16;
        endcase
        if (m < 1) m = 1;
        do_edge(pol, m);
      end
    end

    chk("single path used", int'(n_single > 0), 1);
    chk("double path used", int'(n_double > 0), 1);
    chk("hold path used",   int'(n_hold > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

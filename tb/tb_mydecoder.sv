// tb_mydecoder: end-to-end test of the Manchester decoder and clock recovery
// module at its default parameters (G. E. Thomas convention).
//
// Streams are Manchester encoded by the testbench with a half-cycle of HC
// CLK cycles; every mid-bit edge after the first is moved by a random
// -jmax..+jmax cycles.
// The first stream is the bit sequence 00110101010000000111; then come random
// streams (first two bits equal, as the decoder requires), each after a
// reset, some at other half-cycle lengths. Before each stream the line idles
// at the level of the first half of bit 0, so the first edge is a mid-bit
// one.
//
// Checks:
//   - SERIALDATA taken at each falling edge of SYNC reproduces the stream;
//   - SYNC rises exactly once per bit, at the 3rd CLK edge after the one
//     that first samples the mid-bit transition (2 synchroniser stages,
//     then counter clear, then toggle);
//   - DBL_BSB rises exactly twice per bit once the half-cycle is known, and
//     falls together with each rise of SYNC;
//   - the estimates converge to the half-cycle within +/- 1 cycle.
// Each mechanism of the design is counted and must occur: start-up
// estimate, in-range update, halving of a two-half-cycle interval, edge
// inversion, inversion for a missing boundary edge, quarter-period
// inversion of DBL_BSB.
module tb_mydecoder;
  logic CLK = 0, RST = 1, MANCH = 0;
  logic SYNC, DBL_BSB, SERIALDATA;
  int checks = 0, failures = 0;

  mydecoder dut (.*);

  // level of the first half of a bit: Thomas 0 = low then high
  function automatic bit first_half(bit b);
    return b;
  endfunction

  always #5 CLK = !CLK;

  int cyc = 0;                        // posedges so far (counted by the monitor)

  // mechanism counters
  int n_init = 0, n_single = 0, n_double = 0, n_edge = 0, n_boundary = 0, n_quarter = 0;
  always @(posedge CLK) if (!RST) begin
    if (dut.pos_edge && dut.u_est.kind_pos == manch_pkg::UPD_INIT)   n_init++;
    if (dut.neg_edge && dut.u_est.kind_neg == manch_pkg::UPD_INIT)   n_init++;
    if (dut.pos_edge && dut.u_est.kind_pos == manch_pkg::UPD_SINGLE) n_single++;
    if (dut.neg_edge && dut.u_est.kind_neg == manch_pkg::UPD_SINGLE) n_single++;
    if (dut.pos_edge && dut.u_est.kind_pos == manch_pkg::UPD_DOUBLE) n_double++;
    if (dut.neg_edge && dut.u_est.kind_neg == manch_pkg::UPD_DOUBLE) n_double++;
    if (dut.u_clk.edge_seen) n_edge++;
    if (!dut.u_clk.edge_seen && dut.u_clk.boundary) n_boundary++;
    if (!dut.u_clk.edge_seen && !dut.u_clk.boundary && dut.u_clk.quarter) n_quarter++;
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // ---------------------------------------------------------------- monitor
  bit   mon_on = 0;
  bit   got_bits[$];
  int   mid_sample[$];               // cycle at which each mid-bit edge is sampled
  int   sync_rise_cyc[$];
  bit   dbl_fell_at_sync[$];         // DBL_BSB fell together with SYNC's rise
  int   dbl_rise_cyc[$];
  logic sync_q = 0, dbl_q = 0;

  // At posedge number cyc the monitor sees the values the DUT produced at
  // posedge cyc-1: a SYNC change made at edge P+3 is recorded with cyc = P+4.
  always @(posedge CLK) begin
    cyc++;
    if (mon_on) begin
      if (SYNC && !sync_q) begin
        sync_rise_cyc.push_back(cyc);
        dbl_fell_at_sync.push_back(!DBL_BSB && dbl_q);
      end
      if (!SYNC && sync_q) got_bits.push_back(SERIALDATA);
      if (DBL_BSB && !dbl_q) dbl_rise_cyc.push_back(cyc);
    end
    sync_q <= SYNC;
    dbl_q  <= DBL_BSB;
  end

  // ---------------------------------------------------------------- driver
  // Drive the line between clock edges; 'cyc' at a negedge names the
  // posedge that will sample the new value minus one.
  task automatic hold(int n);
    repeat (n) @(negedge CLK);
  endtask

  task automatic run_stream(bit bits[$], int hc, int jmax);
    bit level;
    int j;
    int lo, hi, k;
    RST = 1;
    mon_on = 0;
    // idle at the first-half level of bit 0
    MANCH = first_half(bits[0]);
    hold(5);
    RST = 0;
    hold(3 * hc);
    got_bits.delete(); mid_sample.delete(); sync_rise_cyc.delete(); dbl_fell_at_sync.delete(); dbl_rise_cyc.delete();
    mon_on = 1;
    level = first_half(bits[0]);
    for (int i = 0; i < bits.size(); i++) begin
      j = (i == 0) ? 0 : int'($urandom_range(2 * jmax)) - jmax;
      // first half of bit i (boundary edge if the level must change)
      if (i > 0 && level != first_half(bits[i])) begin
        MANCH = first_half(bits[i]); level = first_half(bits[i]);
      end
      hold(hc + j);
      // mid-bit edge: the second half is the inverse of the first
      MANCH = !first_half(bits[i]); level = !first_half(bits[i]);
      mid_sample.push_back(cyc + 1);
      hold(hc - j);
    end
    hold(4 * hc);
    mon_on = 0;

    // ---- checks for this stream
    chk($sformatf("bit count %0d vs %0d", got_bits.size(), bits.size()), got_bits.size() == bits.size());
    for (int i = 0; i < bits.size() && i < got_bits.size(); i++)
      chk($sformatf("bit %0d", i), got_bits[i] == bits[i]);
    chk("sync rise count", sync_rise_cyc.size() == bits.size());
    for (int i = 0; i < bits.size() && i < sync_rise_cyc.size(); i++)
      chk($sformatf("sync rise latency bit %0d: %0d", i, sync_rise_cyc[i] - mid_sample[i]),
          sync_rise_cyc[i] - mid_sample[i] == 4);
    // DBL_BSB: two rising edges between consecutive SYNC rises from bit 1 on
    for (int i = 1; i + 1 < sync_rise_cyc.size(); i++) begin
      k = 0;
      foreach (dbl_rise_cyc[d])
        if (dbl_rise_cyc[d] >= sync_rise_cyc[i] && dbl_rise_cyc[d] < sync_rise_cyc[i+1]) k++;
      chk($sformatf("dbl rises in bit %0d: %0d", i, k), k == 2);
      chk($sformatf("dbl falls with sync rise, bit %0d", i), dbl_fell_at_sync[i]);
    end
    lo = hc - jmax; hi = hc + jmax;
    chk($sformatf("hc1 %0d", dut.u_est.hc1), int'(dut.u_est.hc1) >= lo && int'(dut.u_est.hc1) <= hi);
    chk($sformatf("hc2 %0d", dut.u_est.hc2), int'(dut.u_est.hc2) >= lo && int'(dut.u_est.hc2) <= hi);
  endtask

  initial begin
    bit bits[$];
    static string ref_seq = "00110101010000000111";
    hold(2);
    bits.delete();
    for (int i = 0; i < ref_seq.len(); i++) bits.push_back(ref_seq[i] == "1");
    run_stream(bits, 25, 1);
    // half-cycles of 25, 40 and 64 cycles with +/-1 edge jitter, and 16
    // cycles with none: at 16 the margin hc/8 = 2 leaves no room for both an
    // edge displacement and the error it leaves in the estimate
    for (int s = 0; s < 6; s++) begin
      bits.delete();
      bits.push_back(1'(s)); bits.push_back(1'(s));
      for (int i = 0; i < 60; i++) bits.push_back(1'($urandom_range(1)));
      case (s)
        3:       run_stream(bits, 16, 0);
        4:       run_stream(bits, 40, 1);
        5:       run_stream(bits, 64, 2);
        default: run_stream(bits, 25, 1);
      endcase
    end
    chk($sformatf("start-up estimate used %0d", n_init), n_init > 0);
    chk($sformatf("in-range update used %0d", n_single), n_single > 0);
    chk($sformatf("halving used %0d", n_double), n_double > 0);
    chk($sformatf("edge inversion used %0d", n_edge), n_edge > 0);
    chk($sformatf("missing-boundary inversion used %0d", n_boundary), n_boundary > 0);
    chk($sformatf("quarter inversion used %0d", n_quarter), n_quarter > 0);
    $display("mechanisms: init=%0d single=%0d double=%0d edge=%0d boundary=%0d quarter=%0d",
             n_init, n_single, n_double, n_edge, n_boundary, n_quarter);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge CLK);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

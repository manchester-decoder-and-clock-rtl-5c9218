// tb_bit_decoder: self-checking test of the serial data decoder for both
// Manchester conventions.
//
// sync and the line are driven with random values that change between clock
// edges. The expected data bit is kept by the testbench: at every clock edge
// where sync is high and was low at the previous edge, it becomes the
// inverted line (G. E. Thomas) or the line (IEEE 802.3), and otherwise it
// holds. Both instances are checked after every clock edge.
module tb_bit_decoder;
  logic clk = 0, rst = 1, manch_s = 0, sync = 0;
  logic data_t, data_i;
  int checks = 0, failures = 0, n_capture = 0;

  bit_decoder #(.CONVENTION(manch_pkg::CONV_THOMAS))   dut_t (.clk, .rst, .manch_s, .sync, .data(data_t));
  bit_decoder #(.CONVENTION(manch_pkg::CONV_IEEE8023)) dut_i (.clk, .rst, .manch_s, .sync, .data(data_i));

  always #5 clk = !clk;

  initial begin
    bit prev_sync, exp_t, exp_i;
    repeat (3) @(negedge clk);
    rst = 0;
    prev_sync = 0; exp_t = 0; exp_i = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (($urandom_range(3)) == 0) sync = !sync;
      manch_s = 1'($urandom_range(1));
      @(posedge clk);
      if (sync && !prev_sync) begin
        exp_t = !manch_s; exp_i = manch_s; n_capture++;
      end
      prev_sync = sync;
      #1;
      checks += 2;
      if (data_t !== exp_t || data_i !== exp_i) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: thomas %0b/%0b ieee %0b/%0b", i, data_t, exp_t, data_i, exp_i);
      end
    end
    checks++;
    if (n_capture < 100) begin failures++; $display("FAIL too few captures"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

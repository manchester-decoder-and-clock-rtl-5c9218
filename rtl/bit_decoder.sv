// bit_decoder: recovers the data bits from the Manchester line and the
// recovered bit clock.
//
// sync rises just after each mid-bit (significant) Manchester edge, so at
// that moment the line holds the second half of the current bit. With the
// G. E. Thomas convention (rising mid-bit edge = 0) the bit is the inverse of
// the line; with IEEE 802.3 (falling mid-bit edge = 0) it is the line itself.
// The bit is registered on the CLK cycle in which a rising edge of sync is
// seen and held until the next one, so a receiver can take it on the
// following falling edge of sync. This follows the original description; the
// convention parameter makes its "easily changed" variant selectable.
//
// Timing: data changes one CLK cycle after sync rises. Reset is synchronous,
// active high, and clears the output bit.
module bit_decoder #(
  parameter manch_pkg::convention_e CONVENTION = manch_pkg::CONV_THOMAS
) (
  input  logic clk,
  input  logic rst,
  input  logic manch_s,   // synchronised Manchester line
  input  logic sync,      // recovered bit clock
  output logic data       // decoded serial data (SERIALDATA)
);

  logic sync_prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_prev <= 1'b0;
      data      <= 1'b0;
    end else begin
      sync_prev <= sync;
      if (sync && !sync_prev)
        data <= (CONVENTION == manch_pkg::CONV_THOMAS) ? !manch_s : manch_s;
    end
  end

endmodule

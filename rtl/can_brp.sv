// can_brp: baud rate prescaler.
//
// Divides the oscillator clock down to the time-quantum rate of the bit
// timing logic, f_tq = f_osc / (2*(BRP+1)), with BRP programmable from 0
// to 31 as in the original prescaler. Instead of producing a derived
// clock, the whole receiver runs on the oscillator clock and this block
// emits a one-cycle enable pulse, tq_en, once every 2*(BRP+1) cycles.
// A new BRP value takes effect at the next quantum boundary; if the counter
// is already past the new terminal count it wraps at once.
//
// Interface: clk/rst_n, brp (5 bits), tq_en (pulse, one clk wide).
// Timing: the first pulse comes 2*(BRP+1) cycles after reset is released.
module can_brp #(
  parameter int unsigned BRP_W = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [BRP_W-1:0] brp,
  output logic             tq_en
);

  logic [BRP_W:0] cnt;
  logic [BRP_W:0] last;

  assign last = {brp, 1'b1};  // 2*(BRP+1) - 1

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      tq_en <= 1'b0;
    end else if (cnt >= last) begin
      cnt   <= '0;
      tq_en <= 1'b1;
    end else begin
      cnt   <= cnt + 1'b1;
      tq_en <= 1'b0;
    end
  end

endmodule

// can_stuff: bit de-stuffing.
//
// A CAN transmitter inserts one bit of opposite value after every five
// equal bits in the stuffed part of a frame (start of frame up to the end
// of the CRC sequence). This block removes those bits from the stream of
// sampled bits so that the frame decoder sees only frame bits; a sixth
// equal bit where a stuff bit is due is reported as a stuff error.
// Runs of equal bits are counted all the time; only while `en` is high is
// the bit after a run of five treated as a stuff bit. The frame decoder
// drives `en` and uses `run5` to keep de-stuffing on for a stuff bit that
// follows the last CRC bit.
//
// Interface: in_valid/in_bit from the bit timing logic; out_valid/out_bit
// (frame bits only), stuff_err (pulse, in place of out_valid) and run5.
// Timing: one clock cycle from in_valid to out_valid or stuff_err.
module can_stuff (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output logic out_bit,
  output logic stuff_err,
  output logic run5
);

  logic       last;
  logic [2:0] run;  // length of the current run of equal bits, saturating at 7

  assign run5 = (run == 3'd5);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last      <= 1'b1;
      run       <= 3'd1;
      out_valid <= 1'b0;
      out_bit   <= 1'b1;
      stuff_err <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      stuff_err <= 1'b0;
      if (in_valid) begin
        if (en && run == 3'd5) begin
          // Stuff bit slot: the bit must differ from the run.
          stuff_err <= (in_bit == last);
          last      <= in_bit;
          run       <= 3'd1;
        end else begin
          out_valid <= 1'b1;
          out_bit   <= in_bit;
          last      <= in_bit;
          if (in_bit != last)  run <= 3'd1;
          else if (run != 3'd7) run <= run + 3'd1;
        end
      end
    end
  end

endmodule

// can_crc: CRC-15 of a CAN frame.
//
// A bit-serial linear feedback shift register for the CAN generator
// polynomial x^15 + x^14 + x^10 + x^8 + x^7 + x^4 + x^3 + 1 (0x4599). It is
// cleared while the bus is idle and is clocked with every de-stuffed bit
// from the start of frame to the last bit of the received CRC sequence.
// Because the received CRC is shifted through as well, the register holds
// zero after a correct frame; crc_ok reports that.
//
// Interface: clr (synchronous clear, wins over en), en/bit_in (one bit per
// cycle in which en is high), crc (register value), crc_ok (crc == 0).
// Timing: crc and crc_ok reflect a bit on the cycle after it is clocked in.
module can_crc (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        en,
  input  logic        bit_in,
  output logic [14:0] crc,
  output logic        crc_ok
);

  localparam logic [14:0] POLY = 15'h4599;

  logic fb;
  assign fb     = bit_in ^ crc[14];
  assign crc_ok = (crc == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      crc <= '0;
    else if (clr)    crc <= '0;
    else if (en)     crc <= {crc[13:0], 1'b0} ^ (fb ? POLY : 15'h0);
  end

endmodule

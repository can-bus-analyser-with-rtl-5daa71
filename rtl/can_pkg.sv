// can_pkg: types and constants shared by the CAN receiver blocks.
//
// It holds the message code written with every record (the kinds of
// frame and error the analyser reports), the packed message record that
// travels from the frame decoder through the FIFO to the parallel-port
// controller, and the bit timing configuration that the PC programs.
// The message kinds and the 29-bit identifier split into ID1 (11 bits)
// and ID2 (18 bits) follow the CAN 2.0A/2.0B frame formats; the numeric
// encodings and field widths of the record are this design's choice.
package can_pkg;

  // Kind of record stored in the message FIFO.
  typedef enum logic [3:0] {
    MSG_NONE      = 4'd0,  // returned to the PC when the FIFO is empty
    MSG_DATA_A    = 4'd1,  // data frame, standard format (2.0A)
    MSG_DATA_B    = 4'd2,  // data frame, extended format (2.0B)
    MSG_REMOTE_A  = 4'd3,  // remote frame, standard format
    MSG_REMOTE_B  = 4'd4,  // remote frame, extended format
    MSG_ACK_ERR   = 4'd5,  // ACK slot stayed recessive
    MSG_CRC_ERR   = 4'd6,  // received CRC does not match
    MSG_FORM_ERR  = 4'd7,  // dominant bit in a fixed-form recessive field
    MSG_STUFF_ERR = 4'd8,  // six equal bits in a stuffed field
    MSG_OVERLOAD  = 4'd9   // overload frame seen after a frame
  } msg_code_e;

  // One decoded message: 4 + 4 + 11 + 18 + 64 = 101 bits.
  typedef struct packed {
    msg_code_e   code;
    logic [3:0]  dlc;   // data length code as received (0..15)
    logic [10:0] id1;   // base identifier
    logic [17:0] id2;   // identifier extension (zero in 2.0A frames)
    logic [63:0] data;  // first data byte in [63:56]
  } can_msg_t;

  // Bit timing set by the PC. All values are plain counts of time quanta.
  typedef struct packed {
    logic [4:0] brp;         // baud rate prescaler, 0..31
    logic [3:0] prop_seg;    // 1..8
    logic [3:0] phase_seg1;  // 1..8
    logic [3:0] phase_seg2;  // 1..8
    logic [2:0] sjw;         // 1..4
  } bit_timing_t;

  // Power-up timing: f_osc/2 quantum, 1+3+3+3 = 10 quanta per bit.
  localparam bit_timing_t TIMING_RESET = '{brp: 5'd0, prop_seg: 4'd3,
                                           phase_seg1: 4'd3, phase_seg2: 4'd3,
                                           sjw: 3'd1};

  // Number of bytes a message occupies on the parallel port.
  localparam int unsigned MSG_BYTES = 14;

endpackage

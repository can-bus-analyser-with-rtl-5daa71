// can_receiver: passive CAN bus receiver for a PC-based bus analyser.
//
// The receiver listens to the RX line of a CAN transceiver and turns the
// traffic into a list of messages that a PC reads over a parallel port.
// Data flows through a chain of blocks, all clocked by the oscillator:
//   can_brp      prescaler, one time quantum every 2*(BRP+1) cycles
//   can_btl      bit timing: hard/re-synchronisation, one sample per bit
//   can_stuff    removes stuff bits, flags stuff errors
//   can_crc      CRC-15 over the de-stuffed frame
//   can_st_mach  decodes frame fields and errors into message records
//   can_stack    FIFO of message records
//   can_comm     parallel-port state machine: timing setup, readout
// The decoder steers the de-stuffer, the CRC register and the hard
// synchronisation of the bit timing logic. The receiver never drives the
// bus. The block split follows the original analyser; the port protocol,
// record format and FIFO depth are this design's choices.
//
// Interface: clk (f_osc), rst_n, can_rx (1 = recessive), and the PC side
// pc_data_in, pc_strobe, pc_data_out, pc_ack (see can_comm).
// Timing: a message is in the FIFO a few clk cycles after the sample point
// of its sixth EOF bit (or of the bit that revealed an error).
module can_receiver
  import can_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       can_rx,
  input  logic [7:0] pc_data_in,
  input  logic       pc_strobe,
  output logic [7:0] pc_data_out,
  output logic       pc_ack
);

  localparam int unsigned CNT_W = $clog2(FIFO_DEPTH + 1);

  bit_timing_t      timing;
  logic             tq_en;
  logic             smp_valid, smp_bit, resync, hard_sync;
  logic             destuff_en, run5;
  logic             db_valid, db_bit, stuff_err;
  logic             crc_en, crc_clr, crc_ok;
  logic [14:0]      crc;
  logic             hard_sync_en;
  logic             msg_wr;
  can_msg_t         msg, fifo_msg;
  logic             fifo_rd, fifo_empty, fifo_full, fifo_ovf, ovf_clr;
  logic [CNT_W-1:0] fifo_count;

  can_brp u_brp (
    .clk, .rst_n, .brp(timing.brp), .tq_en
  );

  can_btl u_btl (
    .clk, .rst_n, .tq_en, .rx(can_rx), .timing, .hard_sync_en,
    .sample_valid(smp_valid), .sample_bit(smp_bit), .resync, .hard_sync
  );

  can_stuff u_stuff (
    .clk, .rst_n, .en(destuff_en), .in_valid(smp_valid), .in_bit(smp_bit),
    .out_valid(db_valid), .out_bit(db_bit), .stuff_err, .run5
  );

  can_crc u_crc (
    .clk, .rst_n, .clr(crc_clr), .en(crc_en), .bit_in(db_bit), .crc, .crc_ok
  );

  can_st_mach u_st_mach (
    .clk, .rst_n, .bit_valid(db_valid), .bit_in(db_bit), .stuff_err, .run5,
    .crc_ok, .destuff_en, .crc_en, .crc_clr, .hard_sync_en, .msg_wr, .msg
  );

  can_stack #(.DEPTH(FIFO_DEPTH)) u_stack (
    .clk, .rst_n, .wr_en(msg_wr), .wr_msg(msg), .rd_en(fifo_rd),
    .rd_msg(fifo_msg), .empty(fifo_empty), .full(fifo_full),
    .count(fifo_count), .overflow(fifo_ovf), .ovf_clr
  );

  can_comm #(.CNT_W(CNT_W)) u_comm (
    .clk, .rst_n, .pc_data_in, .pc_strobe, .pc_data_out, .pc_ack,
    .fifo_msg, .fifo_empty, .fifo_full, .fifo_count, .fifo_overflow(fifo_ovf),
    .fifo_rd, .ovf_clr, .timing
  );

endmodule

// can_comm: parallel-port controller between the receiver and a PC.
//
// A state machine that lets the PC program the bit timing parameters and
// read out the stored messages, one byte per handshake. The PC puts a byte
// on pc_data_in and raises pc_strobe; the controller synchronises the
// strobe, takes the byte on its rising edge, puts its answer on
// pc_data_out and raises pc_ack; the PC reads the answer and drops the
// strobe, and pc_ack falls with it (four-phase handshake).
//
// Command bytes (upper nibble = opcode, lower nibble = argument), all of
// them this design's own encoding:
//   0x1r  write timing register r; the next byte is the value
//   0x2r  read timing register r
//   0x30  read status: {overflow, full, empty, count (saturated to 5 bits)}
//   0x40  read a message: the answer is byte 0 of the oldest record, and
//         13 more handshakes (any data) return bytes 1..13; with an empty
//         FIFO the answer is 0x00 (MSG_NONE) and nothing more follows
//   0x50  clear the overflow flag
// Timing registers: 0 BRP (0..31), 1 PROP_SEG (1..8), 2 PHASE_SEG1 (1..8),
// 3 PHASE_SEG2 (1..8), 4 SJW (1..4); written values are clamped into these
// ranges, which are those of the original bit timing logic.
// Message bytes, first to last: {0, code}, {0, DLC}, the 29-bit identifier
// {ID1, ID2} in four bytes (most significant first), eight data bytes.
//
// Interface: PC side pc_data_in, pc_strobe, pc_data_out, pc_ack; FIFO side
// fifo_msg, fifo_empty, fifo_full, fifo_count, fifo_overflow, fifo_rd (one
// clk pulse), ovf_clr; timing (current bit timing).
// Timing: pc_ack rises four clk cycles after pc_strobe.
module can_comm
  import can_pkg::*;
#(
  parameter int unsigned CNT_W = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [7:0]       pc_data_in,
  input  logic             pc_strobe,
  output logic [7:0]       pc_data_out,
  output logic             pc_ack,
  input  can_msg_t         fifo_msg,
  input  logic             fifo_empty,
  input  logic             fifo_full,
  input  logic [CNT_W-1:0] fifo_count,
  input  logic             fifo_overflow,
  output logic             fifo_rd,
  output logic             ovf_clr,
  output bit_timing_t      timing
);

  typedef enum logic [1:0] {S_CMD, S_REGVAL, S_MSG} state_e;

  localparam int unsigned MSG_BITS = 8 * MSG_BYTES;

  state_e                  state;
  logic [2:0]              strobe_s;  // two synchroniser flops and an edge flop
  logic                    byte_ev;
  logic [7:0]              din;
  logic [2:0]              reg_sel;
  logic [MSG_BITS-9:0]     shreg;
  logic [3:0]              remaining;
  logic [MSG_BITS-1:0]     msg_bytes;
  logic [4:0]              count_sat;

  assign byte_ev   = strobe_s[1] && !strobe_s[2];
  assign din       = pc_data_in;
  assign msg_bytes = {4'h0, fifo_msg.code, 4'h0, fifo_msg.dlc,
                      3'b000, fifo_msg.id1, fifo_msg.id2, fifo_msg.data};
  assign count_sat = (32'(fifo_count) > 32'd31) ? 5'd31 : 5'(fifo_count);

  function automatic logic [7:0] clamp(logic [7:0] v, logic [7:0] lo, logic [7:0] hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic logic [7:0] read_reg(bit_timing_t t, logic [2:0] r);
    unique case (r)
      3'd0:    return {3'b0, t.brp};
      3'd1:    return {4'b0, t.prop_seg};
      3'd2:    return {4'b0, t.phase_seg1};
      3'd3:    return {4'b0, t.phase_seg2};
      3'd4:    return {5'b0, t.sjw};
      default: return 8'h00;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_CMD;
      strobe_s    <= '0;
      pc_data_out <= '0;
      pc_ack      <= 1'b0;
      reg_sel     <= '0;
      shreg       <= '0;
      remaining   <= '0;
      fifo_rd     <= 1'b0;
      ovf_clr     <= 1'b0;
      timing      <= TIMING_RESET;
    end else begin
      strobe_s <= {strobe_s[1:0], pc_strobe};
      fifo_rd  <= 1'b0;
      ovf_clr  <= 1'b0;
      if (!strobe_s[1]) pc_ack <= 1'b0;
      if (byte_ev) begin
        pc_ack <= 1'b1;
        unique case (state)
          S_CMD: begin
            unique case (din[7:4])
              4'h1: begin
                reg_sel     <= din[2:0];
                pc_data_out <= din;
                state       <= S_REGVAL;
              end
              4'h2: pc_data_out <= read_reg(timing, din[2:0]);
              4'h3: pc_data_out <= {fifo_overflow, fifo_full, fifo_empty, count_sat};
              4'h4: begin
                if (fifo_empty) begin
                  pc_data_out <= 8'h00;
                end else begin
                  pc_data_out <= msg_bytes[MSG_BITS-1 -: 8];
                  shreg       <= msg_bytes[MSG_BITS-9:0];
                  remaining   <= 4'(MSG_BYTES - 1);
                  fifo_rd     <= 1'b1;
                  state       <= S_MSG;
                end
              end
              4'h5: begin
                ovf_clr     <= 1'b1;
                pc_data_out <= din;
              end
              default: pc_data_out <= 8'hFF;
            endcase
          end
          S_REGVAL: begin
            unique case (reg_sel)
              3'd0: timing.brp        <= 5'(clamp(din, 8'd0, 8'd31));
              3'd1: timing.prop_seg   <= 4'(clamp(din, 8'd1, 8'd8));
              3'd2: timing.phase_seg1 <= 4'(clamp(din, 8'd1, 8'd8));
              3'd3: timing.phase_seg2 <= 4'(clamp(din, 8'd1, 8'd8));
              3'd4: timing.sjw        <= 3'(clamp(din, 8'd1, 8'd4));
              default: ;
            endcase
            pc_data_out <= din;
            state       <= S_CMD;
          end
          S_MSG: begin
            pc_data_out <= shreg[MSG_BITS-9 -: 8];
            shreg       <= {shreg[MSG_BITS-17:0], 8'h00};
            remaining   <= remaining - 4'd1;
            if (remaining == 4'd1) state <= S_CMD;
          end
          default: state <= S_CMD;
        endcase
      end
    end
  end

  // A message is only taken from a FIFO that holds one.
  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
                                   fifo_rd |-> !fifo_empty);

endmodule

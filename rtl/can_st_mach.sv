// can_st_mach: CAN frame decoding state machine.
//
// Walks through the fields of CAN 2.0A (standard, 11-bit identifier) and
// 2.0B (extended, 11 + 18-bit identifier) data and remote frames one
// de-stuffed bit at a time: SOF, ID1, SRR/RTR, IDE, [ID2, RTR, r1], r0,
// DLC, data field, CRC sequence, CRC delimiter, ACK slot, ACK delimiter,
// EOF and intermission. For every frame or bus event it writes one record
// (can_pkg::can_msg_t) holding the message code, data length code, ID1,
// ID2 and data bytes. Besides the four frame kinds it reports CRC, ACK,
// form and stuff errors and overload frames, as the analyser display lists
// them. The decoder never drives the bus, so an ACK error means that no
// node acknowledged the frame.
//
// Choices of this design where the CAN rules leave room for a passive
// observer: a frame is recorded after the sixth EOF bit (the point at which
// a receiver accepts it); a CRC mismatch is reported at the CRC delimiter;
// after any error or overload the decoder waits for eight recessive bits
// (error or overload delimiter) and then checks the intermission; a DLC
// above 8 means eight data bytes; reserved bits and SRR are not checked.
//
// It also steers its neighbours: destuff_en (stuffed part of the frame),
// crc_en/crc_clr for the CRC register, and hard_sync_en (bus idle or the
// last intermission bit) for the bit timing logic.
//
// Interface: bit_valid/bit_in from the de-stuffer, stuff_err, run5,
// crc_ok in; msg_wr (one clk pulse) with msg out.
// Timing: msg_wr follows the bit that completes the record by one cycle.
module can_st_mach
  import can_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     bit_valid,
  input  logic     bit_in,
  input  logic     stuff_err,
  input  logic     run5,
  input  logic     crc_ok,
  output logic     destuff_en,
  output logic     crc_en,
  output logic     crc_clr,
  output logic     hard_sync_en,
  output logic     msg_wr,
  output can_msg_t msg
);

  typedef enum logic [4:0] {
    ST_IDLE, ST_ID1, ST_SRR_RTR, ST_IDE, ST_ID2, ST_RTR, ST_R1, ST_R0,
    ST_DLC, ST_DATA, ST_CRC, ST_CRC_DEL, ST_ACK, ST_ACK_DEL, ST_EOF,
    ST_INTER, ST_WAIT
  } state_e;

  state_e      state;
  logic [6:0]  cnt;
  logic [6:0]  nbits;     // data field length in bits
  logic [10:0] id1;
  logic [17:0] id2;
  logic        ide, rtr;
  logic [3:0]  dlc;
  logic [63:0] data;
  logic [3:0]  dlc_next;

  assign dlc_next = {dlc[2:0], bit_in};

  // Stuffed region: SOF (handled in IDLE) through the CRC sequence, plus a
  // stuff bit that may follow the last CRC bit.
  logic in_stuffed;
  assign in_stuffed = (state inside {ST_ID1, ST_SRR_RTR, ST_IDE, ST_ID2, ST_RTR,
                                     ST_R1, ST_R0, ST_DLC, ST_DATA, ST_CRC});
  assign destuff_en   = in_stuffed || (state == ST_CRC_DEL && run5);
  assign crc_en       = bit_valid && in_stuffed;
  assign crc_clr      = !(in_stuffed || state == ST_CRC_DEL);
  assign hard_sync_en = (state == ST_IDLE) || (state == ST_INTER && cnt == 7'd2);

  function automatic can_msg_t make_msg(msg_code_e c);
    can_msg_t m;
    m.code = c;
    m.dlc  = dlc;
    m.id1  = id1;
    m.id2  = id2;
    m.data = data;
    return m;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_IDLE;
      cnt    <= '0;
      nbits  <= '0;
      id1    <= '0;
      id2    <= '0;
      ide    <= 1'b0;
      rtr    <= 1'b0;
      dlc    <= '0;
      data   <= '0;
      msg_wr <= 1'b0;
      msg    <= '0;
    end else begin
      msg_wr <= 1'b0;
      if (stuff_err) begin
        msg    <= make_msg(MSG_STUFF_ERR);
        msg_wr <= 1'b1;
        state  <= ST_WAIT;
        cnt    <= '0;
      end else if (bit_valid) begin
        unique case (state)
          ST_IDLE: begin
            if (!bit_in) begin  // start of frame
              state <= ST_ID1;
              cnt   <= '0;
              id1   <= '0;
              id2   <= '0;
              ide   <= 1'b0;
              rtr   <= 1'b0;
              dlc   <= '0;
              data  <= '0;
            end
          end
          ST_ID1: begin
            id1 <= {id1[9:0], bit_in};
            cnt <= cnt + 7'd1;
            if (cnt == 7'd10) state <= ST_SRR_RTR;
          end
          ST_SRR_RTR: begin
            rtr   <= bit_in;  // RTR of a 2.0A frame, SRR of a 2.0B frame
            state <= ST_IDE;
          end
          ST_IDE: begin
            ide <= bit_in;
            cnt <= '0;
            state <= bit_in ? ST_ID2 : ST_R0;
          end
          ST_ID2: begin
            id2 <= {id2[16:0], bit_in};
            cnt <= cnt + 7'd1;
            if (cnt == 7'd17) state <= ST_RTR;
          end
          ST_RTR: begin
            rtr   <= bit_in;
            state <= ST_R1;
          end
          ST_R1: state <= ST_R0;
          ST_R0: begin
            state <= ST_DLC;
            cnt   <= '0;
          end
          ST_DLC: begin
            dlc <= dlc_next;
            cnt <= cnt + 7'd1;
            if (cnt == 7'd3) begin
              cnt   <= '0;
              nbits <= (dlc_next > 4'd8) ? 7'd64 : {dlc_next[3:0], 3'b000};
              state <= (!rtr && dlc_next != 4'd0) ? ST_DATA : ST_CRC;
            end
          end
          ST_DATA: begin
            data[6'd63 - cnt[5:0]] <= bit_in;
            cnt <= cnt + 7'd1;
            if (cnt + 7'd1 == nbits) begin
              cnt   <= '0;
              state <= ST_CRC;
            end
          end
          ST_CRC: begin
            cnt <= cnt + 7'd1;
            if (cnt == 7'd14) state <= ST_CRC_DEL;
          end
          ST_CRC_DEL: begin
            if (!crc_ok) begin
              msg    <= make_msg(MSG_CRC_ERR);
              msg_wr <= 1'b1;
              state  <= ST_WAIT;
              cnt    <= '0;
            end else if (!bit_in) begin
              msg    <= make_msg(MSG_FORM_ERR);
              msg_wr <= 1'b1;
              state  <= ST_WAIT;
              cnt    <= '0;
            end else begin
              state <= ST_ACK;
            end
          end
          ST_ACK: begin
            if (bit_in) begin
              msg    <= make_msg(MSG_ACK_ERR);
              msg_wr <= 1'b1;
              state  <= ST_WAIT;
              cnt    <= '0;
            end else begin
              state <= ST_ACK_DEL;
            end
          end
          ST_ACK_DEL: begin
            cnt <= '0;
            if (!bit_in) begin
              msg    <= make_msg(MSG_FORM_ERR);
              msg_wr <= 1'b1;
              state  <= ST_WAIT;
            end else begin
              state <= ST_EOF;
            end
          end
          ST_EOF: begin
            cnt <= cnt + 7'd1;
            if (cnt <= 7'd5 && !bit_in) begin
              msg    <= make_msg(MSG_FORM_ERR);
              msg_wr <= 1'b1;
              state  <= ST_WAIT;
              cnt    <= '0;
            end else if (cnt == 7'd5) begin
              msg    <= make_msg(ide ? (rtr ? MSG_REMOTE_B : MSG_DATA_B)
                                     : (rtr ? MSG_REMOTE_A : MSG_DATA_A));
              msg_wr <= 1'b1;
            end else if (cnt == 7'd6) begin
              cnt <= '0;
              if (!bit_in) begin
                msg    <= make_msg(MSG_OVERLOAD);
                msg_wr <= 1'b1;
                state  <= ST_WAIT;
              end else begin
                state <= ST_INTER;
              end
            end
          end
          ST_INTER: begin
            cnt <= cnt + 7'd1;
            if (!bit_in && cnt != 7'd2) begin
              msg    <= make_msg(MSG_OVERLOAD);
              msg_wr <= 1'b1;
              state  <= ST_WAIT;
              cnt    <= '0;
            end else if (cnt == 7'd2) begin
              cnt <= '0;
              if (!bit_in) begin  // start of frame right after intermission
                state <= ST_ID1;
                id1   <= '0;
                id2   <= '0;
                ide   <= 1'b0;
                rtr   <= 1'b0;
                dlc   <= '0;
                data  <= '0;
              end else begin
                state <= ST_IDLE;
              end
            end
          end
          ST_WAIT: begin
            // Error or overload delimiter: eight recessive bits.
            if (!bit_in) begin
              cnt <= '0;
            end else if (cnt == 7'd7) begin
              cnt   <= '0;
              state <= ST_INTER;
            end else begin
              cnt <= cnt + 7'd1;
            end
          end
          default: state <= ST_IDLE;
        endcase
      end
    end
  end

  // The de-stuffer reports a stuff error instead of a bit, never with one.
  a_err_xor_bit: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(stuff_err && bit_valid));

endmodule

// tb_can_st_mach: feeds de-stuffed frame bits (built by the reference frame
// builder) into the decoder, together with a CRC register, and compares
// every record written with the expected one: standard and extended data
// and remote frames, DLC above 8, CRC, ACK, form and stuff errors,
// overload frames and a frame starting in the last intermission bit.
// Also checks that de-stuffing is enabled exactly over SOF+1 .. CRC end.
module tb_can_st_mach;
  import can_pkg::*;
  import can_tb_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        bit_valid, bit_in, stuff_err, run5;
  logic        crc_ok, destuff_en, crc_en, crc_clr, hard_sync_en, msg_wr;
  logic [14:0] crc;
  can_msg_t    msg;
  can_msg_t    got[$], exp_q[$];
  bit          exp_full[$];  // compare all fields, or only the code
  int checks = 0, failures = 0;
  int en_errors = 0;

  can_st_mach dut (.clk, .rst_n, .bit_valid, .bit_in, .stuff_err, .run5, .crc_ok,
                   .destuff_en, .crc_en, .crc_clr, .hard_sync_en, .msg_wr, .msg);
  can_crc u_crc (.clk, .rst_n, .clr(crc_clr), .en(crc_en), .bit_in, .crc, .crc_ok);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && msg_wr) got.push_back(msg);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send bits; en_lo..en_hi is the index range where destuff_en must be 1.
  task automatic send(bitq_t q, int en_lo = -1, int en_hi = -2);
    foreach (q[i]) begin
      @(negedge clk);
      if (en_lo >= 0 && destuff_en != (i >= en_lo && i <= en_hi)) en_errors++;
      bit_valid = 1; bit_in = q[i];
      @(negedge clk);
      bit_valid = 0;
      repeat (2) @(negedge clk);
    end
  endtask

  task automatic ones(int n);
    bitq_t q;
    for (int i = 0; i < n; i++) q.push_back(1'b1);
    send(q);
  endtask

  function automatic can_msg_t expect_msg(msg_code_e c, bit ide, bit rtr, bit [10:0] id1,
                                          bit [17:0] id2, bit [3:0] dlc, bit [63:0] data);
    can_msg_t m;
    m.code = c; m.dlc = dlc; m.id1 = id1; m.id2 = ide ? id2 : 18'h0;
    m.data = stored_data(rtr, dlc, data);
    return m;
  endfunction

  typedef enum {K_OK, K_CRC, K_ACK, K_FORM_CRCDEL, K_FORM_EOF, K_OVL, K_STUFF, K_B2B} kind_e;

  task automatic frame(kind_e k, bit ide, bit rtr, bit [3:0] dlc);
    bit [10:0] id1 = 11'($urandom);
    bit [17:0] id2 = 18'($urandom);
    bit [63:0] data = {$urandom, $urandom};
    bitq_t body, tail;
    msg_code_e fc;
    id1 = 11'($urandom); id2 = 18'($urandom); data = {$urandom, $urandom};
    fc = ide ? (rtr ? MSG_REMOTE_B : MSG_DATA_B) : (rtr ? MSG_REMOTE_A : MSG_DATA_A);
    body = frame_unstuffed(ide, rtr, id1, id2, dlc, data, k == K_CRC);
    tail = frame_tail(k != K_ACK);
    if (k == K_STUFF) begin
      bitq_t part;
      for (int i = 0; i < 20; i++) part.push_back(body[i]);
      send(part);
      @(negedge clk); stuff_err = 1; @(negedge clk); stuff_err = 0;
      exp_q.push_back(expect_msg(MSG_STUFF_ERR, ide, rtr, id1, id2, dlc, data));
      exp_full.push_back(0);
      ones(11);
      return;
    end
    send(body, 1, body.size() - 1);
    unique case (k)
      K_OK: begin
        send(tail);
        exp_q.push_back(expect_msg(fc, ide, rtr, id1, id2, dlc, data)); exp_full.push_back(1);
      end
      K_B2B: begin
        void'(tail.pop_back());
        send(tail);
        exp_q.push_back(expect_msg(fc, ide, rtr, id1, id2, dlc, data)); exp_full.push_back(1);
        // the next frame's SOF replaces the last intermission bit
      end
      K_CRC: begin
        send(tail);
        exp_q.push_back(expect_msg(MSG_CRC_ERR, ide, rtr, id1, id2, dlc, data)); exp_full.push_back(1);
        ones(11);
      end
      K_ACK: begin
        send(tail);
        exp_q.push_back(expect_msg(MSG_ACK_ERR, ide, rtr, id1, id2, dlc, data)); exp_full.push_back(1);
        ones(11);
      end
      K_FORM_CRCDEL: begin
        tail[0] = 1'b0;
        send(tail);
        exp_q.push_back(expect_msg(MSG_FORM_ERR, ide, rtr, id1, id2, dlc, data)); exp_full.push_back(1);
        ones(11);
      end
      K_FORM_EOF: begin
        tail[5] = 1'b0;  // third EOF bit
        send(tail);
        exp_q.push_back(expect_msg(MSG_FORM_ERR, ide, rtr, id1, id2, dlc, data)); exp_full.push_back(1);
        ones(11);
      end
      K_OVL: begin
        bitq_t ovl;
        tail[10] = 1'b0;  // first intermission bit
        for (int i = 0; i <= 10; i++) ovl.push_back(tail[i]);
        for (int i = 0; i < 5; i++) ovl.push_back(1'b0);   // rest of overload flag
        for (int i = 0; i < 11; i++) ovl.push_back(1'b1);  // delimiter + intermission
        send(ovl);
        exp_q.push_back(expect_msg(fc, ide, rtr, id1, id2, dlc, data)); exp_full.push_back(1);
        exp_q.push_back(expect_msg(MSG_OVERLOAD, ide, rtr, id1, id2, dlc, data)); exp_full.push_back(0);
      end
      default: ;
    endcase
  endtask

  initial begin
    int nchk;
    bit_valid = 0; bit_in = 1; stuff_err = 0; run5 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ones(11);
    for (int t = 0; t < 8; t++) begin
      frame(K_OK, 1'b0, 1'b0, 4'(t));
      frame(K_OK, 1'b1, 1'b0, 4'(t));
    end
    frame(K_OK, 1'b0, 1'b0, 4'd12);    // DLC above 8
    frame(K_OK, 1'b0, 1'b1, 4'd3);     // remote 2.0A
    frame(K_OK, 1'b1, 1'b1, 4'd8);     // remote 2.0B
    frame(K_CRC, 1'b1, 1'b0, 4'd4);
    frame(K_ACK, 1'b0, 1'b0, 4'd2);
    frame(K_FORM_CRCDEL, 1'b0, 1'b0, 4'd1);
    frame(K_FORM_EOF, 1'b1, 1'b0, 4'd5);
    frame(K_OVL, 1'b0, 1'b0, 4'd6);
    frame(K_STUFF, 1'b1, 1'b0, 4'd6);
    frame(K_B2B, 1'b0, 1'b0, 4'd2);
    frame(K_OK, 1'b1, 1'b0, 4'd7);
    repeat (20) @(negedge clk);
    checks++;
    if (got.size() != exp_q.size()) begin
      failures++;
      $display("FAIL %0d records, expected %0d", got.size(), exp_q.size());
    end
    nchk = (got.size() < exp_q.size()) ? got.size() : exp_q.size();
    for (int i = 0; i < nchk; i++) begin
      checks++;
      if (exp_full[i] ? (got[i] != exp_q[i]) : (got[i].code != exp_q[i].code)) begin
        failures++;
        $display("FAIL record %0d: got %s dlc=%0d id=%h/%h data=%h, expected %s dlc=%0d id=%h/%h data=%h",
                 i, got[i].code.name(), got[i].dlc, got[i].id1, got[i].id2, got[i].data,
                 exp_q[i].code.name(), exp_q[i].dlc, exp_q[i].id1, exp_q[i].id2, exp_q[i].data);
      end
    end
    checks++;
    if (en_errors != 0) begin failures++; $display("FAIL destuff_en wrong on %0d bits", en_errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

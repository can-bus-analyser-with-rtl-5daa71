// tb_can_receiver: end-to-end test of the receiver at its default size.
//
// A bus model drives stuffed CAN frames onto can_rx with a transmitter bit
// time slightly off the receiver's, and a PC model programs the bit timing
// and reads the decoded messages over the parallel port. Frames cover
// standard and extended data and remote frames, CRC, ACK, form and stuff
// errors (each followed by an error flag from the other nodes, as on a
// real bus), an overload frame, back-to-back frames, and a burst that
// overflows the message FIFO. Every record read is compared with the
// expected one, and the mechanisms of the design (hard synchronisation,
// resynchronisation, stuff-bit removal, each message kind, FIFO overflow,
// register writes, empty reads) must each have happened.
module tb_can_receiver;
  import can_pkg::*;
  import can_tb_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic       can_rx;
  logic [7:0] pc_data_in, pc_data_out;
  logic       pc_strobe, pc_ack;
  int checks = 0, failures = 0;

  // Bit timing programmed by the PC: quantum 2*(1+1) = 4 clk cycles,
  // 1 + 2 + 3 + 2 = 8 quanta per bit, 32 clk cycles = 320 time units.
  localparam int BRP = 1, PROP = 2, PH1 = 3, PH2 = 2, SJW = 2;
  localparam int NOMINAL = 320;
  int period = NOMINAL;

  can_msg_t exp_q[$];
  bit       exp_full[$];
  int n_hard = 0, n_resync = 0, n_destuff = 0, n_wr_full = 0, n_code[16];
  int n_regwr = 0, n_empty_reads = 0, n_overflow_seen = 0;

  can_receiver dut (.clk, .rst_n, .can_rx, .pc_data_in, .pc_strobe, .pc_data_out, .pc_ack);

  always #5 clk = ~clk;

  // Mechanism counters, observed inside the design.
  always @(posedge clk) if (rst_n) begin
    if (dut.u_btl.hard_sync) n_hard++;
    if (dut.u_btl.resync)    n_resync++;
    if (dut.u_stuff.in_valid && dut.u_stuff.en && dut.u_stuff.run5 && !dut.u_stuff.stuff_err)
      n_destuff++;
    if (dut.u_stack.wr_en && dut.u_stack.full) n_wr_full++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- PC side ----------------
  task automatic xfer(input logic [7:0] d, output logic [7:0] r);
    @(negedge clk);
    pc_data_in = d;
    pc_strobe  = 1;
    while (!pc_ack) @(negedge clk);
    r = pc_data_out;
    pc_strobe = 0;
    while (pc_ack) @(negedge clk);
  endtask

  task automatic write_reg(int a, int v);
    logic [7:0] r;
    xfer(8'h10 | 8'(a), r);
    xfer(8'(v), r);
    xfer(8'h20 | 8'(a), r);
    n_regwr++;
    checks++;
    if (r != 8'(v)) begin failures++; $display("FAIL reg %0d reads %0d", a, r); end
  endtask

  // Read every stored message and compare with the expected list.
  task automatic read_all(bit final_check = 1);
    logic [7:0] st, r;
    logic [111:0] bytes;
    can_msg_t m;
    xfer(8'h30, st);
    if (st[7]) begin n_overflow_seen++; xfer(8'h50, r); end
    for (int k = 0; k < int'(st[4:0]); k++) begin
      xfer(8'h40, r);
      bytes = {r, 104'h0};
      for (int b = 1; b < 14; b++) begin
        xfer(8'h00, r);
        bytes[111 - 8 * b -: 8] = r;
      end
      m.code = msg_code_e'(bytes[107:104]);
      m.dlc  = bytes[99:96];
      m.id1  = bytes[92:82];
      m.id2  = bytes[81:64];
      m.data = bytes[63:0];
      n_code[m.code]++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected record %s", m.code.name());
      end else begin
        can_msg_t e = exp_q.pop_front();
        bit full = exp_full.pop_front();
        if (full ? (m != e) : (m.code != e.code)) begin
          failures++;
          $display("FAIL got %s dlc=%0d id=%h/%h data=%h; expected %s dlc=%0d id=%h/%h data=%h",
                   m.code.name(), m.dlc, m.id1, m.id2, m.data,
                   e.code.name(), e.dlc, e.id1, e.id2, e.data);
        end
      end
    end
    if (final_check) begin
      xfer(8'h40, r);  // FIFO now empty: answer is MSG_NONE
      n_empty_reads++;
      checks++;
      if (r != 8'h00) begin failures++; $display("FAIL empty read gives %h", r); end
    end
  endtask

  // ---------------- bus side ----------------
  task automatic bus(bitq_t q);
    foreach (q[i]) begin
      can_rx = q[i];
      #(period);
    end
  endtask

  function automatic bitq_t ones(int n);
    bitq_t q;
    for (int i = 0; i < n; i++) q.push_back(1'b1);
    return q;
  endfunction

  // Error flag of the other nodes, error delimiter and intermission.
  function automatic bitq_t error_tail();
    bitq_t q;
    for (int i = 0; i < 6; i++) q.push_back(1'b0);
    for (int i = 0; i < 11; i++) q.push_back(1'b1);
    return q;
  endfunction

  function automatic can_msg_t mk(msg_code_e c, bit ide, bit rtr, bit [10:0] id1,
                                  bit [17:0] id2, bit [3:0] dlc, bit [63:0] data);
    can_msg_t m;
    m.code = c; m.dlc = dlc; m.id1 = id1; m.id2 = ide ? id2 : 18'h0;
    m.data = stored_data(rtr, dlc, data);
    return m;
  endfunction

  typedef enum {K_OK, K_CRC, K_ACK, K_FORM, K_STUFF, K_OVL, K_B2B} kind_e;

  task automatic frame(kind_e k, bit ide, bit rtr, bit [3:0] dlc, bit [63:0] data);
    bit [10:0] id1;
    bit [17:0] id2;
    bitq_t body, st, tail;
    msg_code_e fc;
    id1 = 11'($urandom); id2 = 18'($urandom);
    fc = ide ? (rtr ? MSG_REMOTE_B : MSG_DATA_B) : (rtr ? MSG_REMOTE_A : MSG_DATA_A);
    body = frame_unstuffed(ide, rtr, id1, id2, dlc, data, k == K_CRC);
    st = stuff(body);
    tail = frame_tail(k != K_ACK);
    unique case (k)
      K_OK, K_B2B: begin
        exp_q.push_back(mk(fc, ide, rtr, id1, id2, dlc, data)); exp_full.push_back(1);
        if (k == K_B2B) void'(tail.pop_back());  // next SOF in last intermission bit
        bus(st); bus(tail);
      end
      K_CRC: begin
        bitq_t t3;
        exp_q.push_back(mk(MSG_CRC_ERR, ide, rtr, id1, id2, dlc, data)); exp_full.push_back(1);
        for (int i = 0; i < 3; i++) t3.push_back(tail[i]);
        bus(st); bus(t3); bus(error_tail());
      end
      K_ACK: begin
        bitq_t t3;
        exp_q.push_back(mk(MSG_ACK_ERR, ide, rtr, id1, id2, dlc, data)); exp_full.push_back(1);
        for (int i = 0; i < 3; i++) t3.push_back(tail[i]);
        bus(st); bus(t3); bus(error_tail());
      end
      K_FORM: begin
        bitq_t t3;
        exp_q.push_back(mk(MSG_FORM_ERR, ide, rtr, id1, id2, dlc, data)); exp_full.push_back(1);
        for (int i = 0; i < 3; i++) t3.push_back(tail[i]);
        t3[2] = 1'b0;  // dominant ACK delimiter
        bus(st); bus(t3); bus(error_tail());
      end
      K_STUFF: begin
        bitq_t part;
        exp_q.push_back(mk(MSG_STUFF_ERR, ide, rtr, id1, id2, dlc, data)); exp_full.push_back(0);
        for (int i = 0; i < 16; i++) part.push_back(st[i]);
        for (int i = 0; i < 6; i++) part.push_back(1'b0);  // too many dominant bits
        bus(part); bus(error_tail());
      end
      K_OVL: begin
        exp_q.push_back(mk(fc, ide, rtr, id1, id2, dlc, data)); exp_full.push_back(1);
        exp_q.push_back(mk(MSG_OVERLOAD, ide, rtr, id1, id2, dlc, data)); exp_full.push_back(0);
        tail[10] = 1'b0;  // dominant first intermission bit
        void'(tail.pop_back()); void'(tail.pop_back());
        bus(st); bus(tail);
        begin
          bitq_t fl;
          for (int i = 0; i < 5; i++) fl.push_back(1'b0);
          for (int i = 0; i < 11; i++) fl.push_back(1'b1);
          bus(fl);
        end
      end
      default: ;
    endcase
  endtask

  function automatic bit [63:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  initial begin
    can_rx = 1; pc_strobe = 0; pc_data_in = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    write_reg(0, BRP);
    write_reg(1, PROP);
    write_reg(2, PH1);
    write_reg(3, PH2);
    write_reg(4, SJW);
    bus(ones(20));

    // Round 1: every frame kind and error, read out after each few frames.
    period = NOMINAL + 4;               // transmitter 1.25 % slow
    frame(K_OK, 0, 0, 4'd8, rnd64());
    frame(K_OK, 1, 0, 4'd3, rnd64());
    frame(K_OK, 0, 1, 4'd2, rnd64());
    frame(K_OK, 1, 1, 4'd0, rnd64());
    frame(K_OK, 0, 0, 4'd8, 64'h0);      // long dominant runs: many stuff bits
    frame(K_OK, 1, 0, 4'd8, '1);         // long recessive runs
    bus(ones(5));
    read_all();
    period = NOMINAL - 4;               // transmitter 1.25 % fast
    frame(K_CRC, 1, 0, 4'd4, rnd64());
    frame(K_ACK, 0, 0, 4'd1, rnd64());
    frame(K_FORM, 1, 1, 4'd5, rnd64());
    frame(K_STUFF, 0, 0, 4'd6, rnd64());
    frame(K_OVL, 0, 0, 4'd7, rnd64());
    frame(K_B2B, 1, 0, 4'd2, rnd64());
    frame(K_OK, 0, 0, 4'd11, rnd64());   // DLC above 8
    bus(ones(5));
    read_all();

    // Round 2: a burst of 18 frames overflows the 16-entry FIFO.
    period = NOMINAL;
    for (int i = 0; i < 18; i++) frame(K_OK, 1'(i), 0, 4'(i % 9), rnd64());
    bus(ones(5));
    void'(exp_q.pop_back()); void'(exp_full.pop_back());  // the two dropped records
    void'(exp_q.pop_back()); void'(exp_full.pop_back());
    read_all();

    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d records missing", exp_q.size()); end

    // Every mechanism must have happened.
    begin
      static string names[9] = '{"hard sync", "resync", "stuff bit removed", "FIFO overflow",
                          "overflow reported", "register write", "empty read",
                          "data frame", "remote frame"};
      int counts[9];
      counts = '{n_hard, n_resync, n_destuff, n_wr_full, n_overflow_seen, n_regwr,
                 n_empty_reads, n_code[MSG_DATA_A] + n_code[MSG_DATA_B],
                 n_code[MSG_REMOTE_A] + n_code[MSG_REMOTE_B]};
      for (int i = 0; i < 9; i++) begin
        checks++;
        $display("%-18s %0d", names[i], counts[i]);
        if (counts[i] == 0) begin failures++; $display("FAIL %s never happened", names[i]); end
      end
      for (int c = 1; c <= 9; c++) begin
        checks++;
        $display("%-18s %0d", msg_code_e'(c), n_code[c]);
        if (n_code[c] == 0) begin failures++; $display("FAIL no %s record", msg_code_e'(c)); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

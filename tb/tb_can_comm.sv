// tb_can_comm: plays the PC on the parallel port (four-phase strobe/ack
// handshake) against the controller, with a queue standing in for the
// message FIFO. Checks register writes (with clamping) and read-back, the
// status byte, message read-out byte by byte, the empty-FIFO answer, the
// overflow clear, and the handshake latency.
module tb_can_comm;
  import can_pkg::*;
  localparam int CNT_W = 5;
  logic             clk = 0, rst_n = 0;
  logic [7:0]       pc_data_in, pc_data_out;
  logic             pc_strobe, pc_ack;
  can_msg_t         fifo_msg;
  logic             fifo_empty, fifo_full, fifo_overflow, fifo_rd, ovf_clr;
  logic [CNT_W-1:0] fifo_count;
  bit_timing_t      timing;
  can_msg_t         model[$];
  int checks = 0, failures = 0;
  int n_rd = 0, n_clr = 0, max_lat = 0;

  can_comm #(.CNT_W(CNT_W)) dut (.clk, .rst_n, .pc_data_in, .pc_strobe, .pc_data_out,
                                 .pc_ack, .fifo_msg, .fifo_empty, .fifo_full,
                                 .fifo_count, .fifo_overflow, .fifo_rd, .ovf_clr, .timing);

  always #5 clk = ~clk;

  assign fifo_empty = (model.size() == 0);
  assign fifo_full  = (model.size() == 16);
  assign fifo_count = CNT_W'(model.size());
  assign fifo_msg   = (model.size() != 0) ? model[0] : '0;

  always @(posedge clk) if (rst_n) begin
    if (fifo_rd) begin n_rd++; if (model.size() != 0) void'(model.pop_front()); end
    if (ovf_clr) n_clr++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(input logic [7:0] d, output logic [7:0] r);
    int lat = 0;
    @(negedge clk);
    pc_data_in = d;
    pc_strobe  = 1;
    while (!pc_ack) begin @(negedge clk); lat++; end
    if (lat > max_lat) max_lat = lat;
    r = pc_data_out;
    pc_strobe = 0;
    while (pc_ack) @(negedge clk);
  endtask

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [7:0] reg_of(bit_timing_t t, int r);
    case (r)
      0: return 8'(t.brp);
      1: return 8'(t.prop_seg);
      2: return 8'(t.phase_seg1);
      3: return 8'(t.phase_seg2);
      default: return 8'(t.sjw);
    endcase
  endfunction

  initial begin
    logic [7:0] r;
    static int lo[5] = '{0, 1, 1, 1, 1};
    static int hi[5] = '{31, 8, 8, 8, 4};
    pc_strobe = 0; pc_data_in = 0; fifo_overflow = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Reset values.
    for (int i = 0; i < 5; i++) begin
      xfer(8'h20 | 8'(i), r);
      check("reset reg", r, reg_of(TIMING_RESET, i));
    end
    // Writes, including out-of-range values.
    for (int t = 0; t < 40; t++) begin
      int i, v, e;
      i = $urandom_range(0, 4);
      v = $urandom_range(0, 40);
      e = (v < lo[i]) ? lo[i] : (v > hi[i]) ? hi[i] : v;
      xfer(8'h10 | 8'(i), r);
      xfer(8'(v), r);
      check("timing output", reg_of(timing, i), 8'(e));
      xfer(8'h20 | 8'(i), r);
      check("read back", r, 8'(e));
    end
    // Empty FIFO.
    xfer(8'h30, r);
    check("status empty", r, 8'b0010_0000);
    xfer(8'h40, r);
    check("empty read", r, 8'h00);
    // Messages.
    for (int m = 0; m < 5; m++) begin
      can_msg_t x;
      x.code = msg_code_e'($urandom_range(1, 9));
      x.dlc  = 4'($urandom);
      x.id1  = 11'($urandom);
      x.id2  = 18'($urandom);
      x.data = {$urandom, $urandom};
      model.push_back(x);
    end
    fifo_overflow = 1;
    xfer(8'h30, r);
    check("status", r, {1'b1, 1'b0, 1'b0, 5'd5});
    for (int m = 0; m < 5; m++) begin
      logic [111:0] exp_bytes;
      can_msg_t x;
      x = model[0];
      exp_bytes = {4'h0, x.code, 4'h0, x.dlc, 3'b000, x.id1, x.id2, x.data};
      xfer(8'h40, r);
      check("msg byte 0", r, exp_bytes[111 -: 8]);
      for (int b = 1; b < 14; b++) begin
        xfer(8'h00, r);
        check("msg byte", r, exp_bytes[111 - 8 * b -: 8]);
      end
    end
    checks++;
    if (n_rd != 5 || model.size() != 0) begin failures++; $display("FAIL %0d FIFO reads", n_rd); end
    xfer(8'h50, r);
    checks++;
    if (n_clr != 1) begin failures++; $display("FAIL overflow clear"); end
    checks++;
    if (max_lat > 5) begin failures++; $display("FAIL ack latency %0d", max_lat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_can_stack: writes and reads message records against a queue model,
// with random interleaving; fills the FIFO to check full, drops on
// overflow, the sticky overflow flag and its clear.
module tb_can_stack;
  import can_pkg::*;
  localparam int unsigned DEPTH = 16;
  logic     clk = 0, rst_n = 0;
  logic     wr_en, rd_en, empty, full, overflow, ovf_clr;
  can_msg_t wr_msg, rd_msg;
  logic [$clog2(DEPTH+1)-1:0] count;
  can_msg_t model[$];
  int checks = 0, failures = 0;

  can_stack #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_en, .wr_msg, .rd_en, .rd_msg,
                                 .empty, .full, .count, .overflow, .ovf_clr);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic can_msg_t rnd_msg();
    can_msg_t m;
    m.code = msg_code_e'($urandom_range(1, 9));
    m.dlc  = 4'($urandom);
    m.id1  = 11'($urandom);
    m.id2  = 18'($urandom);
    m.data = {$urandom, $urandom};
    return m;
  endfunction

  task automatic check_state();
    checks++;
    if (count != model.size() || empty != (model.size() == 0) ||
        full != (model.size() == DEPTH)) begin
      failures++;
      $display("FAIL count=%0d empty=%0d full=%0d model=%0d", count, empty, full, model.size());
    end
    if (model.size() != 0) begin
      checks++;
      if (rd_msg != model[0]) begin failures++; $display("FAIL head mismatch"); end
    end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; ovf_clr = 0; wr_msg = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_state();
    // Random traffic.
    for (int i = 0; i < 2000; i++) begin
      bit w, r;
      w = 1'($urandom) && model.size() < DEPTH;
      r = 1'($urandom) && model.size() > 0;
      @(negedge clk);
      wr_en = w; rd_en = r; wr_msg = rnd_msg();
      @(negedge clk);
      if (r) void'(model.pop_front());
      if (w) model.push_back(wr_msg);
      wr_en = 0; rd_en = 0;
      #1 check_state();
    end
    // Fill to the top, then one more write.
    while (model.size() < DEPTH) begin
      @(negedge clk);
      wr_en = 1; wr_msg = rnd_msg();
      @(negedge clk);
      wr_en = 0;
      model.push_back(wr_msg);
    end
    @(negedge clk);
    wr_en = 1; wr_msg = rnd_msg();
    @(negedge clk);
    wr_en = 0;
    #1 check_state();
    checks++;
    if (!overflow) begin failures++; $display("FAIL overflow not set"); end
    ovf_clr = 1; @(negedge clk); ovf_clr = 0;
    #1 checks++;
    if (overflow) begin failures++; $display("FAIL overflow not cleared"); end
    // Drain.
    while (model.size() > 0) begin
      rd_en = 1; @(negedge clk); rd_en = 0;
      void'(model.pop_front());
      #1 check_state();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_can_brp: checks the prescaler period 2*(BRP+1) for BRP = 0..31 and
// after a change of BRP on the fly.
module tb_can_brp;
  logic       clk = 0, rst_n = 0;
  logic [4:0] brp;
  logic       tq_en;
  int checks = 0, failures = 0;

  can_brp dut (.clk, .rst_n, .brp, .tq_en);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Cycles between the next two pulses.
  task automatic measure(output int n);
    n = 0;
    do @(posedge clk); while (!tq_en);
    do begin @(posedge clk); n++; end while (!tq_en);
  endtask

  initial begin
    int n;
    brp = 5'd0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 32; b++) begin
      brp = 5'(b);
      measure(n);  // first period may be partial after a change
      for (int k = 0; k < 3; k++) begin
        measure(n);
        checks++;
        if (n != 2 * (b + 1)) begin
          failures++;
          $display("FAIL brp=%0d period=%0d expected %0d", b, n, 2 * (b + 1));
        end
      end
    end
    // Lower BRP while the counter is high: the next period must not run away.
    brp = 5'd31;
    measure(n);
    repeat (40) @(posedge clk);
    brp = 5'd2;
    measure(n);
    checks++;
    if (n != 6) begin failures++; $display("FAIL after change: %0d", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

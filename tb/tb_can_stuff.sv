// tb_can_stuff: sends stuffed random frames through the de-stuffer and
// expects the original bits back, then inserts a sixth equal bit and
// expects a stuff error; with `en` low no bit may be removed.
module tb_can_stuff;
  import can_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic en, in_valid, in_bit;
  logic out_valid, out_bit, stuff_err, run5;
  int checks = 0, failures = 0;
  bitq_t got;
  int    nerr;

  can_stuff dut (.clk, .rst_n, .en, .in_valid, .in_bit, .out_valid, .out_bit,
                 .stuff_err, .run5);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (out_valid) got.push_back(out_bit);
    if (stuff_err) nerr++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(bitq_t q);
    foreach (q[i]) begin
      in_valid = 1; in_bit = q[i];
      @(posedge clk);
      in_valid = 0;
      repeat (3) @(posedge clk);
    end
    repeat (2) @(posedge clk);
  endtask

  task automatic idle(int n);
    bitq_t q;
    for (int i = 0; i < n; i++) q.push_back(1'b1);
    en = 0; send(q);
  endtask

  initial begin
    bitq_t raw, st;
    en = 0; in_valid = 0; in_bit = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      idle(11);
      raw = frame_unstuffed(1'($urandom), 1'($urandom), 11'($urandom), 18'($urandom),
                            4'($urandom_range(0, 8)),
                            (t % 4 == 0) ? 64'h0 : {$urandom, $urandom}, 1'b0);
      st = stuff(raw);
      got.delete(); nerr = 0;
      en = 1;
      send(st);
      checks++;
      if (got != raw || nerr != 0) begin
        failures++;
        $display("FAIL frame %0d: %0d bits in, %0d out, %0d errors", t, raw.size(), got.size(), nerr);
      end
    end
    // Six equal bits inside a stuffed field.
    idle(11);
    got.delete(); nerr = 0;
    en = 1;
    send('{0, 1, 1, 1, 1, 1, 1});
    checks++;
    if (nerr != 1) begin failures++; $display("FAIL no stuff error (%0d)", nerr); end
    checks++;
    if (got.size() != 6) begin failures++; $display("FAIL %0d bits before error", got.size()); end
    // With de-stuffing off every bit passes.
    en = 0; got.delete(); nerr = 0;
    send('{1, 1, 1, 1, 1, 1, 1, 0, 0, 0, 0, 0, 0, 0});
    checks++;
    if (got.size() != 14 || nerr != 0) begin failures++; $display("FAIL pass-through"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

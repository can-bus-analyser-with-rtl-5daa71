// tb_can_crc: feeds random frames' bits into the CRC register and compares
// the result with the reference CRC from polynomial long division; then
// shifts the CRC itself in and expects a zero remainder (crc_ok), and a
// corrupted CRC must leave crc_ok low.
module tb_can_crc;
  import can_tb_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        clr, en, bit_in;
  logic [14:0] crc;
  logic        crc_ok;
  int checks = 0, failures = 0;

  can_crc dut (.clk, .rst_n, .clr, .en, .bit_in, .crc, .crc_ok);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic shift(bitq_t q);
    foreach (q[i]) begin
      en = 1; bit_in = q[i];
      @(posedge clk);
    end
    en = 0;
    @(posedge clk);
  endtask

  initial begin
    bitq_t m;
    bit [14:0] ref_crc;
    clr = 0; en = 0; bit_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int len;
      len = 20 + $urandom_range(0, 100);
      m.delete();
      m.push_back(1'b0);
      for (int i = 1; i < len; i++) m.push_back(1'($urandom));
      clr = 1; @(posedge clk); clr = 0;
      shift(m);
      ref_crc = crc15(m);
      checks++;
      if (crc !== ref_crc) begin
        failures++;
        $display("FAIL crc %h expected %h", crc, ref_crc);
      end
      // Append the CRC (optionally corrupted) and check the remainder.
      begin
        bitq_t c;
        bit bad;
        bad = (t % 3 == 2);
        c.delete();
        for (int i = 14; i >= 0; i--) c.push_back(ref_crc[i] ^ (bad && i == 4));
        shift(c);
        checks++;
        if (crc_ok !== !bad) begin
          failures++;
          $display("FAIL crc_ok=%0d bad=%0d", crc_ok, bad);
        end
      end
    end
    // Clear wins over enable.
    clr = 1; en = 1; bit_in = 1; @(posedge clk); clr = 0; en = 0; @(posedge clk);
    checks++;
    if (crc !== 15'h0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

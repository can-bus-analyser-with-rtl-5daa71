// tb_can_btl: a transmitter model drives stuffed random frames onto the
// line with a bit time a little longer or shorter than the receiver's
// (clock drift), and the sampled bits must equal the sent bits. The drift
// adds up to several bit times over a frame, so without resynchronisation
// the bits would be lost. Also checks the delay from the start-of-frame
// edge (hard synchronisation) to the first sample point.
// The quantum enable is generated here: one pulse every 2 clk cycles.
module tb_can_btl;
  import can_pkg::*;
  import can_tb_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        tq_en, rx, hard_sync_en;
  bit_timing_t timing;
  logic        sample_valid, sample_bit, resync, hard_sync;
  int checks = 0, failures = 0;
  bitq_t got;
  bit    capture, armed;
  int    n_resync, n_hard, cyc, first_sample_cyc;

  can_btl dut (.clk, .rst_n, .tq_en, .rx, .timing, .hard_sync_en,
               .sample_valid, .sample_bit, .resync, .hard_sync);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    tq_en <= !tq_en;
    if (resync) n_resync++;
    if (hard_sync) n_hard++;
    if (hard_sync && capture) armed <= 1'b1;
    if (sample_valid && capture && armed) begin
      if (got.size() == 0) first_sample_cyc = cyc;
      got.push_back(sample_bit);
      hard_sync_en <= 1'b0;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One frame: idle, then the stuffed frame at the given bit period (in
  // time units; the clock period is 10).
  task automatic run_frame(int period, int prop, int ph1, int ph2, int sjw);
    bitq_t raw, st;
    int sof_cyc, nominal, delay;
    timing = '{brp: 5'd0, prop_seg: 4'(prop), phase_seg1: 4'(ph1),
               phase_seg2: 4'(ph2), sjw: 3'(sjw)};
    nominal = 2 * (1 + prop + ph1 + ph2) * 5;  // bit time in time units
    rx = 1;
    #(20 * nominal);
    raw = frame_unstuffed(1'b1, 1'b0, 11'($urandom), 18'($urandom), 4'd8,
                          {$urandom, $urandom}, 1'b0);
    st = stuff(raw);
    for (int i = 0; i < 10; i++) st.push_back(1'b1);
    got.delete();
    armed = 0;
    capture = 1;
    hard_sync_en = 1;
    #($urandom_range(0, 9));  // random phase against the clock
    sof_cyc = cyc;
    foreach (st[i]) begin
      rx = st[i];
      #(period);
    end
    #(2 * nominal);
    capture = 0;
    checks++;
    while (got.size() > st.size()) void'(got.pop_back());
    if (got != st) begin
      failures++;
      $display("FAIL period %0d/%0d: %0d bits sent, %0d sampled", period, nominal,
               st.size(), got.size());
    end
    // First sample point: 1 + PROP_SEG + PHASE_SEG1 quanta after the edge,
    // plus up to 2 cycles of synchroniser and 2 of quantum alignment.
    delay = first_sample_cyc - sof_cyc;
    checks++;
    if (delay < 2 * (1 + prop + ph1) - 2 || delay > 2 * (1 + prop + ph1) + 4) begin
      failures++;
      $display("FAIL first sample %0d cycles after SOF", delay);
    end
  endtask

  initial begin
    int r0;
    rx = 1; hard_sync_en = 1; capture = 0; tq_en = 0; cyc = 0;
    timing = TIMING_RESET;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(200, 3, 3, 3, 2);   // no drift
    r0 = n_resync;
    run_frame(202, 3, 3, 3, 2);   // transmitter 1 % slow
    run_frame(198, 3, 3, 3, 2);   // transmitter 1 % fast
    run_frame(183, 1, 4, 3, 3);   // 9 quanta, transmitter 1.7 % slow
    run_frame(177, 1, 4, 3, 3);   // transmitter 1.7 % fast
    run_frame(164, 1, 3, 3, 1);   // 8 quanta, 2.5 % slow
    run_frame(156, 1, 3, 3, 1);   // 2.5 % fast
    checks++;
    if (n_resync <= r0) begin failures++; $display("FAIL no resynchronisation seen"); end
    checks++;
    if (n_hard != 7) begin failures++; $display("FAIL %0d hard syncs", n_hard); end
    $display("resyncs=%0d hard_syncs=%0d", n_resync, n_hard);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// can_btl: CAN bit timing logic.
//
// Splits every bit time into time quanta (one per tq_en pulse from the
// prescaler): a one-quantum SYNC_SEG, then TSEG1 = PROP_SEG + PHASE_SEG1,
// then TSEG2 = PHASE_SEG2. The bus is sampled once per bit, at the end of
// TSEG1. The programmable ranges (PROP_SEG, PHASE_SEG1, PHASE_SEG2 in
// 1..8, SJW in 1..4) are the original block's; the synchronisation rules
// are those of the CAN specification:
//  * hard synchronisation: while hard_sync_en is high (bus idle), a
//    recessive-to-dominant edge restarts the bit; the quantum holding the
//    edge becomes SYNC_SEG;
//  * resynchronisation: otherwise, an edge in TSEG1 (late) lengthens TSEG1
//    by min(phase error, SJW); an edge in TSEG2 (early) shortens TSEG2 by
//    min(phase error, SJW), and when the error is within SJW the edge quantum
//    becomes the SYNC_SEG of the next bit. At most one synchronisation
//    happens between two sample points.
// The line is passed through a two-flop synchroniser; edges are found by
// comparing the line at successive quantum ticks. Out-of-range timing
// values are clamped into range here.
//
// Interface: rx (asynchronous), timing, hard_sync_en in; sample_valid (one
// clk pulse per bit), sample_bit, resync (pulse when a resynchronisation
// moved the bit boundary) and hard_sync (pulse on a hard synchronisation).
module can_btl
  import can_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tq_en,
  input  logic        rx,
  input  bit_timing_t timing,
  input  logic        hard_sync_en,
  output logic        sample_valid,
  output logic        sample_bit,
  output logic        resync,
  output logic        hard_sync
);

  typedef enum logic [1:0] {SEG_SYNC, SEG_TSEG1, SEG_TSEG2} seg_e;

  logic [1:0] rx_meta;
  logic       rx_s, prev_rx, edge_fall;
  seg_e       seg;
  logic [4:0] cnt;        // quantum index inside the current segment
  logic [4:0] tseg1_lim;  // TSEG1 length including any lengthening
  logic [4:0] tseg2_lim;  // TSEG2 length including any shortening
  logic       synced;     // a synchronisation already happened in this bit

  // Clamped timing values.
  logic [4:0] prop, ph1, ph2, sjw;
  always_comb begin
    prop = (timing.prop_seg   == 0) ? 5'd1 : (timing.prop_seg   > 8) ? 5'd8 : {1'b0, timing.prop_seg};
    ph1  = (timing.phase_seg1 == 0) ? 5'd1 : (timing.phase_seg1 > 8) ? 5'd8 : {1'b0, timing.phase_seg1};
    ph2  = (timing.phase_seg2 == 0) ? 5'd1 : (timing.phase_seg2 > 8) ? 5'd8 : {1'b0, timing.phase_seg2};
    sjw  = (timing.sjw        == 0) ? 5'd1 : (timing.sjw        > 4) ? 5'd4 : {2'b0, timing.sjw};
  end

  assign rx_s      = rx_meta[1];
  assign edge_fall = prev_rx & ~rx_s;

  // Next-state values for the segment counter, worked out per quantum.
  logic [4:0] lim1, err2, lim2;
  always_comb begin
    lim1 = tseg1_lim;
    if (seg == SEG_TSEG1 && edge_fall && !synced)
      lim1 = tseg1_lim + ((cnt + 5'd1 < sjw) ? cnt + 5'd1 : sjw);
    err2 = ph2 - cnt;  // how early an edge in TSEG2 is, in quanta
    lim2 = tseg2_lim;
    if (seg == SEG_TSEG2 && edge_fall && !synced)
      lim2 = ph2 - sjw;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_meta      <= 2'b11;
      prev_rx      <= 1'b1;
      seg          <= SEG_SYNC;
      cnt          <= '0;
      tseg1_lim    <= 5'd2;
      tseg2_lim    <= 5'd1;
      synced       <= 1'b0;
      sample_valid <= 1'b0;
      sample_bit   <= 1'b1;
      resync       <= 1'b0;
      hard_sync    <= 1'b0;
    end else begin
      rx_meta      <= {rx_meta[0], rx};
      sample_valid <= 1'b0;
      resync       <= 1'b0;
      hard_sync    <= 1'b0;
      if (tq_en) begin
        prev_rx <= rx_s;
        if (hard_sync_en && edge_fall) begin
          // This quantum was SYNC_SEG; continue with TSEG1.
          seg       <= SEG_TSEG1;
          cnt       <= '0;
          tseg1_lim <= prop + ph1;
          synced    <= 1'b1;
          hard_sync <= 1'b1;
        end else begin
          unique case (seg)
            SEG_SYNC: begin
              seg       <= SEG_TSEG1;
              cnt       <= '0;
              tseg1_lim <= prop + ph1;
            end
            SEG_TSEG1: begin
              if (lim1 != tseg1_lim) begin
                synced <= 1'b1;
                resync <= 1'b1;
              end
              tseg1_lim <= lim1;
              if (cnt + 5'd1 >= lim1) begin
                sample_valid <= 1'b1;
                sample_bit   <= rx_s;
                seg          <= SEG_TSEG2;
                cnt          <= '0;
                tseg2_lim    <= ph2;
                synced       <= 1'b0;
              end else begin
                cnt <= cnt + 5'd1;
              end
            end
            SEG_TSEG2: begin
              if (edge_fall && !synced && err2 <= sjw) begin
                // Early edge within SJW: it marks the next SYNC_SEG.
                seg       <= SEG_TSEG1;
                cnt       <= '0;
                tseg1_lim <= prop + ph1;
                synced    <= 1'b1;
                resync    <= 1'b1;
              end else begin
                tseg2_lim <= lim2;
                if (edge_fall && !synced) begin
                  synced <= 1'b1;
                  resync <= 1'b1;
                end
                if (cnt + 5'd1 >= lim2) begin
                  seg <= SEG_SYNC;
                  cnt <= '0;
                end else begin
                  cnt <= cnt + 5'd1;
                end
              end
            end
            default: seg <= SEG_SYNC;
          endcase
        end
      end
    end
  end

endmodule

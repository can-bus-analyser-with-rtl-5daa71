// can_stack: FIFO memory for decoded messages.
//
// Stores the records written by the frame decoder until the PC reads them
// through the parallel-port controller. The memory is a plain array of
// message records, which synthesis maps to embedded RAM blocks, as the
// original design placed its FIFO in the FPGA's embedded memory. The depth
// is a parameter (16 records by default, a choice of this design).
// The read side is show-ahead: rd_msg always shows the oldest record and
// rd_en removes it. A write into a full FIFO is dropped and sets the
// sticky `overflow` flag, which ovf_clr clears.
//
// Interface: wr_en/wr_msg, rd_en/rd_msg, empty, full, count, overflow,
// ovf_clr. Timing: a written record is visible on rd_msg the next cycle.
module can_stack
  import can_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  can_msg_t                   wr_msg,
  input  logic                       rd_en,
  output can_msg_t                   rd_msg,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overflow,
  input  logic                       ovf_clr
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  can_msg_t        mem [DEPTH];
  logic [AW-1:0]   wptr, rptr;
  logic            do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign do_rd = rd_en && !empty;
  assign do_wr = wr_en && !full;
  assign rd_msg = mem[rptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_msg;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wptr <= next_ptr(wptr);
      if (do_rd) rptr <= next_ptr(rptr);
      count <= count + {{($bits(count)-1){1'b0}}, do_wr} - {{($bits(count)-1){1'b0}}, do_rd};
      if (wr_en && full)  overflow <= 1'b1;
      else if (ovf_clr)   overflow <= 1'b0;
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   rd_en |-> !empty);

endmodule

// can_tb_pkg: reference CAN frame builder for the testbenches.
//
// Builds the bit sequence of CAN 2.0A/2.0B data and remote frames the way
// a transmitter puts them on the bus: frame fields, CRC-15 computed by
// polynomial long division (independent of the shift-register form used in
// the design), bit stuffing after five equal bits, and the unstuffed tail
// (CRC delimiter, ACK slot, ACK delimiter, EOF, intermission).
package can_tb_pkg;

  typedef bit bitq_t[$];

  // Append the low n bits of v, most significant first.
  function automatic void push_bits(ref bitq_t q, input bit [63:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(v[i]);
  endfunction

  // SOF up to the end of the data field.
  function automatic bitq_t frame_head(bit ide, bit rtr, bit [10:0] id1,
                                       bit [17:0] id2, bit [3:0] dlc,
                                       bit [63:0] data);
    bitq_t q;
    int nbytes;
    q.push_back(1'b0);                 // SOF
    push_bits(q, 64'(id1), 11);
    if (!ide) begin
      q.push_back(rtr);                // RTR
      q.push_back(1'b0);               // IDE
      q.push_back(1'b0);               // r0
    end else begin
      q.push_back(1'b1);               // SRR
      q.push_back(1'b1);               // IDE
      push_bits(q, 64'(id2), 18);
      q.push_back(rtr);                // RTR
      q.push_back(1'b0);               // r1
      q.push_back(1'b0);               // r0
    end
    push_bits(q, 64'(dlc), 4);
    nbytes = (dlc > 8) ? 8 : int'(dlc);
    if (!rtr)
      for (int i = 0; i < nbytes * 8; i++) q.push_back(data[63 - i]);
    return q;
  endfunction

  // Remainder of M(x) * x^15 divided by the CAN generator polynomial.
  function automatic bit [14:0] crc15(bitq_t m);
    bit g[16] = '{1,1,0,0,0,1,0,1,1,0,0,1,1,0,0,1}; // x^15 .. x^0
    bit w[$];
    bit [14:0] r;
    w = m;
    for (int i = 0; i < 15; i++) w.push_back(1'b0);
    for (int i = 0; i + 15 < w.size(); i++)
      if (w[i])
        for (int j = 0; j < 16; j++) w[i + j] = w[i + j] ^ g[j];
    for (int i = 0; i < 15; i++) r[14 - i] = w[w.size() - 15 + i];
    return r;
  endfunction

  // Insert a complementary bit after every five equal bits.
  function automatic bitq_t stuff(bitq_t b);
    bitq_t q;
    int run = 0;
    bit last = 1'b1;
    foreach (b[i]) begin
      if (i != 0 && b[i] == last) run++; else run = 1;
      last = b[i];
      q.push_back(b[i]);
      if (run == 5) begin
        q.push_back(!last);
        last = !last;
        run  = 1;
      end
    end
    return q;
  endfunction

  // Frame bits with CRC, before stuffing; crc_flip inverts the CRC's LSB.
  function automatic bitq_t frame_unstuffed(bit ide, bit rtr, bit [10:0] id1,
                                            bit [17:0] id2, bit [3:0] dlc,
                                            bit [63:0] data, bit crc_flip);
    bitq_t q;
    bit [14:0] c;
    q = frame_head(ide, rtr, id1, id2, dlc, data);
    c = crc15(q);
    c[0] = c[0] ^ crc_flip;
    push_bits(q, 64'(c), 15);
    return q;
  endfunction

  // Unstuffed tail: CRC delimiter, ACK slot, ACK delimiter, 7 EOF bits,
  // 3 intermission bits.
  function automatic bitq_t frame_tail(bit acked);
    bitq_t q;
    q.push_back(1'b1);
    q.push_back(!acked);
    q.push_back(1'b1);
    for (int i = 0; i < 10; i++) q.push_back(1'b1);
    return q;
  endfunction

  // Data bytes of a frame, aligned as the design stores them (first byte
  // in [63:56], unused bytes zero).
  function automatic bit [63:0] stored_data(bit rtr, bit [3:0] dlc, bit [63:0] data);
    int nbytes = (dlc > 8) ? 8 : int'(dlc);
    bit [63:0] d = '0;
    if (!rtr)
      for (int i = 0; i < nbytes * 8; i++) d[63 - i] = data[63 - i];
    return d;
  endfunction

endpackage

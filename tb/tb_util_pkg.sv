// tb_util_pkg: helpers shared by the testbenches.
//
// - building IPv4/TCP packets as byte queues, with correct IP header and TCP
//   checksums (computed here independently of the RTL);
// - a small microcode assembler for the field extractor / modifier;
// - the reference programs: the RPM extractor program that pulls out the
//   stateful-inspection fields (IP header length and total length, TCP
//   sequence and acknowledgement numbers, data offset, flags, window,
//   checksum) plus the addresses and ports used for address translation, the
//   matching modifier program, and the classifier's 5-tuple program;
// - CRC and one's-complement reference functions.
package tb_util_pkg;

  typedef logic [7:0] bq_t [$];

  // ---------------- microcode assembler ----------------
  function automatic logic [31:0] i_end();
    return 32'h0;
  endfunction
  function automatic logic [31:0] i_extr(int fld, int off, int shift, int width);
    return {4'd1, 4'(fld), 7'(off), 5'(shift), 6'(width), 6'd0};
  endfunction
  function automatic logic [31:0] i_addb(int fld);
    return {4'd2, 4'(fld), 24'd0};
  endfunction
  function automatic logic [31:0] i_setb(int imm);
    return {4'd3, 22'd0, 6'(imm)};
  endfunction
  function automatic logic [31:0] i_repl(int fld, int off, int shift, int width);
    return {4'd4, 4'(fld), 7'(off), 5'(shift), 6'(width), 6'd0};
  endfunction
  function automatic logic [31:0] i_csum(int off);
    return {4'd5, 4'd0, 7'(off), 17'd0};
  endfunction

  // Field register numbers used by the reference programs.
  localparam int F_IP_HLEN = 0, F_IP_LEN = 1, F_SQN = 2, F_ACK = 3, F_OFF = 4,
                 F_FLAGS = 5, F_WIN = 6, F_CKSUM = 7, F_SRC = 8, F_DST = 9,
                 F_SPORT = 10, F_DPORT = 11;

  // RPM extractor program: stateful-inspection fields plus NAT fields.
  function automatic void rpm_fex_prog(ref logic [31:0] p [$]);
    p = {};
    p.push_back(i_extr(F_IP_HLEN, 0, 24, 4));
    p.push_back(i_extr(F_IP_LEN, 0, 0, 16));
    p.push_back(i_extr(F_SRC, 12, 0, 32));
    p.push_back(i_extr(F_DST, 16, 0, 32));
    p.push_back(i_addb(F_IP_HLEN));
    p.push_back(i_extr(F_SPORT, 0, 16, 16));
    p.push_back(i_extr(F_DPORT, 0, 0, 16));
    p.push_back(i_extr(F_SQN, 4, 0, 32));
    p.push_back(i_extr(F_ACK, 8, 0, 32));
    p.push_back(i_extr(F_OFF, 12, 28, 4));
    p.push_back(i_extr(F_FLAGS, 12, 16, 6));
    p.push_back(i_extr(F_WIN, 12, 0, 16));
    p.push_back(i_extr(F_CKSUM, 16, 16, 16));
    p.push_back(i_end());
  endfunction

  // RPM modifier program: source address and port translation.
  function automatic void rpm_fmo_prog(ref logic [31:0] p [$]);
    p = {};
    p.push_back(i_repl(F_SRC, 12, 0, 32));
    p.push_back(i_addb(F_IP_HLEN));
    p.push_back(i_repl(F_SPORT, 0, 16, 16));
    p.push_back(i_repl(F_CKSUM, 16, 16, 16));
    p.push_back(i_setb(0));
    p.push_back(i_csum(0));
    p.push_back(i_end());
  endfunction

  // Classifier program: key = {src, dst, sport:dport, protocol, 0}.
  function automatic void cls_fex_prog(ref logic [31:0] p [$]);
    p = {};
    p.push_back(i_extr(0, 12, 0, 32));
    p.push_back(i_extr(1, 16, 0, 32));
    p.push_back(i_extr(3, 8, 16, 8));
    p.push_back(i_extr(4, 0, 24, 4));   // scratch: header length
    p.push_back(i_addb(4));
    p.push_back(i_extr(2, 0, 0, 32));
    p.push_back(i_setb(0));
    p.push_back(i_extr(4, 0, 0, 0));    // width 0: clear field 4
    p.push_back(i_end());
  endfunction

  // ---------------- checksums ----------------
  function automatic logic [15:0] ones_sum(bq_t b, int from, int n, logic [31:0] init);
    logic [31:0] acc;
    acc = init;
    for (int i = 0; i < n; i += 2) begin
      acc += {b[from+i], (i + 1 < n) ? b[from+i+1] : 8'h00};
    end
    while (acc[31:16] != 0) acc = {16'h0, acc[15:0]} + {16'h0, acc[31:16]};
    return acc[15:0];
  endfunction

  // IPv4 + TCP packet. ihl in 32-bit words (5..15), payload of plen bytes.
  function automatic bq_t make_tcp(logic [31:0] src, logic [31:0] dst, logic [15:0] sport,
                                   logic [15:0] dport, logic [31:0] sqn, logic [31:0] ack,
                                   logic [5:0] flags, logic [15:0] win, int ihl, int plen,
                                   int seed);
    bq_t b;
    int  tot, th;
    logic [15:0] ck;
    logic [31:0] ph;
    tot = ihl*4 + 20 + plen;
    th  = ihl*4;
    b = {};
    for (int i = 0; i < tot; i++) b.push_back(8'h00);
    b[0] = {4'd4, 4'(ihl)};  b[1] = 8'h00;
    b[2] = 8'(tot >> 8);     b[3] = 8'(tot);
    b[4] = 8'h12; b[5] = 8'h34; b[6] = 8'h40; b[7] = 8'h00;
    b[8] = 8'd64; b[9] = 8'd6;
    {b[12], b[13], b[14], b[15]} = src;
    {b[16], b[17], b[18], b[19]} = dst;
    for (int i = 20; i < th; i++) b[i] = 8'h01;        // NOP options
    ck = ~ones_sum(b, 0, th, 0);
    {b[10], b[11]} = ck;
    {b[th+0], b[th+1]} = sport;
    {b[th+2], b[th+3]} = dport;
    {b[th+4], b[th+5], b[th+6], b[th+7]} = sqn;
    {b[th+8], b[th+9], b[th+10], b[th+11]} = ack;
    b[th+12] = 8'h50;
    b[th+13] = {2'b00, flags};
    {b[th+14], b[th+15]} = win;
    for (int i = 0; i < plen; i++) b[th+20+i] = 8'((seed * 7 + i * 13) ^ (i >> 3));
    // TCP checksum with the pseudo header
    ph = 32'(src[31:16]) + 32'(src[15:0]) + 32'(dst[31:16]) + 32'(dst[15:0]) + 32'd6 + 32'(tot - th);
    ck = ~ones_sum(b, th, tot - th, ph);
    {b[th+16], b[th+17]} = ck;
    return b;
  endfunction

  // RFC 1624 incremental update of a checksum when one 16-bit word changes.
  function automatic logic [15:0] ck_update(logic [15:0] ck, logic [15:0] oldw, logic [15:0] neww);
    logic [31:0] acc;
    logic [15:0] nck, nold;
    nck  = ~ck;
    nold = ~oldw;
    acc  = {16'd0, nck} + {16'd0, nold} + {16'd0, neww};
    while (acc[31:16] != 0) acc = {16'h0, acc[15:0]} + {16'h0, acc[31:16]};
    return ~acc[15:0];
  endfunction

  // Bit-serial CRC, MSB first, over a byte queue.
  function automatic logic [31:0] crc_ref(bq_t b, int width, logic [31:0] poly,
                                          logic [31:0] init, logic [31:0] xorout);
    logic [31:0] c, top;
    c   = init;
    top = 32'h1 << (width - 1);
    for (int i = 0; i < b.size(); i++)
      for (int k = 7; k >= 0; k--) begin
        logic fb;
        fb = ((c & top) != 0) ^ b[i][k];
        c  = (c << 1);
        if (fb) c = c ^ poly;
        c = c & ((width == 32) ? 32'hFFFF_FFFF : ((32'h1 << width) - 1));
      end
    return c ^ xorout;
  endfunction

endpackage

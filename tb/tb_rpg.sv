// tb_rpg: RPM glue logic between a stand-in extractor (this testbench), the
// behavioural RISC model, a control RAM of 256 flows and a stand-in field
// modifier that accepts records at random times.
//
// 200 field records for 16 flows are offered back to back with random field
// values. Each record that comes out must carry the input fields, rewritten
// exactly as the flow's policy says (translated source address and port and
// an incrementally updated checksum, computed here from the input), the
// verdict of the policy, and the tag of its input, in input order. Afterwards
// every flow's state word must show the number of packets seen. The run must
// show both register-file halves full at once, RISC stalls passed on as the
// RPM stall, and back-pressure from the modifier.
module tb_rpg;
  import pro3_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       f_valid = 0, f_ready, n_valid, n_ready = 0, n_accept;
  field_t     f_fields [NFIELDS];
  field_t     n_fields [NFIELDS];
  rpm_tag_t   f_tag = '0, n_tag;
  logic [1:0] cr_req, cr_we, cr_gnt, cr_rvalid;
  flow_t      cr_addr [2];
  logic [63:0] cr_wdata [2];
  logic [63:0] cr_rdata;
  logic        risc_start, risc_bank, risc_we, risc_done, risc_stall, rpm_stall;
  logic [4:0]  risc_addr;
  logic [31:0] risc_wdata, risc_rdata;
  logic [1:0]  bank_full;
  int          n_done, n_stalls;

  rpg dut (.clk, .rst_n, .f_valid, .f_ready, .f_fields, .f_tag,
    .cr_req(cr_req[0]), .cr_we(cr_we[0]), .cr_addr(cr_addr[0]), .cr_wdata(cr_wdata[0]),
    .cr_gnt(cr_gnt[0]), .cr_rvalid(cr_rvalid[0]), .cr_rdata,
    .risc_start, .risc_bank, .risc_addr, .risc_we, .risc_wdata, .risc_rdata, .risc_done,
    .risc_stall, .rpm_stall, .n_valid, .n_ready, .n_fields, .n_accept, .n_tag,
    .bank_full_o(bank_full));

  ctrl_ram_if #(.NCLI(2), .NFLOWS(256)) u_cr (.clk, .rst_n, .req(cr_req), .we(cr_we), .addr(cr_addr),
    .wdata(cr_wdata), .gnt(cr_gnt), .rvalid(cr_rvalid), .rdata(cr_rdata));

  risc_model #(.LAT(12), .STALL_EVERY(5), .STALL_LEN(9)) u_risc (.clk, .start(risc_start),
    .addr(risc_addr), .we(risc_we), .wdata(risc_wdata), .rdata(risc_rdata), .done(risc_done),
    .stall(risc_stall), .n_done, .n_stalls);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cr_write(input int f, input logic [63:0] v);
    @(negedge clk); cr_req[1] = 1; cr_we[1] = 1; cr_addr[1] = flow_t'(f); cr_wdata[1] = v;
    #1 while (!cr_gnt[1]) begin @(negedge clk); #1; end
    @(negedge clk); cr_req[1] = 0; cr_we[1] = 0;
  endtask
  task automatic cr_read(input int f, output logic [63:0] v);
    @(negedge clk); cr_req[1] = 1; cr_we[1] = 0; cr_addr[1] = flow_t'(f);
    #1 while (!cr_gnt[1]) begin @(negedge clk); #1; end
    @(negedge clk); cr_req[1] = 0;
    while (!cr_rvalid[1]) @(negedge clk);
    v = cr_rdata;
  endtask

  // flows 0..7 translate, 8..11 pass, 12..15 blocked
  function automatic logic [63:0] policy(int f);
    if (f < 8) return {2'b01, 14'd0, 16'(5000 + f), 32'hC0A8_0000 + 32'(f)};
    if (f < 12) return 64'd0;
    return {2'b10, 62'd0};
  endfunction

  typedef struct { field_t fl [NFIELDS]; logic acc; rpm_tag_t tag; } rec_t;
  rec_t exp_q [$];
  int   cnt [16];
  int   both_full = 0, bp = 0, got = 0, stall_seen = 0;
  always @(posedge clk) begin
    if (bank_full == 2'b11) both_full++;
    if (n_valid && !n_ready) bp++;
    if (rpm_stall) stall_seen++;
    checks++;
    if (rpm_stall !== risc_stall) begin failures++; $display("FAIL: rpm_stall"); end
  end

  // modifier stand-in
  always @(negedge clk) n_ready <= ($urandom % 3) != 0;
  always @(posedge clk) if (rst_n && n_valid && n_ready) begin
    got++;
    check(exp_q.size() > 0, "record expected");
    if (exp_q.size() > 0) begin
      bit same;
      same = 1;
      for (int i = 0; i < NFIELDS; i++) if (n_fields[i] !== exp_q[0].fl[i]) same = 0;
      check(same, $sformatf("record %0d fields", got));
      check(n_accept === exp_q[0].acc, $sformatf("record %0d verdict", got));
      check(n_tag === exp_q[0].tag, $sformatf("record %0d tag", got));
      void'(exp_q.pop_front());
    end
  end

  initial begin
    cr_req[1] = 0; cr_we[1] = 0; cr_addr[1] = '0; cr_wdata[1] = '0;
    foreach (f_fields[i]) f_fields[i] = '0;
    for (int f = 0; f < 16; f++) cnt[f] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 16; f++) cr_write(f, policy(f));
    for (int n = 0; n < 200; n++) begin
      rec_t e;
      int f;
      logic [63:0] pol;
      logic [15:0] nck;
      f = (n * 7) % 16;
      pol = policy(f);
      cnt[f]++;
      @(negedge clk);
      f_valid = 1;
      for (int i = 0; i < NFIELDS; i++) f_fields[i] = $urandom;
      f_fields[F_SPORT] = {16'd0, 16'($urandom)};
      f_fields[F_CKSUM] = {16'd0, 16'($urandom)};
      f_tag = '0; f_tag.flow = flow_t'(f); f_tag.len = 16'($urandom); f_tag.seg = 16'(n);
      e.fl = f_fields; e.tag = f_tag; e.acc = !pol[63];
      if (pol[62] && !pol[63]) begin
        nck = ck_update(f_fields[F_CKSUM][15:0], f_fields[F_SRC][31:16], pol[31:16]);
        nck = ck_update(nck, f_fields[F_SRC][15:0], pol[15:0]);
        nck = ck_update(nck, f_fields[F_SPORT][15:0], pol[47:32]);
        e.fl[F_SRC] = pol[31:0];
        e.fl[F_SPORT] = {16'd0, pol[47:32]};
        e.fl[F_CKSUM] = {16'd0, nck};
      end
      exp_q.push_back(e);
      #1 while (!f_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk); f_valid = 0;
    while (got < 200) @(negedge clk);
    repeat (10) @(negedge clk);
    for (int f = 0; f < 16; f++) begin
      logic [63:0] v;
      cr_read(f, v);
      check(int'(v[61:48]) == cnt[f], $sformatf("flow %0d packet count %0d expected %0d", f, v[61:48], cnt[f]));
      check(v[47:0] == pol_low(f), $sformatf("flow %0d state kept", f));
    end
    check(both_full > 0, "both register-file halves full at once");
    check(stall_seen > 0 && n_stalls > 0, "RISC stall seen as RPM stall");
    check(bp > 0, "modifier back-pressure");
    check(n_done == 200, "RISC ran once per record");
    $display("both-halves-full cycles %0d, stall cycles %0d, back-pressure cycles %0d", both_full, stall_seen, bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [47:0] pol_low(int f);
    logic [63:0] p;
    p = policy(f);
    return p[47:0];
  endfunction
endmodule

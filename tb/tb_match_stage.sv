// tb_match_stage: self-checking test of the match stage (key preparation,
// TCAM, instruction table) at its full 35-bit x 1024-entry size.
// Two TCAM rows (16 rules: exact IPv4 hosts, IPv4 prefixes, a VLAN-only
// rule, an IPv6 rule) and their instructions are loaded through the update
// ports. Random IPv4/IPv6 headers, with and without VLAN tag, whose
// destination addresses are drawn near the rules, then stream through. The
// expected result comes from a reference model of the rules (lowest index
// wins, all-zero instruction on a miss). The latency must be 4 cycles, and
// the stage must take one header per cycle; random back-pressure.
module tb_match_stage;
  import matoc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  hdr_t s_data; logic s_valid, s_ready; meta_t m_data; logic m_valid, m_ready;
  logic wr_req, rd_req, rd_vld, tcam_busy, tcam_done, it_we;
  logic [IDX_W-4:0] wr_row; logic [7:0][KEY_W-1:0] wr_data, wr_care; logic [7:0] wr_vld;
  logic [IDX_W-1:0] rd_index, it_addr; logic [KEY_W-1:0] rd_data, rd_care;
  instr_t it_wdata, it_q;
  match_stage dut (.*);

  int checks = 0, failures = 0;
  logic [KEY_W-1:0] rd_[16], rc_[16];
  instr_t ins [16];
  logic [31:0] ips [4] = '{32'h0A000001, 32'h0A000102, 32'hC0A80005, 32'h08080808};
  meta_t exp_q [$];
  hdr_t in_q [$];
  int hits = 0, misses = 0, cyc = 0, t_in = -1, t_out = -1, streak = 0, max_streak = 0;
  bit rnd = 0;

  function automatic logic [KEY_W-1:0] pfx(int n);   // care mask of an n-bit IPv4 prefix
    logic [31:0] m;
    m = (n == 0) ? 32'd0 : ~((32'd1 << (32 - n)) - 1);
    return {3'b111, m};
  endfunction

  task automatic gen();
    hdr_t h; meta_t e; byte b [64];
    int kind; bit vlan; int off; logic [31:0] ip; logic [KEY_W-1:0] key; int r;
    kind = ($urandom % 4 == 0) ? 1 : 0; vlan = $urandom % 2; off = vlan ? 4 : 0;
    foreach (b[i]) b[i] = byte'($urandom);
    ip = ips[$urandom % 4];
    if ($urandom % 3 == 0) ip[7:0] = 8'($urandom);
    if ($urandom % 5 == 0) ip = $urandom;
    if (kind == 0) {b[30+off], b[31+off], b[32+off], b[33+off]} = ip;
    else {b[38+off], b[39+off], b[40+off], b[41+off]} = ip;
    h = '0;
    foreach (b[i]) h.data[i*8 +: 8] = b[i];
    h.len = 64;
    h.pkt_type[PT_IPV4] = (kind == 0);
    h.pkt_type[PT_IPV6] = (kind == 1);
    h.pkt_type[PT_VLAN] = vlan;
    h.src_ch = 4'($urandom % 8);
    in_q.push_back(h);
    key = {vlan, kind == 1, kind == 0, ip};
    r = -1;
    for (int i = 15; i >= 0; i--) if (((key ^ rd_[i]) & rc_[i]) == 0) r = i;
    e.hdr = h; e.hit = (r >= 0); e.instr = (r >= 0) ? ins[r] : '0;
    if (r >= 0) hits++; else misses++;
    exp_q.push_back(e);
  endtask

  initial begin
    // rules: lowest index has priority
    rd_[0] = {3'b001, ips[0]};  rc_[0] = pfx(32);
    rd_[1] = {3'b001, ips[1]};  rc_[1] = pfx(32);
    rd_[2] = {3'b101, ips[2]};  rc_[2] = pfx(32);   // IPv4 + VLAN only
    rd_[3] = {3'b001, 32'h0A000000}; rc_[3] = pfx(24);
    rd_[4] = {3'b001, 32'h0A000000}; rc_[4] = pfx(16);
    rd_[5] = {3'b001, 32'hC0A80000}; rc_[5] = pfx(16);
    rd_[6] = {3'b000, ips[2]};  rc_[6] = {3'b000, 32'hFFFFFFFF};   // any type
    rd_[7] = {3'b010, ips[3]};  rc_[7] = {3'b011, 32'hFFFFFFFF};   // IPv6
    for (int i = 8; i < 16; i++) begin rd_[i] = {3'b001, 32'h08000000 + 32'(i)}; rc_[i] = pfx(32); end
    for (int i = 0; i < 16; i++) begin
      ins[i] = '0;
      ins[i].dec_ttl = 1; ins[i].set_ch = 1; ins[i].out_ch = 4'(i % 8);
      ins[i].dmac = {16'hAA00, 32'(i)}; ins[i].vlan_op = vlan_op_e'(i % 4);
    end
  end

  bit acc = 0;
  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      acc <= s_valid && s_ready;
      if (s_valid && s_ready && t_in < 0) t_in <= cyc;
      if (m_valid && t_out < 0) t_out <= cyc;
      if (m_valid && m_ready) begin
        checks++;
        streak++; if (streak > max_streak) max_streak = streak;
        if (exp_q.size() == 0 || m_data != exp_q[0]) begin
          failures++;
          if (failures < 6) $display("FAIL hit %b/%b instr %h/%h", m_data.hit, exp_q[0].hit,
                                     m_data.instr, exp_q[0].instr);
        end
        if (exp_q.size()) void'(exp_q.pop_front());
      end else streak = 0;
      m_ready <= !rnd || ($urandom % 4 != 0);
    end
  end

  always @(negedge clk) begin
    if (!s_valid || acc) begin
      if (acc) void'(in_q.pop_front());
      s_valid = (in_q.size() > 0) && (!rnd || $urandom % 5 != 0);
      if (in_q.size() > 0) s_data = in_q[0];
    end
  end

  initial begin
    s_valid = 0; s_data = '0; m_ready = 1; wr_req = 0; rd_req = 0; it_we = 0;
    wr_row = '0; wr_data = '0; wr_care = '0; wr_vld = '0; rd_index = '0; it_addr = '0; it_wdata = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    // instruction table
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); it_we = 1; it_addr = IDX_W'(i); it_wdata = ins[i];
    end
    @(negedge clk); it_we = 0;
    wait (!tcam_busy);
    for (int r = 0; r < 2; r++) begin
      @(negedge clk);
      for (int e = 0; e < 8; e++) begin wr_data[e] = rd_[r*8+e]; wr_care[e] = rc_[r*8+e]; end
      wr_vld = '1; wr_row = (IDX_W-3)'(r); wr_req = 1;
      @(negedge clk); wr_req = 0;
      @(posedge tcam_done);
    end
    // latency of a single header
    gen();
    wait (exp_q.size() == 0);
    checks++;
    if (t_out - t_in != 4) begin failures++; $display("FAIL latency %0d", t_out - t_in); end
    // full rate: 200 back-to-back headers, no stall
    repeat (3) @(posedge clk);
    max_streak = 0;
    for (int i = 0; i < 200; i++) gen();
    wait (exp_q.size() == 0);
    checks++;
    if (max_streak < 200) begin failures++; $display("FAIL rate: streak %0d", max_streak); end
    rnd = 1;
    for (int i = 0; i < 1500; i++) gen();
    wait (exp_q.size() == 0);
    checks++;
    if (hits < 100 || misses < 20) begin failures++; $display("FAIL coverage %0d %0d", hits, misses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_action_stage: self-checking test of the four actions (TTL, MAC, VLAN,
// channel). Random IPv4/IPv6/other headers, with and without VLAN tag and
// with valid IPv4 checksums, get random instructions and hit flags. The
// expected header is built here on a byte list: TTL/hop limit decrement,
// the IPv4 checksum recomputed from scratch over the 20-byte header, MAC
// overwrite, tag insertion/removal as byte insertion/deletion, channel
// choice. Every action and the expired-TTL case must occur; latency is
// checked to be 5 cycles, and random back-pressure is applied.
module tb_action_stage;
  import matoc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  meta_t s_data; logic s_valid, s_ready; logic [CH_W-1:0] miss_ch;
  hdr_t m_data; logic m_valid, m_ready;
  action_stage dut (.*);

  int checks = 0, failures = 0;
  hdr_t exp_q [$];
  meta_t in_q [$];
  int cnt_ttl = 0, cnt_exp = 0, cnt_mac = 0, cnt_ins = 0, cnt_mod = 0, cnt_rem = 0, cnt_ch = 0, cnt_miss = 0;
  int cyc = 0, t_in = -1, t_out = -1;
  bit rnd = 0;

  function automatic logic [15:0] csum(byte b [$], int start);
    logic [31:0] s;
    s = 0;
    for (int i = 0; i < 20; i += 2) s += {b[start+i], b[start+i+1]};
    while (s[31:16] != 0) s = s[15:0] + s[31:16];
    return ~s[15:0];
  endfunction

  task automatic gen();
    meta_t m;
    hdr_t h;
    byte b [$];
    int kind, off, len;
    bit vlan, expired;
    kind = $urandom % 3; vlan = $urandom % 2; off = vlan ? 4 : 0;
    len = 64;
    for (int i = 0; i < len; i++) b.push_back(byte'($urandom));
    if (vlan) begin b[12] = 8'h81; b[13] = 8'h00; end else if (b[12] == 8'h81) b[12] = 8'h00;
    case (kind)
      0: begin b[12+off] = 8'h08; b[13+off] = 8'h00; b[14+off] = 8'h45;
         if ($urandom % 6 == 0) b[22+off] = byte'($urandom % 2);
         b[24+off] = 0; b[25+off] = 0;
         {b[24+off], b[25+off]} = csum(b, 14+off); end
      1: begin b[12+off] = 8'h86; b[13+off] = 8'hDD;
         if ($urandom % 6 == 0) b[21+off] = byte'($urandom % 2); end
      default: begin b[12+off] = 8'h12; b[13+off] = 8'h34; end
    endcase
    m = '0;
    for (int i = 0; i < len; i++) m.hdr.data[i*8 +: 8] = b[i];
    m.hdr.len = 7'(len);
    m.hdr.pkt_type[PT_IPV4] = (kind == 0);
    m.hdr.pkt_type[PT_IPV6] = (kind == 1);
    m.hdr.pkt_type[PT_VLAN] = vlan;
    m.hdr.src_ch = 4'($urandom % 8);
    m.hdr.dst_ch = 4'(PS_CH);
    m.hit = ($urandom % 5 != 0);
    if (m.hit) begin
      m.instr.dec_ttl = $urandom; m.instr.set_dmac = $urandom; m.instr.set_smac = $urandom;
      m.instr.set_ch = $urandom; m.instr.vlan_op = vlan_op_e'($urandom % 4);
      m.instr.dmac = {$urandom, 16'($urandom)}; m.instr.smac = {$urandom, 16'($urandom)};
      m.instr.vlan_tci = 16'($urandom); m.instr.out_ch = 4'($urandom % 8);
    end
    in_q.push_back(m);
    // reference
    expired = 0;
    h = m.hdr;
    if (m.hit && m.instr.dec_ttl && kind == 0) begin
      if ($unsigned(b[22+off]) <= 1) expired = 1;
      else begin
        b[22+off] = b[22+off] - 1; b[24+off] = 0; b[25+off] = 0;
        {b[24+off], b[25+off]} = csum(b, 14+off); cnt_ttl++;
      end
    end
    if (m.hit && m.instr.dec_ttl && kind == 1) begin
      if ($unsigned(b[21+off]) <= 1) expired = 1; else begin b[21+off] = b[21+off] - 1; cnt_ttl++; end
    end
    if (expired) cnt_exp++;
    if (!expired && m.instr.set_dmac) for (int i = 0; i < 6; i++) b[i] = m.instr.dmac[(5-i)*8 +: 8];
    if (!expired && m.instr.set_smac) for (int i = 0; i < 6; i++) b[6+i] = m.instr.smac[(5-i)*8 +: 8];
    if (!expired && (m.instr.set_dmac || m.instr.set_smac)) cnt_mac++;
    case (expired ? VLAN_NONE : m.instr.vlan_op)
      VLAN_INSERT: if (vlan) begin b[14] = m.instr.vlan_tci[15:8]; b[15] = m.instr.vlan_tci[7:0]; cnt_mod++; end
                   else begin
                     b.insert(12, m.instr.vlan_tci[7:0]); b.insert(12, m.instr.vlan_tci[15:8]);
                     b.insert(12, 8'h00); b.insert(12, 8'h81); h.pkt_type[PT_VLAN] = 1; cnt_ins++;
                   end
      VLAN_MODIFY: if (vlan) begin b[14] = m.instr.vlan_tci[15:8]; b[15] = m.instr.vlan_tci[7:0]; cnt_mod++; end
      VLAN_REMOVE: if (vlan) begin repeat (4) b.delete(12); h.pkt_type[PT_VLAN] = 0; cnt_rem++; end
      default: ;
    endcase
    h.data = '0;
    foreach (b[i]) h.data[i*8 +: 8] = b[i];
    h.len = 7'(b.size());
    if (expired) h.dst_ch = 4'(PS_CH);
    else if (!m.hit) begin h.dst_ch = miss_ch; cnt_miss++; end
    else if (m.instr.set_ch) begin h.dst_ch = m.instr.out_ch; cnt_ch++; end
    exp_q.push_back(h);
  endtask

  bit acc = 0;
  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      acc <= s_valid && s_ready;
      if (s_valid && s_ready && t_in < 0) t_in <= cyc;
      if (m_valid && t_out < 0) t_out <= cyc;
      if (m_valid && m_ready) begin
        checks++;
        if (exp_q.size() == 0 || m_data != exp_q[0]) begin
          failures++;
          if (failures < 6) $display("FAIL hdr len %0d/%0d dst %0d/%0d type %b/%b data %b",
            m_data.len, exp_q[0].len, m_data.dst_ch, exp_q[0].dst_ch, m_data.pkt_type,
            exp_q[0].pkt_type, m_data.data == exp_q[0].data);
        end
        if (exp_q.size()) void'(exp_q.pop_front());
      end
      m_ready <= !rnd || ($urandom % 4 != 0);
    end
  end

  always @(negedge clk) begin
    if (!s_valid || acc) begin
      if (acc) void'(in_q.pop_front());
      s_valid = (in_q.size() > 0) && (!rnd || $urandom % 4 != 0);
      if (in_q.size() > 0) s_data = in_q[0];
    end
  end

  initial begin
    s_valid = 0; s_data = '0; m_ready = 1; miss_ch = 4'd8;
    repeat (3) @(posedge clk);
    rst = 0;
    gen();
    wait (exp_q.size() == 0);
    checks++;
    if (t_out - t_in != 5) begin failures++; $display("FAIL latency %0d", t_out - t_in); end
    rnd = 1;
    miss_ch = 4'd6;
    for (int i = 0; i < 1500; i++) gen();
    wait (exp_q.size() == 0);
    checks++;
    if (cnt_ttl == 0 || cnt_exp == 0 || cnt_mac == 0 || cnt_ins == 0 || cnt_mod == 0 ||
        cnt_rem == 0 || cnt_ch == 0 || cnt_miss == 0) begin
      failures++; $display("FAIL a case never occurred");
    end
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

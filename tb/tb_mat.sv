// tb_mat: self-checking test of the complete match-action table (control
// registers + match stage + action stage) through its AXI4-Lite port, at
// the default 35-bit x 1024-entry size.
// Ten rules (IPv4 prefixes, VLAN-only, IPv6, one rule without a channel)
// and their instructions are written through the register interface, the
// TCAM rows with the CMD write command. Random single-frame IPv4 / IPv6 /
// other headers of 60..64 bytes, with and without VLAN tag, then stream in
// under random output back-pressure. A byte-level reference model (rule
// search with lowest index first, TTL decrement with a from-scratch IPv4
// checksum, MAC rewrite, VLAN insert / modify / remove, channel choice)
// predicts each output header in order; data, length, VLAN type bit and
// channel are compared. Checked too: the 9-cycle latency (4 match + 5
// action), a changed MISS_CH register, a TCAM row written while headers
// flow, and that each action occurred.
module tb_mat;
  import matoc_pkg::*;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  logic [11:0] awaddr, araddr; logic awvalid, awready, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rvalid, rready; logic [31:0] wdata, rdata; logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  hdr_t s_data, m_data; logic s_valid, s_ready, m_valid, m_ready;
  mat dut (.*);

  int checks = 0, failures = 0;
  typedef byte bq_t [$];
  localparam int NR = 16;
  logic [KEY_W-1:0] rdat [NR], rcare [NR]; bit rvld [NR];
  instr_t rins [NR];
  bit row1_loaded = 0;
  logic [CH_W-1:0] miss_ch_ref = CH_W'(PS_CH);
  int c_ttl = 0, c_expired = 0, c_miss = 0, c_mac = 0, c_ins = 0, c_mod = 0, c_rem = 0;
  hdr_t exp_q [$], in_q [$];
  int cyc = 0, t_in = -1, t_out = -1, n_out = 0;
  bit rnd = 0;

  task automatic rule(int i, logic [2:0] t, logic [2:0] tm, logic [31:0] ip, int n, instr_t ins);
    logic [31:0] m;
    m = (n == 0) ? 32'd0 : ~((32'd1 << (32 - n)) - 1);
    rdat[i] = {t, ip}; rcare[i] = {tm, m}; rvld[i] = 1; rins[i] = ins;
  endtask

  function automatic logic [15:0] csum(bq_t b, int start);
    logic [31:0] s;
    s = 0;
    for (int i = 0; i < 20; i += 2) s += {b[start+i], b[start+i+1]};
    while (s[31:16] != 0) s = s[15:0] + s[31:16];
    return ~s[15:0];
  endfunction

  // reference model of the receive path: returns the output port
  function automatic int model(ref bq_t b);
    bit vlan, v4, v6, shrt, expired, hit; int off, len, r; logic [31:0] ip;
    logic [KEY_W-1:0] key; instr_t ins;
    len = b.size();
    vlan = (b[12] == 8'h81 && b[13] == 8'h00);
    off = vlan ? 4 : 0;
    v4 = (b[12+off] == 8'h08 && b[13+off] == 8'h00);
    v6 = (b[12+off] == 8'h86 && b[13+off] == 8'hDD);
    shrt = (v4 && len < 34 + off) || (v6 && len < 54 + off);
    ip = 0;
    if (v4) ip = {b[30+off], b[31+off], b[32+off], b[33+off]};
    else if (v6) ip = {b[38+off], b[39+off], b[40+off], b[41+off]};
    key = {vlan, v6, v4, ip};
    r = -1;
    for (int i = NR - 1; i >= 0; i--)
      if (rvld[i] && (i < 8 || row1_loaded) && ((key ^ rdat[i]) & rcare[i]) == 0) r = i;
    hit = (r >= 0);
    ins = hit ? rins[r] : '0;
    
    expired = 0;
    if (hit && ins.dec_ttl && !shrt) begin
      if (v4) begin
        if ($unsigned(b[22+off]) <= 1) expired = 1;
        else begin
          b[22+off] = b[22+off] - 1; b[24+off] = 0; b[25+off] = 0;
          {b[24+off], b[25+off]} = csum(b, 14+off); c_ttl++;
        end
      end else if (v6) begin
        if ($unsigned(b[21+off]) <= 1) expired = 1; else begin b[21+off] = b[21+off] - 1; c_ttl++; end
      end
    end
    if (expired) begin c_expired++; return PS_CH; end
    if (ins.set_dmac) for (int i = 0; i < 6; i++) b[i] = ins.dmac[(5-i)*8 +: 8];
    if (ins.set_smac) for (int i = 0; i < 6; i++) b[6+i] = ins.smac[(5-i)*8 +: 8];
    if (ins.set_dmac || ins.set_smac) c_mac++;
    case (ins.vlan_op)
      VLAN_INSERT: if (vlan) begin b[14] = ins.vlan_tci[15:8]; b[15] = ins.vlan_tci[7:0]; c_mod++; end
                   else begin
                     b.insert(12, ins.vlan_tci[7:0]); b.insert(12, ins.vlan_tci[15:8]);
                     b.insert(12, 8'h00); b.insert(12, 8'h81); c_ins++;
                   end
      VLAN_MODIFY: if (vlan) begin b[14] = ins.vlan_tci[15:8]; b[15] = ins.vlan_tci[7:0]; c_mod++; end
      VLAN_REMOVE: if (vlan) begin repeat (4) b.delete(12); c_rem++; end
      default: ;
    endcase
    if (!hit) begin c_miss++; return int'(miss_ch_ref); end
    if (ins.set_ch) return int'(ins.out_ch);
    return PS_CH;
  endfunction

  function automatic instr_t mk(int ch, bit ttl, bit dm, bit sm, vlan_op_e vo, logic [15:0] tci, bit setch = 1);
    instr_t r;
    r = '0; r.dec_ttl = ttl; r.set_dmac = dm; r.set_smac = sm; r.vlan_op = vo; r.vlan_tci = tci;
    r.set_ch = setch; r.out_ch = 4'(ch); r.dmac = 48'h02_00_00_00_00_10 + 48'(ch);
    r.smac = 48'h02_00_00_00_AA_00 + 48'(ch);
    return r;
  endfunction


  task automatic gen();
    bq_t b; hdr_t h, e; int off, o, len; bit vlan, v4, v6; logic [31:0] ip;
    logic [31:0] dsts [8] = '{32'h0A000100, 32'h0A000200, 32'h0A000300, 32'h0A00F000,
                             32'hC0A80000, 32'hAC100000, 32'h0B000000, 32'h63000000};
    len = 60 + $urandom % 5;
    for (int i = 0; i < len; i++) b.push_back(byte'($urandom));
    vlan = ($urandom % 3 == 0); off = vlan ? 4 : 0;
    if (vlan) begin b[12] = 8'h81; b[13] = 8'h00; end else if (b[12] == 8'h81) b[12] = 8'h00;
    ip = dsts[$urandom % (row1_loaded ? 8 : 6)] | 32'($urandom % 256);
    case ($urandom % 8)
      0: begin b[12+off] = 8'h86; b[13+off] = 8'hDD; if ($urandom % 8 == 0) b[21+off] = byte'($urandom % 2);
               {b[38+off], b[39+off], b[40+off], b[41+off]} = ip; end
      1: begin b[12+off] = 8'h90; b[13+off] = 8'h00; end
      default: begin
        b[12+off] = 8'h08; b[13+off] = 8'h00; b[14+off] = 8'h45;
        if ($urandom % 8 == 0) b[22+off] = byte'($urandom % 2);
        {b[30+off], b[31+off], b[32+off], b[33+off]} = ip;
        b[24+off] = 0; b[25+off] = 0; {b[24+off], b[25+off]} = csum(b, 14+off);
      end
    endcase
    v4 = (b[12+off] == 8'h08 && b[13+off] == 8'h00);
    v6 = (b[12+off] == 8'h86 && b[13+off] == 8'hDD);
    h = '0;
    foreach (b[i]) h.data[i*8 +: 8] = b[i];
    h.len = LEN_W'(len); h.last = 1; h.src_ch = CH_W'($urandom % N_CH); h.dst_ch = CH_W'(PS_CH);
    h.pkt_type = {1'b0, vlan, v6, v4};
    o = model(b);
    e = h; e.data = '0;
    foreach (b[i]) e.data[i*8 +: 8] = b[i];
    e.len = LEN_W'(b.size()); e.dst_ch = CH_W'(o);
    e.pkt_type[PT_VLAN] = (b[12] == 8'h81 && b[13] == 8'h00);
    in_q.push_back(h); exp_q.push_back(e);
  endtask

  task automatic axw(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); awaddr = a; wdata = d; wstrb = 4'hF; awvalid = 1; wvalid = 1;
    do @(posedge clk); while (!awready);
    @(negedge clk); awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic axr(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk); arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(negedge clk);
  endtask

  task automatic load_row(int row);
    logic [31:0] d;
    for (int e = 0; e < 8; e++) begin
      int i; i = row * 8 + e;
      axw(12'h100 + 12'(e*16) + 0, rdat[i][31:0]);
      axw(12'h100 + 12'(e*16) + 4, 32'(rdat[i][KEY_W-1:32]));
      axw(12'h100 + 12'(e*16) + 8, rcare[i][31:0]);
      axw(12'h100 + 12'(e*16) + 12, {rvld[i], 28'd0, rcare[i][KEY_W-1:32]});
      for (int w = 0; w < 4; w++) axw(12'h010 + 12'(w*4), 32'(128'(rins[i]) >> (32*w)));
      axw(12'h004, 32'(i));
      axw(12'h000, 32'h4);
    end
    axw(12'h004, 32'(row * 8));
    axw(12'h000, 32'h1);
    do axr(12'h008, d); while (d[0]);
  endtask

  // driver (negedge) and checker (posedge)
  logic acc;
  always @(posedge clk) acc <= s_valid && s_ready;
  initial begin
    s_valid = 0; s_data = '0;
    forever begin
      @(negedge clk);
      if (acc) begin void'(in_q.pop_front()); s_valid = 0; end
      if (in_q.size() > 0 && (!rnd || $urandom % 4 != 0)) begin s_data = in_q[0]; s_valid = 1; end
      else s_valid = 0;
    end
  end

  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      if (s_valid && s_ready && t_in < 0) t_in <= cyc;
      if (m_valid && m_ready) begin
        hdr_t e;
        if (t_out < 0) t_out <= cyc;
        checks++; n_out++;
        if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected header"); end
        else begin
          e = exp_q.pop_front();
          if (m_data !== e) begin
            failures++;
            if (failures < 6) $display("FAIL header %0d: dst %0d/%0d len %0d/%0d type %b/%b data %0s", n_out,
                                       m_data.dst_ch, e.dst_ch, m_data.len, e.len, m_data.pkt_type, e.pkt_type,
                                       m_data.data == e.data ? "ok" : "differs");
          end
        end
      end
      m_ready <= !rnd || ($urandom % 4 != 0);
    end
  end

  initial begin
    logic [31:0] d;
    for (int i = 0; i < NR; i++) begin rdat[i] = '0; rcare[i] = '0; rvld[i] = 0; rins[i] = '0; end
    rule(0, 3'b001, 3'b111, 32'h0A000100, 24, mk(1, 1, 1, 1, VLAN_INSERT, 16'h0064));
    rule(1, 3'b001, 3'b011, 32'h0A000200, 24, mk(2, 1, 0, 0, VLAN_REMOVE, 16'h0000));
    rule(2, 3'b101, 3'b111, 32'h0A000300, 24, mk(3, 0, 0, 0, VLAN_MODIFY, 16'h2123));
    rule(3, 3'b001, 3'b011, 32'h0A000000, 16, mk(4, 1, 1, 0, VLAN_NONE, 16'h0000));
    rule(4, 3'b010, 3'b010, 32'h00000000, 0,  mk(5, 1, 0, 0, VLAN_INSERT, 16'h0005));
    rule(5, 3'b001, 3'b011, 32'hC0A80000, 16, mk(6, 0, 0, 1, VLAN_NONE, 16'h0000));
    rule(6, 3'b001, 3'b011, 32'hAC100000, 12, mk(7, 1, 0, 0, VLAN_NONE, 16'h0000));
    rule(7, 3'b101, 3'b111, 32'h00000000, 0,  mk(0, 0, 0, 0, VLAN_NONE, 16'h0000));
    rule(8, 3'b001, 3'b011, 32'h0B000000, 8,  mk(0, 1, 1, 1, VLAN_REMOVE, 16'h0000));
    rule(9, 3'b001, 3'b011, 32'h63000000, 8,  mk(3, 1, 0, 0, VLAN_NONE, 16'h0000, 0));
    awaddr = 0; araddr = 0; awvalid = 0; wvalid = 0; arvalid = 0; wdata = 0; wstrb = 0;
    bready = 1; rready = 1; m_ready = 1;
    repeat (5) @(posedge clk);
    rst = 0;
    load_row(0);
    // latency of one header on an idle pipeline
    gen();
    while (n_out < 1) @(posedge clk);
    checks++;
    if (t_out - t_in != 9) begin failures++; $display("FAIL latency %0d", t_out - t_in); end
    // traffic with back-pressure; row 1 loaded while it flows
    rnd = 1;
    repeat (300) gen();
    load_row(1);
    while (exp_q.size() > 0) @(posedge clk);
    row1_loaded = 1;
    // misses to another channel
    axw(12'h00C, 32'd3); miss_ch_ref = 4'd3;
    axr(12'h00C, d);
    checks++; if (d != 3) begin failures++; $display("FAIL MISS_CH read %0d", d); end
    repeat (300) gen();
    while (exp_q.size() > 0) @(posedge clk);
    $display("ttl=%0d expired=%0d miss=%0d mac=%0d ins=%0d mod=%0d rem=%0d", c_ttl, c_expired, c_miss, c_mac, c_ins, c_mod, c_rem);
    checks++;
    if (c_ttl == 0 || c_expired == 0 || c_miss == 0 || c_mac == 0 || c_ins == 0 || c_mod == 0 || c_rem == 0) begin
      failures++; $display("FAIL an action never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_matoc_top: end-to-end test of the whole packet-processing design at
// its default sizes (8 channels, 1024-entry TCAM, 512-word packet buffers).
//
// The tables are loaded over AXI4-Lite with an IP-forwarding rule set
// (prefix routes with TTL decrement, MAC rewrite, VLAN insert / modify /
// remove, channel choice). Then random IPv4 (valid checksums), IPv6 and
// non-IP packets of 60..300 bytes enter on all eight receive ports at once,
// host packets enter the transmit ports and slow-path packets the PKTOUT
// port, while the Ethernet ports apply random back-pressure. Midway a new
// TCAM row is written under traffic. A reference model written here (rule
// search, byte-level actions, IPv4 checksum recomputed from scratch)
// predicts every packet; each packet received on an Ethernet port or on
// PKTIN must match one expected for that port, and none may be left over;
// pktin_tdest must name the channel a slow-path packet came in on.
// The 19-cycle latency of an idle pipeline is checked, and each mechanism
// (TTL decrement, expired TTL, miss to slow path, MAC rewrite, VLAN insert /
// modify / remove, single-frame packets, host and PKTOUT pass-through,
// multiplexer contention, back-pressure, update stretched by searches) is
// counted and must have happened.
module tb_matoc_top;
  import matoc_pkg::*;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic [N_CH-1:0][EXT_W-1:0] rx_tdata, tx_tdata, eth_tdata;
  logic [N_CH-1:0][EXT_W/8-1:0] rx_tkeep, tx_tkeep, eth_tkeep;
  logic [N_CH-1:0] rx_tlast, rx_tvalid, rx_tready, tx_tlast, tx_tvalid, tx_tready;
  logic [N_CH-1:0] eth_tlast, eth_tvalid, eth_tready;
  logic [EXT_W-1:0] pktin_tdata, pktout_tdata; logic [EXT_W/8-1:0] pktin_tkeep, pktout_tkeep;
  logic pktin_tlast, pktin_tvalid, pktin_tready, pktout_tlast, pktout_tvalid, pktout_tready;
  logic [CH_W-1:0] pktin_tdest, pktout_tdest;
  logic [11:0] s_axil_awaddr, s_axil_araddr;
  logic s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready, s_axil_bvalid, s_axil_bready;
  logic s_axil_arvalid, s_axil_arready, s_axil_rvalid, s_axil_rready;
  logic [31:0] s_axil_wdata, s_axil_rdata; logic [3:0] s_axil_wstrb; logic [1:0] s_axil_bresp, s_axil_rresp;

  matoc_top dut (.*);

  int checks = 0, failures = 0;
  typedef byte bq_t [$];

  // ---------------- reference rule set ----------------
  localparam int NR = 16;
  logic [KEY_W-1:0] rdat [NR], rcare [NR]; bit rvld [NR];
  instr_t rins [NR];
  bit row1_loaded = 0;

  task automatic rule(int i, logic [2:0] t, logic [2:0] tm, logic [31:0] ip, int n, instr_t ins);
    logic [31:0] m;
    m = (n == 0) ? 32'd0 : ~((32'd1 << (32 - n)) - 1);
    rdat[i] = {t, ip}; rcare[i] = {tm, m}; rvld[i] = 1; rins[i] = ins;
  endtask

  // ---------------- counters of mechanisms ----------------
  int c_ttl = 0, c_expired = 0, c_miss = 0, c_mac = 0, c_ins = 0, c_mod = 0, c_rem = 0;
  int c_single = 0, c_host = 0, c_pktout = 0, c_contention = 0, c_backpressure = 0;
  int c_update_stretch = 0, c_row1_hits = 0;

  // expected packets per output port (0..7 Ethernet, 8 PKTIN)
  bq_t exp_pk [9][$];
  int  exp_src [9][$];   // ingress channel, checked against pktin_tdest
  int  n_expected = 0, n_received = 0;

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
    if (r >= 8) c_row1_hits++;
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
    if (!hit) begin c_miss++; return PS_CH; end
    if (ins.set_ch) return int'(ins.out_ch);
    return PS_CH;
  endfunction

  // random packet: kind 0 IPv4 to one of the routed prefixes, 1 IPv6, 2 other.
  // The prefixes of TCAM row 1 (11/8, 99/8) are used only once that row is
  // loaded, so no packet in flight races with the update.
  function automatic bq_t make_pkt(int len);
    bq_t b; int kind, off; bit vlan; logic [31:0] ip;
    logic [31:0] dsts [8] = '{32'h0A000100, 32'h0A000200, 32'h0A000300, 32'h0A00F000,
                             32'hC0A80000, 32'hAC100000, 32'h0B000000, 32'h63000000};
    for (int i = 0; i < len; i++) b.push_back(byte'($urandom));
    kind = ($urandom % 8 == 0) ? 1 : ($urandom % 10 == 0) ? 2 : 0;
    vlan = ($urandom % 3 == 0); off = vlan ? 4 : 0;
    if (vlan) begin b[12] = 8'h81; b[13] = 8'h00; end else if (b[12] == 8'h81) b[12] = 8'h00;
    ip = dsts[$urandom % (row1_loaded ? 8 : 6)] | 32'($urandom % 256);
    if (kind == 0) begin
      b[12+off] = 8'h08; b[13+off] = 8'h00; b[14+off] = 8'h45;
      if ($urandom % 12 == 0) b[22+off] = byte'($urandom % 2);
      {b[30+off], b[31+off], b[32+off], b[33+off]} = ip;
      b[24+off] = 0; b[25+off] = 0; {b[24+off], b[25+off]} = csum(b, 14+off);
    end else if (kind == 1) begin
      b[12+off] = 8'h86; b[13+off] = 8'hDD;
      if ($urandom % 12 == 0) b[21+off] = byte'($urandom % 2);
      {b[38+off], b[39+off], b[40+off], b[41+off]} = ip;
    end else begin
      b[12+off] = 8'h90; b[13+off] = 8'h00;
    end
    return b;
  endfunction

  // ---------------- stream drivers ----------------
  bq_t rx_q [N_CH][$], tx_q [N_CH][$], po_q [$];
  int  po_dest [$];
  bit  rnd = 0;

  task automatic drive_port(int kind, int c);   // kind 0 rx, 1 tx, 2 pktout
    forever begin
      bq_t p; int len;
      @(negedge clk);
      while ((kind == 0) ? rx_q[c].size() == 0 : (kind == 1) ? tx_q[c].size() == 0
             : po_q.size() == 0) @(negedge clk);
      p = (kind == 0) ? rx_q[c][0] : (kind == 1) ? tx_q[c][0] : po_q[0];
      len = p.size();
      for (int o = 0; o < len; o += 16) begin
        logic [EXT_W-1:0] d; logic [EXT_W/8-1:0] k; bit rdy;
        d = '0; k = '0;
        for (int i = 0; i < 16; i++) if (o + i < len) begin d[i*8 +: 8] = p[o+i]; k[i] = 1; end
        while (rnd && $urandom % 8 == 0) @(negedge clk);
        if (kind == 0) begin
          rx_tdata[c] = d; rx_tkeep[c] = k; rx_tlast[c] = (o + 16 >= len); rx_tvalid[c] = 1;
        end else if (kind == 1) begin
          tx_tdata[c] = d; tx_tkeep[c] = k; tx_tlast[c] = (o + 16 >= len); tx_tvalid[c] = 1;
        end else begin
          pktout_tdata = d; pktout_tkeep = k; pktout_tlast = (o + 16 >= len);
          pktout_tdest = 4'(po_dest[0]); pktout_tvalid = 1;
        end
        do begin
          #1;
          rdy = (kind == 0) ? rx_tready[c] : (kind == 1) ? tx_tready[c] : pktout_tready;
          @(posedge clk);
          @(negedge clk);
        end while (!rdy);
        if (kind == 0) rx_tvalid[c] = 0; else if (kind == 1) tx_tvalid[c] = 0; else pktout_tvalid = 0;
      end
      if (kind == 0) void'(rx_q[c].pop_front());
      else if (kind == 1) void'(tx_q[c].pop_front());
      else begin void'(po_q.pop_front()); void'(po_dest.pop_front()); end
    end
  endtask

  // ---------------- receivers ----------------
  bq_t cur [9];
  logic [CH_W-1:0] tid_q;
  int cyc = 0;
  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      for (int o = 0; o <= N_CH; o++) begin
        bit v, r, l; logic [EXT_W-1:0] d; logic [EXT_W/8-1:0] k;
        if (o < N_CH) begin v = eth_tvalid[o]; r = eth_tready[o]; l = eth_tlast[o]; d = eth_tdata[o]; k = eth_tkeep[o]; end
        else begin v = pktin_tvalid; r = pktin_tready; l = pktin_tlast; d = pktin_tdata; k = pktin_tkeep; end
        if (v && !r) c_backpressure++;
        if (v && r) begin
          if (o == N_CH && cur[o].size() == 0) tid_q = pktin_tdest;
          for (int i = 0; i < 16; i++) if (k[i]) cur[o].push_back(d[i*8 +: 8]);
          if (l) begin
            bit found; found = 0;
            foreach (exp_pk[o][j]) if (!found && exp_pk[o][j] == cur[o]) begin
              found = 1;
              if (o == N_CH) begin
                checks++;
                if (int'(tid_q) != exp_src[o][j]) begin
                  failures++; $display("FAIL pktin_tdest %0d, packet came in on %0d", tid_q, exp_src[o][j]);
                end
              end
              exp_pk[o].delete(j); exp_src[o].delete(j);
            end
            checks++;
            n_received++;
            if (!found) begin
              failures++;
              if (failures < 8) $display("FAIL port %0d: unexpected packet of %0d bytes", o, cur[o].size());
            end
            cur[o].delete();
          end
        end
      end
      if ($countones(dut.ph_valid) > 1) c_contention++;
      if (dut.u_mat.u_match.u_tcam.state == 3'd3 && dut.u_mat.u_match.u_tcam.s_valid) c_update_stretch++;
      eth_tready <= rnd ? N_CH'($urandom) | N_CH'($urandom) : '1;
      pktin_tready <= !rnd || ($urandom % 4 != 0);
    end
  end

  // ---------------- AXI4-Lite ----------------
  task automatic axw(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); s_axil_awaddr = a; s_axil_wdata = d; s_axil_wstrb = 4'hF;
    s_axil_awvalid = 1; s_axil_wvalid = 1;
    do @(posedge clk); while (!s_axil_awready);
    @(negedge clk); s_axil_awvalid = 0; s_axil_wvalid = 0;
    while (!s_axil_bvalid) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic axr(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); s_axil_araddr = a; s_axil_arvalid = 1;
    do @(posedge clk); while (!s_axil_arready);
    @(negedge clk); s_axil_arvalid = 0;
    while (!s_axil_rvalid) @(negedge clk);
    d = s_axil_rdata;
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
      // its instruction
      for (int w = 0; w < 4; w++) axw(12'h010 + 12'(w*4), 32'(128'(rins[i]) >> (32*w)));
      axw(12'h004, 32'(i));
      axw(12'h000, 32'h4);
    end
    axw(12'h004, 32'(row * 8));
    axw(12'h000, 32'h1);
    do axr(12'h008, d); while (d[0]);
  endtask

  function automatic instr_t mk(int ch, bit ttl, bit dm, bit sm, vlan_op_e vo, logic [15:0] tci, bit setch = 1);
    instr_t r;
    r = '0; r.dec_ttl = ttl; r.set_dmac = dm; r.set_smac = sm; r.vlan_op = vo; r.vlan_tci = tci;
    r.set_ch = setch; r.out_ch = 4'(ch); r.dmac = 48'h02_00_00_00_00_10 + 48'(ch);
    r.smac = 48'h02_00_00_00_AA_00 + 48'(ch);
    return r;
  endfunction

  task automatic send_rx(int c, int len);
    bq_t b; int o;
    b = make_pkt(len);
    rx_q[c].push_back(b);
    o = model(b);
    exp_pk[o].push_back(b); exp_src[o].push_back(c);
    n_expected++;
    if (len <= 64) c_single++;
  endtask

  int lat_t0 = -1, lat_t1 = -1;
  always @(posedge clk) begin
    if (!rst && lat_t0 < 0 && rx_tvalid[0] && rx_tready[0]) lat_t0 <= cyc;
    if (!rst && lat_t0 >= 0 && lat_t1 < 0 && eth_tvalid[1]) lat_t1 <= cyc;
  end

  initial begin
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
    rx_tvalid = '0; tx_tvalid = '0; pktout_tvalid = 0; rx_tdata = '0; rx_tkeep = '0; rx_tlast = '0;
    tx_tdata = '0; tx_tkeep = '0; tx_tlast = '0; pktout_tdata = '0; pktout_tkeep = '0;
    pktout_tlast = 0; pktout_tdest = '0; eth_tready = '1; pktin_tready = 1;
    s_axil_awaddr = 0; s_axil_araddr = 0; s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_arvalid = 0;
    s_axil_wdata = 0; s_axil_wstrb = 0; s_axil_bready = 1; s_axil_rready = 1;
    repeat (5) @(posedge clk);
    rst = 0;
    for (int c = 0; c < N_CH; c++) begin
      automatic int cc = c;
      fork
        drive_port(0, cc);
        drive_port(1, cc);
      join_none
    end
    fork drive_port(2, 0); join_none
    load_row(0);
    // latency: one IPv4 packet to 10.0.1.x (rule 0, channel 1) on an idle pipeline
    begin
      bq_t b; int o;
      b = make_pkt(128);
      b[12] = 8'h08; b[13] = 8'h00; b[14] = 8'h45; b[22] = 8'd64;
      {b[30], b[31], b[32], b[33]} = 32'h0A000107;
      b[24] = 0; b[25] = 0; {b[24], b[25]} = csum(b, 14);
      rx_q[0].push_back(b);
      o = model(b);
      exp_pk[o].push_back(b); exp_src[o].push_back(0); n_expected++;
      while (n_received < 1) @(posedge clk);
      checks++;
      if (o != 1 || lat_t1 - lat_t0 != 19) begin
        failures++; $display("FAIL latency %0d (port %0d)", lat_t1 - lat_t0, o);
      end
    end
    // heavy traffic on all ports with back-pressure
    rnd = 1;
    for (int n = 0; n < 40; n++) begin
      for (int c = 0; c < N_CH; c++) send_rx(c, (n % 5 == 0) ? 60 + $urandom % 5 : 60 + $urandom % 240);
      if (n % 4 == 0) for (int c = 0; c < N_CH; c++) begin
        bq_t b; b = make_pkt(60 + $urandom % 100);
        tx_q[c].push_back(b); exp_pk[c].push_back(b); exp_src[c].push_back(-1); n_expected++; c_host++;
      end
      if (n % 5 == 0) begin
        bq_t b; int d; b = make_pkt(60 + $urandom % 100); d = $urandom % 8;
        po_q.push_back(b); po_dest.push_back(d); exp_pk[d].push_back(b); exp_src[d].push_back(-1); n_expected++; c_pktout++;
      end
    end
    // update a TCAM row while the traffic above is still flowing
    repeat (200) @(posedge clk);
    load_row(1);
    while (n_received < n_expected) @(posedge clk);
    row1_loaded = 1;
    for (int n = 0; n < 20; n++)
      for (int c = 0; c < N_CH; c++) send_rx(c, 60 + $urandom % 200);
    while (n_received < n_expected) @(posedge clk);
    repeat (20) @(posedge clk);
    for (int o = 0; o <= N_CH; o++) begin
      checks++;
      if (exp_pk[o].size() != 0) begin failures++; $display("FAIL port %0d: %0d packets missing", o, exp_pk[o].size()); end
    end
    $display("mechanisms: ttl=%0d expired=%0d miss=%0d mac=%0d vlan_ins=%0d vlan_mod=%0d vlan_rem=%0d single=%0d host=%0d pktout=%0d contention=%0d backpressure=%0d update_stretch=%0d row1_hits=%0d",
             c_ttl, c_expired, c_miss, c_mac, c_ins, c_mod, c_rem, c_single, c_host, c_pktout,
             c_contention, c_backpressure, c_update_stretch, c_row1_hits);
    begin
      int cnts [14];
      cnts = '{c_ttl, c_expired, c_miss, c_mac, c_ins, c_mod, c_rem, c_single, c_host,
                        c_pktout, c_contention, c_backpressure, c_update_stretch, c_row1_hits};
      foreach (cnts[i]) begin
        checks++;
        if (cnts[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: received %0d of %0d", n_received, n_expected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

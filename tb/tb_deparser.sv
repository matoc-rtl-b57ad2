// tb_deparser: self-checking test of the header/payload merging deparser.
//
// Uses the 16-byte frame, +/-4-byte variation configuration of the select
// table. Random packets are generated; each packet's header is its first
// frame with 4..-4 bytes added or removed (single-frame packets get any
// length), and the payload stream carries the original frames. The expected
// output is the new header bytes followed by the packet's bytes from 16 on;
// it is compared byte by byte, together with tlast placement, contiguous
// tkeep and the destination. Random valid/ready gaps exercise back-pressure.
// A directed first packet checks the one-cycle latency. Every variation
// value -4..4 must occur.
module tb_deparser;
  localparam int FB = 16, VB = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [(FB+VB)*8-1:0] h_data;
  logic [6:0] h_len;
  logic h_last, h_valid, h_ready;
  logic [3:0] h_dest;
  logic [FB*8-1:0] s_tdata;
  logic [FB-1:0] s_tkeep;
  logic s_tlast, s_tvalid, s_tready;
  logic [FB*8-1:0] m_tdata;
  logic [FB-1:0] m_tkeep;
  logic m_tlast, m_tvalid, m_tready;
  logic [3:0] m_tdest;

  deparser #(.FRAME_BYTES(FB), .VAR_BYTES(VB), .DEST_W(4), .LEN_W(7)) dut (.*);

  int checks = 0, failures = 0;
  int var_seen [-VB:VB];
  byte exp_q [$];
  int  exp_end [$];   // byte count of each expected packet
  int  exp_dest [$];
  int  n_pk = 0;
  int  gap_h = 0, gap_s = 0, gap_m = 0;

  // header and payload "packets" queued for the drivers
  typedef struct { byte hb[$]; int dest; byte pb[$]; } pk_t;
  pk_t pk_q [$];

  task automatic make_packet(input int plen, input int var_, input int dest);
    pk_t p;
    byte pkt[$];
    for (int i = 0; i < plen; i++) pkt.push_back(byte'($urandom));
    p.pb = pkt;
    if (plen <= FB) begin
      for (int i = 0; i < plen + var_; i++) p.hb.push_back(byte'($urandom));
    end else begin
      for (int i = 0; i < FB + var_; i++) p.hb.push_back(byte'($urandom));
    end
    p.dest = dest;
    pk_q.push_back(p);
    foreach (p.hb[i]) exp_q.push_back(p.hb[i]);
    for (int i = FB; i < plen; i++) exp_q.push_back(pkt[i]);
    exp_end.push_back(p.hb.size() + ((plen > FB) ? plen - FB : 0));
    exp_dest.push_back(dest);
    if (plen > FB) var_seen[var_]++;
  endtask

  // header driver
  int hi = 0;
  initial begin
    h_valid = 0; h_data = '0; h_len = '0; h_last = 0; h_dest = '0;
    @(negedge rst);
    forever begin
      @(posedge clk);
      if (h_valid && h_ready) begin h_valid <= 0; hi++; end
      if ((!h_valid || h_ready) && hi + (h_valid && h_ready ? 0 : 0) < pk_q.size() &&
          !(h_valid && !h_ready) && ($urandom % 4 != 0 || gap_h == 0)) begin
        int k;
        k = (h_valid && h_ready) ? hi : hi;
        if (k < pk_q.size() && !(h_valid && h_ready && 0)) begin
          logic [(FB+VB)*8-1:0] d;
          d = '0;
          foreach (pk_q[k].hb[i]) d[i*8 +: 8] = pk_q[k].hb[i];
          h_data  <= d;
          h_len   <= 7'(pk_q[k].hb.size());
          h_last  <= (pk_q[k].pb.size() <= FB);
          h_dest  <= 4'(pk_q[k].dest);
          h_valid <= 1;
        end
      end
    end
  end

  // payload driver
  int si = 0, sb = 0;
  initial begin
    s_tvalid = 0; s_tdata = '0; s_tkeep = '0; s_tlast = 0;
    @(negedge rst);
    forever begin
      @(posedge clk);
      if (s_tvalid && s_tready) begin
        s_tvalid <= 0;
        sb += FB;
        if (sb >= pk_q[si].pb.size()) begin si++; sb = 0; end
      end
      if ((!s_tvalid || s_tready) && si < pk_q.size() && ($urandom % 4 != 0 || gap_s == 0)) begin
        logic [FB*8-1:0] d; logic [FB-1:0] k;
        d = '0; k = '0;
        for (int i = 0; i < FB; i++)
          if (sb + i < pk_q[si].pb.size()) begin d[i*8 +: 8] = pk_q[si].pb[sb+i]; k[i] = 1; end
        s_tdata  <= d;
        s_tkeep  <= k;
        s_tlast  <= (sb + FB >= pk_q[si].pb.size());
        s_tvalid <= 1;
      end
    end
  end

  // output checker
  int got = 0;
  initial begin
    m_tready = 1;
    forever begin
      @(posedge clk);
      m_tready <= (gap_m == 0) || ($urandom % 3 != 0);
      if (!rst && m_tvalid && m_tready) begin
        bit seen_gap;
        seen_gap = 0;
        for (int i = 0; i < FB; i++) begin
          if (m_tkeep[i]) begin
            checks++;
            if (seen_gap) begin failures++; $display("FAIL tkeep not contiguous"); end
            if (exp_q.size() == 0 || m_tdata[i*8 +: 8] != exp_q[0]) begin
              failures++;
              if (failures < 10) $display("FAIL pkt %0d byte %0d got %h exp %h", n_pk, got, m_tdata[i*8 +: 8], exp_q.size() ? exp_q[0] : 8'hxx);
            end
            if (exp_q.size()) void'(exp_q.pop_front());
            got++;
          end else seen_gap = 1;
        end
        checks++;
        if (m_tdest != 4'(exp_dest[0])) begin failures++; $display("FAIL dest"); end
        checks++;
        if (m_tlast != (got == exp_end[0])) begin
          failures++; $display("FAIL tlast pkt %0d got=%0d end=%0d", n_pk, got, exp_end[0]);
        end
        if (m_tlast || got >= exp_end[0]) begin
          void'(exp_end.pop_front()); void'(exp_dest.pop_front()); got = 0; n_pk++;
        end
      end
    end
  end

  initial begin
    int t0;
    for (int v = -VB; v <= VB; v++) var_seen[v] = 0;
    // directed: header longer by 4, 3-frame packet; latency check
    make_packet(40, 4, 3);
    repeat (3) @(posedge clk);
    rst = 0;
    // wait for the header and payload to meet, then count
    @(negedge clk);
    while (!(h_valid && h_ready)) @(negedge clk);
    @(negedge clk); t0 = 0;
    while (!m_tvalid) begin @(negedge clk); t0++; end
    checks++;
    if (t0 != 0) begin failures++; $display("FAIL latency %0d", t0); end
    // random packets with gaps
    gap_h = 1; gap_s = 1; gap_m = 1;
    for (int p = 0; p < 300; p++) begin
      int plen, v;
      plen = ($urandom % 4 == 0) ? 1 + $urandom % FB : FB + 1 + $urandom % 60;
      v = int'($urandom % (2*VB+1)) - VB;
      if (plen <= FB && plen + v < 1) v = 0;
      make_packet(plen, v, $urandom % 9);
    end
    wait (n_pk == pk_q.size());
    for (int v = -VB; v <= VB; v++) begin
      checks++;
      if (var_seen[v] == 0) begin failures++; $display("FAIL var %0d never used", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

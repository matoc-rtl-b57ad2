// tb_adapter_out: self-checking test of the 512 -> 128 bit adapter.
// Random packets (1..300 bytes) enter as 512-bit words with random gaps and
// leave as 128-bit beats under random back-pressure; the narrow stream is
// compared byte by byte with the packet (no empty beats, tlast on the last
// one). A directed first packet checks one cycle from word to first beat,
// and that a stream of full words gives one beat per cycle.
module tb_adapter_out;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [511:0] s_tdata; logic [63:0] s_tkeep; logic s_tlast, s_tvalid, s_tready;
  logic [127:0] m_tdata; logic [15:0] m_tkeep; logic m_tlast, m_tvalid, m_tready;
  adapter_out #(.IN_W(512), .OUT_W(128)) dut (.*);

  int checks = 0, failures = 0;
  byte pk [$][$];
  int outpk = 0, outoff = 0, beats = 0;
  bit gaps = 0;

  initial begin
    s_tvalid = 0; s_tdata = '0; s_tkeep = '0; s_tlast = 0;
    wait (!rst);
    for (int p = 0; p < 200; p++) begin
      automatic int len;
      len = (p == 0) ? 256 : 1 + $urandom % 300;
      begin
        byte q [$];
        q.delete();
        for (int i = 0; i < len; i++) q.push_back(byte'($urandom));
        pk.push_back(q);
      end
      for (int b = 0; b < len; b += 64) begin
        @(negedge clk);
        while (gaps && $urandom % 4 == 0) begin s_tvalid = 0; @(negedge clk); end
        s_tvalid = 1; s_tdata = '0; s_tkeep = '0;
        for (int i = 0; i < 64; i++)
          if (b + i < len) begin s_tdata[i*8 +: 8] = pk[p][b+i]; s_tkeep[i] = 1; end
        s_tlast = (b + 64 >= len);
        @(posedge clk);
        while (!s_tready) @(posedge clk);
      end
      @(negedge clk); s_tvalid = 0;
      if (p == 0) wait (t_last >= 0);
      gaps = 1;
    end
  end

  initial begin
    m_tready = 1;
    forever begin
      @(posedge clk);
      if (!rst && m_tvalid && m_tready) begin
        int len, n;
        len = pk[outpk].size();
        n = 0;
        beats++;
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (outoff + i < len) begin
            if (!m_tkeep[i] || m_tdata[i*8 +: 8] != pk[outpk][outoff+i]) failures++;
          end else if (m_tkeep[i]) failures++;
        end
        outoff += 16;
        checks++;
        if (m_tlast != (outoff >= len)) failures++;
        if (outoff >= len) begin outpk++; outoff = 0; end
      end
      m_tready <= !gaps || ($urandom % 3 != 0);
    end
  end

  // cycle-accurate monitor of the first packet
  int cyc = 0, t_in = -1, t_out = -1, t_last = -1;
  always @(posedge clk) begin
    if (!rst) cyc <= cyc + 1;
    if (!rst && t_in < 0 && s_tvalid && s_tready) t_in <= cyc;
    if (!rst && t_out < 0 && m_tvalid) t_out <= cyc;
    if (!rst && t_last < 0 && m_tvalid && m_tready && m_tlast) t_last <= cyc;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (t_last >= 0);
    checks++;
    if (t_out - t_in != 1) begin failures++; $display("FAIL latency %0d", t_out - t_in); end
    // the 256-byte first packet: 16 beats in 16 consecutive cycles
    checks++;
    if (t_last - t_out != 15) begin failures++; $display("FAIL rate %0d", t_last - t_out); end
    wait (outpk == 200);
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

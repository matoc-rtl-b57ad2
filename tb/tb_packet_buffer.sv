// tb_packet_buffer: self-checking test of the per-channel packet FIFO.
// Depth is reduced to 16. Phase 1 fills the FIFO with the output blocked and
// checks that exactly 16 + 1 words (array plus output register) are taken
// before s_tready drops, then drains it in order. Phase 2 streams 2000
// random words with random gaps on both sides and compares order and
// contents. The write-to-output latency (2 clock edges) is checked once.
module tb_packet_buffer;
  localparam int DW = 64, D = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [DW-1:0] s_tdata, m_tdata; logic [DW/8-1:0] s_tkeep, m_tkeep;
  logic s_tlast, s_tvalid, s_tready, m_tlast, m_tvalid, m_tready;
  packet_buffer #(.DATA_W(DW), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [DW+DW/8:0] exp_q [$];
  int cyc = 0, t_in = -1, t_out = -1, nin = 0, nout = 0, full_seen = 0;
  bit rnd_in = 0, rnd_out = 0, drive = 0;

  always @(posedge clk) begin
    if (!rst) cyc <= cyc + 1;
    if (!rst && s_tvalid && s_tready) begin
      exp_q.push_back({s_tdata, s_tkeep, s_tlast});
      if (t_in < 0) t_in <= cyc;
      nin <= nin + 1;
    end
    if (!rst && s_tvalid && !s_tready) full_seen <= full_seen + 1;
    if (!rst && m_tvalid && t_out < 0) t_out <= cyc;
    if (!rst && m_tvalid && m_tready) begin
      checks++;
      if (exp_q.size() == 0 || {m_tdata, m_tkeep, m_tlast} != exp_q[0]) failures++;
      if (exp_q.size()) void'(exp_q.pop_front());
      nout <= nout + 1;
    end
    s_tvalid <= drive && (!rnd_in || $urandom % 3 != 0);
    if (!s_tvalid || s_tready) begin
      s_tdata <= {$urandom, $urandom};
      s_tkeep <= 8'($urandom);
      s_tlast <= 1'($urandom);
    end
    m_tready <= rnd_out ? ($urandom % 3 != 0) : m_tready;
  end

  initial begin
    s_tvalid = 0; m_tready = 0; s_tdata = '0; s_tkeep = '0; s_tlast = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    drive = 1;
    repeat (40) @(posedge clk);
    checks++;
    if (nin != D + 1) begin failures++; $display("FAIL fill %0d", nin); end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL never full"); end
    checks++;
    if (t_out - t_in != 2) begin failures++; $display("FAIL latency %0d", t_out - t_in); end
    drive = 0;
    @(posedge clk); m_tready = 1;
    wait (exp_q.size() == 0);
    rnd_in = 1; rnd_out = 1; drive = 1;
    wait (nin > 2000);
    drive = 0; rnd_out = 0; m_tready = 1;
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
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

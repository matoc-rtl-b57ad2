// tb_hdr_mux: self-checking test of the round-robin header multiplexer.
// Each of the 8 inputs sends numbered headers. Checked: every header comes
// out once and in order per input; with all inputs busy the grants rotate so
// no input waits more than 8 cycles; a single busy input gets a header
// through every cycle (no bubble); latency is one cycle.
module tb_hdr_mux;
  import matoc_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  hdr_t s_data [N]; logic [N-1:0] s_valid, s_ready;
  hdr_t m_data; logic m_valid, m_ready;
  hdr_mux #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int sent [N], rcvd [N], limit [N];
  int wait_cyc [N];
  int cyc = 0, max_wait = 0, streak = 0, max_streak = 0;
  bit rnd_out = 0;

  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      for (int i = 0; i < N; i++) begin
        if (s_valid[i] && s_ready[i]) begin
          sent[i]++;
          wait_cyc[i] = 0;
        end else if (s_valid[i] && (!m_valid || m_ready)) begin
          wait_cyc[i]++;
          if (wait_cyc[i] > max_wait) max_wait = wait_cyc[i];
        end
      end
      if (m_valid && m_ready) begin
        int c, seq;
        c = int'(m_data.src_ch);
        seq = int'(m_data.data[31:0]);
        checks++;
        if (seq != rcvd[c]) begin failures++; $display("FAIL ch %0d seq %0d exp %0d", c, seq, rcvd[c]); end
        rcvd[c]++;
        streak++;
        if (streak > max_streak) max_streak = streak;
      end else streak = 0;
      m_ready <= !rnd_out || ($urandom % 4 != 0);
    end
  end

  always @(negedge clk) begin
    for (int i = 0; i < N; i++) begin
      s_valid[i] = !rst && (sent[i] < limit[i]);
      s_data[i] = '0;
      s_data[i].src_ch = 4'(i);
      s_data[i].data[31:0] = 32'(sent[i]);
    end
  end

  initial begin
    int t;
    for (int i = 0; i < N; i++) begin sent[i] = 0; rcvd[i] = 0; limit[i] = 0; wait_cyc[i] = 0; end
    m_ready = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    // one busy input: 50 headers in 50 consecutive cycles
    limit[3] = 50;
    wait (rcvd[3] == 50);
    checks++;
    if (max_streak != 50) begin failures++; $display("FAIL bubble: streak %0d", max_streak); end
    // all inputs busy
    for (int i = 0; i < N; i++) limit[i] += 100;
    rnd_out = 1;
    wait (rcvd[0] == 100 && rcvd[1] == 100 && rcvd[2] == 100 && rcvd[3] == 150 &&
          rcvd[4] == 100 && rcvd[5] == 100 && rcvd[6] == 100 && rcvd[7] == 100);
    checks++;
    if (max_wait > N - 1) begin failures++; $display("FAIL fairness: wait %0d", max_wait); end
    // latency: one header into an idle mux
    rnd_out = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); limit[6] += 1; t = 0;
    @(negedge clk);
    checks++;
    if (!m_valid) begin failures++; $display("FAIL latency"); end
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_hdr_demux: self-checking test of the header demultiplexer.
// Numbered headers for random source channels enter at random times; each
// output has random back-pressure. Every header must leave on the output of
// its source channel, once and in order, one cycle after it was taken, and a
// blocked output must not stop headers for the other channels.
module tb_hdr_demux;
  import matoc_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  hdr_t s_data; logic s_valid, s_ready;
  hdr_t m_data [N]; logic [N-1:0] m_valid, m_ready;
  hdr_demux #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int exp_seq [N], got_seq [N];
  int total = 0, cyc = 0, t_in = -1, t_out = -1, passed_blocked = 0;
  bit go = 0;

  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      if (s_valid && s_ready) begin
        exp_seq[s_data.src_ch]++;
        total++;
        if (t_in < 0) t_in <= cyc;
        if (m_valid[0] && !m_ready[0] && s_data.src_ch != 0) passed_blocked++;
      end
      for (int i = 0; i < N; i++) begin
        if (m_valid[i] && t_out < 0) t_out <= cyc;
        if (m_valid[i] && m_ready[i]) begin
          checks++;
          if (int'(m_data[i].src_ch) != i || int'(m_data[i].data[31:0]) != got_seq[i]) begin
            failures++; $display("FAIL out %0d", i);
          end
          got_seq[i]++;
        end
        m_ready[i] <= (i == 0) ? (cyc % 40 > 30) : ($urandom % 3 != 0);
      end
    end
  end

  bit acc = 0;
  always @(posedge clk) acc <= !rst && s_valid && s_ready;
  always @(negedge clk) begin
    if (!s_valid || acc) begin
      s_valid = go && ($urandom % 4 != 0);
      s_data = '0;
      s_data.src_ch = 4'($urandom % N);
      s_data.data[31:0] = 32'(exp_seq[s_data.src_ch]);
    end
  end

  initial begin
    for (int i = 0; i < N; i++) begin exp_seq[i] = 0; got_seq[i] = 0; end
    m_ready = '1; s_valid = 0; s_data = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    go = 1;
    wait (total >= 3000);
    go = 0;
    repeat (100) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (got_seq[i] != exp_seq[i]) begin failures++; $display("FAIL count %0d", i); end
    end
    checks++;
    if (t_out - t_in != 1) begin failures++; $display("FAIL latency %0d", t_out - t_in); end
    checks++;
    if (passed_blocked == 0) begin failures++; $display("FAIL blocked output stops others"); end
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

// tb_axis_switch: self-checking test of the packet switch (17 inputs,
// 9 outputs, 32-bit data for speed).
// Every input sends numbered multi-beat packets to random outputs; outputs
// apply random back-pressure. Checked: each packet arrives whole, on the
// output its tdest names, without beats of other packets in between, in
// order per input/output pair; nothing is lost. One input streaming packets
// to an idle output must produce a beat every cycle across packet borders
// (no bubble), with one cycle of latency.
module tb_axis_switch;
  localparam int NI = 17, NO = 9, DW = 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [NI-1:0][DW-1:0] s_tdata; logic [NI-1:0][DW/8-1:0] s_tkeep;
  logic [NI-1:0] s_tlast, s_tvalid, s_tready; logic [NI-1:0][3:0] s_tdest;
  logic [NO-1:0][DW-1:0] m_tdata; logic [NO-1:0][DW/8-1:0] m_tkeep;
  logic [NO-1:0] m_tlast, m_tvalid, m_tready; logic [NO-1:0][3:0] m_tdest;
  logic [NO-1:0][4:0] m_tid;
  axis_switch #(.N_IN(NI), .N_OUT(NO), .DATA_W(DW), .DEST_W(4)) dut (.*);

  int checks = 0, failures = 0;
  // driver state per input
  int left [NI], beat [NI], dst [NI], seq [NI][NO], npk [NI];
  int exp_seq [NI][NO];
  int cur_src [NO], cur_beat [NO];
  int delivered = 0, generated = 0, cyc = 0;
  int streak = 0, max_streak = 0;
  bit rnd = 1, solo = 0;
  bit acc [NI];

  function automatic logic [DW-1:0] word(int src, int sq, int b, int d);
    return {8'(src), 8'(sq), 8'(b), 8'(d)};
  endfunction

  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      for (int i = 0; i < NI; i++) acc[i] <= s_tvalid[i] && s_tready[i];
      for (int o = 0; o < NO; o++) begin
        if (m_tvalid[o] && m_tready[o]) begin
          int src, sq, b, d;
          {src, sq, b, d} = {24'd0, m_tdata[o][31:24], 24'd0, m_tdata[o][23:16],
                             24'd0, m_tdata[o][15:8], 24'd0, m_tdata[o][7:0]};
          checks++;
          if (d != o || int'(m_tdest[o]) != o) begin failures++; $display("FAIL wrong output"); end
          checks++;
          if (int'(m_tid[o]) != src) begin failures++; $display("FAIL m_tid %0d, packet from %0d", m_tid[o], src); end
          if (cur_beat[o] == 0) begin
            cur_src[o] = src;
            checks++;
            if (sq != (exp_seq[src][o] & 255)) begin failures++; $display("FAIL order src %0d out %0d", src, o); end
          end else begin
            checks++;
            if (src != cur_src[o] || b != cur_beat[o]) begin failures++; $display("FAIL interleave out %0d", o); end
          end
          cur_beat[o]++;
          if (m_tlast[o]) begin
            cur_beat[o] = 0; exp_seq[src][o]++; delivered++;
          end
        end
        m_tready[o] <= !rnd || ($urandom % 3 != 0);
      end
      if (m_tvalid[2] && m_tready[2]) begin streak++; if (streak > max_streak) max_streak = streak; end
      else streak = 0;
    end
  end

  always @(negedge clk) begin
    for (int i = 0; i < NI; i++) begin
      if (!s_tvalid[i] || acc[i]) begin
        if (acc[i]) begin
          beat[i]++;
          if (s_tlast[i]) begin left[i] = 0; seq[i][dst[i]]++; end
        end
        if (left[i] == 0 && npk[i] > 0) begin
          left[i] = 1 + $urandom % 5; beat[i] = 0; npk[i]--;
          dst[i] = solo ? 2 : $urandom % NO;
          generated++;
        end
        s_tvalid[i] = (left[i] > 0) && (solo || $urandom % 4 != 0);
        s_tdata[i]  = word(i, seq[i][dst[i]], beat[i], dst[i]);
        s_tkeep[i]  = '1;
        s_tlast[i]  = (beat[i] == left[i] - 1);
        s_tdest[i]  = 4'(dst[i]);
      end
    end
  end

  initial begin
    int t;
    for (int i = 0; i < NI; i++) begin
      left[i] = 0; beat[i] = 0; dst[i] = 0; npk[i] = 0; acc[i] = 0;
      for (int o = 0; o < NO; o++) begin seq[i][o] = 0; exp_seq[i][o] = 0; end
    end
    for (int o = 0; o < NO; o++) begin cur_src[o] = 0; cur_beat[o] = 0; end
    s_tvalid = '0; s_tdata = '0; s_tkeep = '0; s_tlast = '0; s_tdest = '0; m_tready = '1;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < NI; i++) npk[i] = 150;
    wait (delivered == NI * 150);
    // solo stream: input 4 sends 20 packets to output 2 with ready held high
    rnd = 0; solo = 1;
    repeat (5) @(posedge clk);
    max_streak = 0;
    npk[4] = 20;
    wait (delivered == NI * 150 + 20);
    checks++;
    if (max_streak < 25) begin failures++; $display("FAIL bubble, streak %0d", max_streak); end
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

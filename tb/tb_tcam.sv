// tb_tcam: self-checking test of the LUT-RAM TCAM, in the 10-bit x 32-entry
// configuration (2 columns x 4 rows of 8x5 units).
// A reference model holds data/care/valid of every entry. Checked:
//  - a row write takes 32x2+1 cycles when no search interferes, a read 32+1;
//  - searches (random keys and keys built to hit chosen rules) return the
//    lowest matching index one cycle later, one search per cycle;
//  - reads return the stored data and care bits (data masked by care) and
//    the valid flag;
//  - with searches in random cycles, updates are stretched but still
//    complete, and searches never stall; results for rows not being
//    written stay correct meanwhile.
module tb_tcam;
  localparam int KW = 10, D = 32, IW = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [KW-1:0] s_key; logic s_valid, s_ready;
  logic m_valid, m_hit, m_ready; logic [IW-1:0] m_index;
  logic wr_req, rd_req, rd_vld, busy, done, init_done;
  logic [IW-4:0] wr_row; logic [7:0][KW-1:0] wr_data, wr_care; logic [7:0] wr_vld;
  logic [IW-1:0] rd_index; logic [KW-1:0] rd_data, rd_care;
  tcam #(.KEY_W(KW), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [KW-1:0] md [D], mc [D]; logic mv [D];
  int busy_row = -1;        // row whose rules are being rewritten
  bit search_on = 0, rnd_search = 0;
  int n_search = 0, n_hits = 0, stretched = 0;
  logic [KW-1:0] key_q [$];

  function automatic int ref_match(logic [KW-1:0] k, output bit amb);
    amb = 0;
    for (int i = 0; i < D; i++) begin
      if (busy_row >= 0 && i / 8 == busy_row) begin amb = 1; return -2; end
      if (mv[i] && ((k ^ md[i]) & mc[i]) == 0) return i;
    end
    return -1;
  endfunction

  // search driver and checker
  always @(posedge clk) begin
    if (!rst) begin
      if (m_valid && m_ready) begin
        bit amb; int r;
        r = ref_match(key_q.pop_front(), amb);
        if (!amb) begin
          checks++;
          n_search++;
          if (r < 0 ? m_hit : (!m_hit || int'(m_index) != r)) begin
            failures++; $display("FAIL search: hit %b idx %0d exp %0d", m_hit, m_index, r);
          end
          if (r >= 0) n_hits++;
        end
      end
      if (s_valid && s_ready) key_q.push_back(s_key);
      s_valid <= search_on && init_done && (!rnd_search || $urandom % 2 == 0);
      if ($urandom % 2) s_key <= KW'($urandom);
      else begin
        int e;
        e = $urandom % D;
        s_key <= (md[e] & mc[e]) | (KW'($urandom) & ~mc[e]);
      end
    end
  end
  assign m_ready = 1'b1;

  task automatic write_row(input int row, output int cycles);
    for (int e = 0; e < 8; e++) begin
      wr_data[e] = KW'($urandom);
      wr_care[e] = ($urandom % 4 == 0) ? '1 : KW'($urandom);
      wr_vld[e]  = ($urandom % 8 != 0);
    end
    wr_row = (IW-3)'(row);
    busy_row = row;
    @(negedge clk); wr_req = 1; @(negedge clk); wr_req = 0;
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
    for (int e = 0; e < 8; e++) begin
      md[row*8+e] = wr_data[e]; mc[row*8+e] = wr_care[e]; mv[row*8+e] = wr_vld[e];
    end
    @(negedge clk);
    busy_row = -1;
  endtask

  task automatic read_entry(input int idx, output int cycles);
    rd_index = IW'(idx);
    @(negedge clk); rd_req = 1; @(negedge clk); rd_req = 0;
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
    @(negedge clk);
    checks++;
    if (rd_vld != mv[idx] ||
        (mv[idx] && (rd_care != mc[idx] || rd_data != (md[idx] & mc[idx])))) begin
      failures++;
      $display("FAIL read %0d: v%b d%h c%h exp v%b d%h c%h", idx, rd_vld, rd_data, rd_care,
               mv[idx], md[idx] & mc[idx], mc[idx]);
    end
  endtask

  initial begin
    int cyc;
    for (int i = 0; i < D; i++) begin md[i] = '0; mc[i] = '0; mv[i] = 0; end
    s_valid = 0; s_key = '0; wr_req = 0; rd_req = 0; wr_row = '0; wr_data = '0;
    wr_care = '0; wr_vld = '0; rd_index = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    wait (init_done);
    // empty table: nothing matches
    search_on = 1;
    repeat (50) @(posedge clk);
    search_on = 0;
    repeat (3) @(posedge clk);
    // write every row without searches: exact cycle count
    for (int r = 0; r < D/8; r++) begin
      write_row(r, cyc);
      checks++;
      if (cyc != 65) begin failures++; $display("FAIL write took %0d", cyc); end
    end
    for (int i = 0; i < D; i++) begin
      read_entry(i, cyc);
      checks++;
      if (cyc != 33) begin failures++; $display("FAIL read took %0d", cyc); end
    end
    // full-rate searches
    search_on = 1;
    repeat (2000) @(posedge clk);
    // updates and reads competing with searches in half of the cycles
    rnd_search = 1;
    for (int k = 0; k < 12; k++) begin
      write_row($urandom % (D/8), cyc);
      if (cyc > 65) stretched++;
      read_entry($urandom % D, cyc);
      if (cyc > 33) stretched++;
      repeat (50) @(posedge clk);
    end
    search_on = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (stretched == 0) begin failures++; $display("FAIL search never took precedence"); end
    checks++;
    if (n_hits < 100 || n_search < 2000) begin failures++; $display("FAIL too few searches/hits"); end
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

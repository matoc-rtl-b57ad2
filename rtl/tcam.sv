// tcam: parametrized ternary CAM built from 8x5 LUT-RAM units.
//
// Structure. The key is cut into COLS pieces of 5 bits; the table is ROWS
// rows of 8 entries. Unit (c,r) stores, for each of its 8 entries, a 32-bit
// match rule: bit a is 1 when the entry's data/care pattern for key piece c
// accepts the value a. A search addresses every unit of column c with key
// piece c, ANDs the COLS 8-bit slices of each row into the match line and
// picks the lowest matching index. The result is registered: m_valid, m_hit
// and m_index follow the search one cycle later (latency 1, one search per
// cycle). m_ready gives back-pressure, s_ready = !m_valid || m_ready.
//
// Update. Rules are written one row (8 entries) at a time from wr_data,
// wr_care (1 = bit must match) and wr_vld (0 = entry never matches).
// Phase 1 counts 0..31 and computes the 8 rule bits of every column for that
// address into 32-bit shift-right registers (the SRL32s); phase 2 counts
// again and writes the shifted-out bits into the units. One more cycle
// signals done: 32x2+1 cycles in all. A read (query) of one entry walks the
// 32 addresses of its row, collects AND and OR of every address whose rule
// bit is set, and in one more cycle turns them into data and care bits:
// 32+1 cycles. Searches always win the units' address port: phase 2 and the
// read walk pause in any cycle with a search, phase 1 never does. After
// reset the units are cleared (32 cycles, s_ready low).
//
// The unit size, the 32x2+1 / 32+1 cycle counts, the SRL buffering, the AND
// of columns and search precedence follow the document. Lowest index as the
// highest priority, the clear after reset and the row-wide write interface
// are this design's choices.
module tcam #(
  parameter int unsigned KEY_W = 35,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                      clk,
  input  logic                      rst,
  // search / match
  input  logic [KEY_W-1:0]          s_key,
  input  logic                      s_valid,
  output logic                      s_ready,
  output logic                      m_valid,
  output logic                      m_hit,
  output logic [$clog2(DEPTH)-1:0]  m_index,
  input  logic                      m_ready,
  // rule update
  input  logic                      wr_req,                  // pulse, when !busy
  input  logic [$clog2(DEPTH)-4:0]  wr_row,                  // entries row*8..row*8+7
  input  logic [7:0][KEY_W-1:0]     wr_data,
  input  logic [7:0][KEY_W-1:0]     wr_care,
  input  logic [7:0]                wr_vld,
  input  logic                      rd_req,                  // pulse, when !busy
  input  logic [$clog2(DEPTH)-1:0]  rd_index,
  output logic [KEY_W-1:0]          rd_data,
  output logic [KEY_W-1:0]          rd_care,
  output logic                      rd_vld,
  output logic                      busy,
  output logic                      init_done,               // clear after reset finished
  output logic                      done                     // 1-cycle pulse
);
  localparam int unsigned COLS = (KEY_W + 4) / 5;
  localparam int unsigned ROWS = DEPTH / 8;
  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned IW   = $clog2(DEPTH);
  localparam int unsigned PW   = COLS * 5;

  typedef enum logic [2:0] {S_CLEAR, S_IDLE, S_PREP, S_WRITE, S_READ, S_FIN} state_e;
  state_e state;

  logic [4:0]      cnt;
  logic [RW-1:0]   row;
  logic [2:0]      ent;
  logic            is_rd;
  logic [PW-1:0]   key_p;
  logic [7:0][PW-1:0] dat_p, care_p;
  logic [7:0]      vld_r;
  logic [COLS-1:0][7:0][31:0] srl;    // match-rule shift registers
  logic [COLS-1:0][4:0] and_acc, or_acc;
  logic            any_acc;

  logic            s_fire, step, cnt_sel;
  logic [COLS-1:0][ROWS-1:0][7:0] mm;  // match matrix
  logic [DEPTH-1:0] ml;                // match line

  assign s_ready = (state != S_CLEAR) && (!m_valid || m_ready);
  assign s_fire  = s_valid && s_ready;
  assign key_p   = PW'(s_key);
  assign busy    = (state != S_IDLE);
  assign init_done = (state != S_CLEAR);
  // counter-driven phases that share the unit address with searches
  assign cnt_sel = !s_fire;
  assign step    = !s_fire;

  // ---------------- units ----------------
  for (genvar c = 0; c < COLS; c++) begin : g_col
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      logic       we;
      logic [7:0] di;
      always_comb begin
        we = 1'b0;
        di = '0;
        if (state == S_CLEAR) we = 1'b1;
        else if (state == S_WRITE && step && row == RW'(r)) begin
          we = 1'b1;
          for (int e = 0; e < 8; e++) di[e] = srl[c][e][0];
        end
      end
      tcam_unit u_unit (
        .clk(clk), .key(key_p[c*5 +: 5]), .cnt(cnt), .cnt_sel(cnt_sel),
        .we(we), .di(di), .dout(mm[c][r])
      );
    end
  end

  // ---------------- match line and priority ----------------
  for (genvar r = 0; r < ROWS; r++) begin : g_ml_row
    for (genvar e = 0; e < 8; e++) begin : g_ml_ent
      logic [COLS-1:0] v;
      for (genvar c = 0; c < COLS; c++) begin : g_ml_col
        assign v[c] = mm[c][r][e];
      end
      assign ml[r*8+e] = &v;
    end
  end

  logic          hit_n;
  logic [IW-1:0] idx_n;
  always_comb begin
    hit_n = 1'b0;
    idx_n = '0;
    for (int i = DEPTH-1; i >= 0; i--)
      if (ml[i]) begin
        hit_n = 1'b1;
        idx_n = IW'(i);
      end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      m_valid <= 1'b0;
      m_hit   <= 1'b0;
      m_index <= '0;
    end else if (s_ready) begin
      m_valid <= s_valid;
      m_hit   <= hit_n;
      m_index <= idx_n;
    end
  end

  // ---------------- update / query engine ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_CLEAR;
      cnt     <= '0;
      row     <= '0;
      ent     <= '0;
      is_rd   <= 1'b0;
      dat_p   <= '0;
      care_p  <= '0;
      vld_r   <= '0;
      srl     <= '0;
      and_acc <= '0;
      or_acc  <= '0;
      any_acc <= 1'b0;
      rd_data <= '0;
      rd_care <= '0;
      rd_vld  <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_CLEAR: begin
          cnt <= cnt + 1'b1;
          if (cnt == 5'd31) state <= S_IDLE;
        end
        S_IDLE: begin
          cnt <= '0;
          if (wr_req) begin
            state <= S_PREP;
            is_rd <= 1'b0;
            row   <= wr_row;
            for (int e = 0; e < 8; e++) begin
              dat_p[e]  <= PW'(wr_data[e]);
              care_p[e] <= PW'(wr_care[e]);
            end
            vld_r <= wr_vld;
          end else if (rd_req) begin
            state   <= S_READ;
            is_rd   <= 1'b1;
            row     <= RW'(rd_index >> 3);
            ent     <= rd_index[2:0];
            and_acc <= '1;
            or_acc  <= '0;
            any_acc <= 1'b0;
          end
        end
        S_PREP: begin
          // rule bit of entry e, column c, for key piece value cnt
          for (int c = 0; c < COLS; c++)
            for (int e = 0; e < 8; e++)
              srl[c][e] <= {vld_r[e] &&
                            (((cnt ^ dat_p[e][c*5 +: 5]) & care_p[e][c*5 +: 5]) == 5'd0),
                            srl[c][e][31:1]};
          cnt <= cnt + 1'b1;
          if (cnt == 5'd31) state <= S_WRITE;
        end
        S_WRITE: if (step) begin
          for (int c = 0; c < COLS; c++)
            for (int e = 0; e < 8; e++) srl[c][e] <= {1'b0, srl[c][e][31:1]};
          cnt <= cnt + 1'b1;
          if (cnt == 5'd31) state <= S_FIN;
        end
        S_READ: if (step) begin
          for (int c = 0; c < COLS; c++)
            if (mm[c][row][ent]) begin
              and_acc[c] <= and_acc[c] & cnt;
              or_acc[c]  <= or_acc[c] | cnt;
            end
          if (mm[0][row][ent]) any_acc <= 1'b1;
          cnt <= cnt + 1'b1;
          if (cnt == 5'd31) state <= S_FIN;
        end
        S_FIN: begin
          state <= S_IDLE;
          done  <= 1'b1;
          if (is_rd) begin
            logic [PW-1:0] cr, dt;
            for (int c = 0; c < COLS; c++) begin
              cr[c*5 +: 5] = ~(and_acc[c] ^ or_acc[c]);
              dt[c*5 +: 5] = and_acc[c] & cr[c*5 +: 5];
            end
            rd_vld  <= any_acc;
            rd_care <= any_acc ? KEY_W'(cr) : '0;
            rd_data <= any_acc ? KEY_W'(dt) : '0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_req_when_busy: assert property (@(posedge clk) disable iff (rst)
                                       (wr_req || rd_req) |-> !busy);
endmodule

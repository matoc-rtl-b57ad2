// deparser: merges a processed, variable-length header with the buffered
// payload frames of its packet.
//
// The header (FRAME_BYTES + VAR_BYTES wide, hdr_len bytes valid) replaces the
// packet's original first frame, which the deparser takes from the payload
// stream and drops. Because the header may be up to VAR_BYTES longer or
// shorter than a frame, the rest of the packet must be shifted by a whole
// number of bytes. Instead of a full barrel shifter over header, payload and
// buffer, the shift is fixed per packet by a select value, and every output
// byte is a multiplexer over only 2*VAR_BYTES+2 candidates:
//   sel = 0              header frame itself (first output of a packet whose
//                        header is at least one frame long)
//   sel = v, 1..VAR      header v bytes shorter: temp holds FRAME-v bytes,
//                        output = {payload[v-1:0], temp[FRAME-v-1:0]}
//   sel = 2*VAR+1-v      header v bytes longer: temp holds v bytes,
//                        output = {payload[FRAME-v-1:0], temp[v-1:0]}
//   sel = 2*VAR+1        same length: payload passes straight through
// After each output the unused upper payload bytes go into the temporary
// buffer for the next cycle. When the last payload frame leaves more bytes
// than fit, one extra flush cycle sends the remainder (payload input paused).
// A single-frame packet is sent from the header alone. Output is registered:
// the first merged frame appears one cycle after header and payload meet.
//
// The temporary buffer, the per-byte select table and its encoding, and the
// sizes (64-byte frame, 15-byte range) follow the document; the handling of
// last frames and single-frame packets is this design's own.
module deparser #(
  parameter int unsigned FRAME_BYTES = 64,
  parameter int unsigned VAR_BYTES   = 15,
  parameter int unsigned DEST_W      = 4,
  parameter int unsigned LEN_W       = 7
) (
  input  logic                                clk,
  input  logic                                rst,
  // processed header
  input  logic [(FRAME_BYTES+VAR_BYTES)*8-1:0] h_data,
  input  logic [LEN_W-1:0]                    h_len,
  input  logic                                h_last,   // header is the whole packet
  input  logic [DEST_W-1:0]                   h_dest,
  input  logic                                h_valid,
  output logic                                h_ready,
  // buffered packet frames (original first frame included)
  input  logic [FRAME_BYTES*8-1:0]            s_tdata,
  input  logic [FRAME_BYTES-1:0]              s_tkeep,
  input  logic                                s_tlast,
  input  logic                                s_tvalid,
  output logic                                s_tready,
  // merged packet
  output logic [FRAME_BYTES*8-1:0]            m_tdata,
  output logic [FRAME_BYTES-1:0]              m_tkeep,
  output logic                                m_tlast,
  output logic [DEST_W-1:0]                   m_tdest,
  output logic                                m_tvalid,
  input  logic                                m_tready
);
  localparam int unsigned FB   = FRAME_BYTES;
  localparam int unsigned VB   = VAR_BYTES;
  localparam int unsigned NSEL = 2*VB + 2;
  localparam int unsigned SELW = $clog2(NSEL);
  localparam int unsigned CW   = $clog2(FB + 1);
  localparam int unsigned FBW  = FB * 8;

  typedef enum logic [1:0] {D_IDLE, D_BODY, D_FLUSH} state_e;
  state_e state;

  logic [FB-1:0][7:0]    temp;
  logic [CW-1:0]         tcnt;     // bytes held in temp
  logic [SELW-1:0]       sel;
  logic                  out_free;
  logic [FB+VB-1:0][7:0] hb;
  logic [FB-1:0][7:0]    pb, comb, temp_n;
  logic [CW:0]           n, total;

  assign hb       = h_data;
  assign pb       = s_tdata;
  assign out_free = !m_tvalid || m_tready;
  assign h_ready  = (state == D_IDLE) && s_tvalid && out_free;
  assign s_tready = ((state == D_IDLE) && h_valid && out_free) ||
                    ((state == D_BODY) && out_free);

  function automatic logic [FB-1:0] mask(input int unsigned k);
    logic [FB-1:0] r;
    for (int unsigned i = 0; i < FB; i++) r[i] = (i < k);
    return r;
  endfunction

  // bytes held in temp for a given select value
  function automatic int unsigned held(input int unsigned s);
    if (s >= 1 && s <= VB)           return FB - s;
    else if (s > VB && s <= 2*VB)    return 2*VB + 1 - s;
    else                             return 0;
  endfunction

  // the reduced-candidate concatenation multiplexers
  always_comb begin
    comb   = pb;
    temp_n = temp;
    for (int unsigned s = 1; s < NSEL; s++) begin
      if (sel == SELW'(s)) begin
        for (int unsigned i = 0; i < FB; i++) begin
          comb[i] = (i < held(s)) ? temp[i] : pb[(i + FB - held(s)) % FB];
          if (i < held(s)) temp_n[i] = pb[(i + FB - held(s)) % FB];
        end
      end
    end
  end

  always_comb begin
    n = '0;
    for (int unsigned i = 0; i < FB; i++) n += (CW+1)'(s_tkeep[i]);
    total = (CW+1)'(tcnt) + n;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= D_IDLE;
      temp     <= '0;
      tcnt     <= '0;
      sel      <= '0;
      m_tvalid <= 1'b0;
      m_tdata  <= '0;
      m_tkeep  <= '0;
      m_tlast  <= 1'b0;
      m_tdest  <= '0;
    end else begin
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;
      case (state)
        D_IDLE: if (h_valid && s_tvalid && out_free) begin
          m_tdest <= h_dest;
          if (h_last) begin
            // single-frame packet: the header is all there is
            m_tvalid <= 1'b1;
            m_tdata  <= hb[FB-1:0];
            m_tkeep  <= mask(int'(h_len));
            m_tlast  <= (int'(h_len) <= FB);
            if (int'(h_len) > FB) begin
              temp  <= FBW'(hb[FB+VB-1:FB]);
              tcnt  <= CW'(int'(h_len) - FB);
              state <= D_FLUSH;
            end
          end else if (int'(h_len) >= FB) begin
            // header not shorter than a frame: send its first frame (sel 0)
            m_tvalid <= 1'b1;
            m_tdata  <= hb[FB-1:0];
            m_tkeep  <= '1;
            m_tlast  <= 1'b0;
            temp     <= FBW'(hb[FB+VB-1:FB]);
            tcnt     <= CW'(int'(h_len) - FB);
            sel      <= SELW'(2*VB + 1 - (int'(h_len) - FB));
            state    <= D_BODY;
          end else begin
            // shorter header: all of it waits in temp
            temp  <= hb[FB-1:0];
            tcnt  <= CW'(h_len);
            sel   <= SELW'(FB - int'(h_len));
            state <= D_BODY;
          end
        end
        D_BODY: if (s_tvalid && out_free) begin
          m_tvalid <= 1'b1;
          m_tdata  <= comb;
          temp     <= temp_n;
          if (!s_tlast) begin
            m_tkeep <= '1;
            m_tlast <= 1'b0;
          end else if (int'(total) > FB) begin
            m_tkeep <= '1;
            m_tlast <= 1'b0;
            tcnt    <= CW'(int'(total) - FB);
            state   <= D_FLUSH;
          end else begin
            m_tkeep <= mask(int'(total));
            m_tlast <= 1'b1;
            state   <= D_IDLE;
          end
        end
        D_FLUSH: if (out_free) begin
          m_tvalid <= 1'b1;
          m_tdata  <= temp;
          m_tkeep  <= mask(int'(tcnt));
          m_tlast  <= 1'b1;
          state    <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  // a header that is not the whole packet must lie within the variation range
  a_len_in_range: assert property (@(posedge clk) disable iff (rst)
      (h_valid && h_ready && !h_last) |->
        (int'(h_len) + VB >= FB) && (int'(h_len) <= FB + VB));
endmodule

// adapter_in: AXI4-Stream width up-converter, 128 -> 512 bits.
//
// Every receive channel is widened to the 512-bit internal width so that the
// first 64 bytes of each packet (the header) arrive as a single frame, which
// is what the parser and the match-action pipeline rely on. Narrow beats are
// collected, lowest byte first, into a gather register; when RATIO beats have
// arrived, or the beat carries tlast, the wide word is moved into the output
// register. A full word is therefore presented four cycles after its first
// narrow beat, the "adapter ahead" latency of the pipeline. Byte enables of
// missing beats are zero. Input is accepted while the output register is free
// or being emptied. The widths follow the document; the handshake is ordinary
// AXI4-Stream valid/ready.
module adapter_in #(
  parameter int unsigned IN_W  = 128,
  parameter int unsigned OUT_W = 512
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [IN_W-1:0]    s_tdata,
  input  logic [IN_W/8-1:0]  s_tkeep,
  input  logic               s_tlast,
  input  logic               s_tvalid,
  output logic               s_tready,
  output logic [OUT_W-1:0]   m_tdata,
  output logic [OUT_W/8-1:0] m_tkeep,
  output logic               m_tlast,
  output logic               m_tvalid,
  input  logic               m_tready
);
  localparam int unsigned RATIO = OUT_W / IN_W;
  localparam int unsigned CW    = (RATIO > 1) ? $clog2(RATIO) : 1;

  logic [OUT_W-1:0]   gdata;
  logic [OUT_W/8-1:0] gkeep;
  logic [CW-1:0]      cnt;
  logic               s_fire, done;
  logic [OUT_W-1:0]   wdata;
  logic [OUT_W/8-1:0] wkeep;

  assign s_tready = !m_tvalid || m_tready;
  assign s_fire   = s_tvalid && s_tready;
  assign done     = s_tlast || (cnt == CW'(RATIO - 1));

  // the word as it stands once the current beat is merged in
  always_comb begin
    wdata = gdata;
    wkeep = gkeep;
    wdata[cnt*IN_W +: IN_W]     = s_tdata;
    wkeep[cnt*IN_W/8 +: IN_W/8] = s_tkeep;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      gdata    <= '0;
      gkeep    <= '0;
      m_tvalid <= 1'b0;
      m_tdata  <= '0;
      m_tkeep  <= '0;
      m_tlast  <= 1'b0;
    end else begin
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;
      if (s_fire) begin
        if (done) begin
          m_tvalid <= 1'b1;
          m_tdata  <= wdata;
          m_tkeep  <= wkeep;
          m_tlast  <= s_tlast;
          gdata    <= '0;
          gkeep    <= '0;
          cnt      <= '0;
        end else begin
          gdata <= wdata;
          gkeep <= wkeep;
          cnt   <= cnt + 1'b1;
        end
      end
    end
  end
endmodule

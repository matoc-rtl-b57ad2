// adapter_out: AXI4-Stream width down-converter, 512 -> 128 bits.
//
// Takes one merged 512-bit frame from a deparser into a holding register and
// hands it out as up to four 128-bit beats, lowest bytes first. Beats whose
// byte enables are all zero are skipped, so the last beat of a packet carries
// tlast. A new wide word is accepted in the cycle its predecessor's final beat
// leaves, so a stream of full words flows at one narrow beat per cycle. The
// first narrow beat appears one cycle after the wide word is accepted (the
// "adapter after" latency). Widths follow the document; the rest is this
// design's choice.
module adapter_out #(
  parameter int unsigned IN_W  = 512,
  parameter int unsigned OUT_W = 128
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
  localparam int unsigned RATIO = IN_W / OUT_W;
  localparam int unsigned CW    = (RATIO > 1) ? $clog2(RATIO) : 1;
  localparam int unsigned KO    = OUT_W / 8;

  logic [IN_W-1:0]   d;
  logic [IN_W/8-1:0] k;
  logic              l;
  logic [CW-1:0]     idx;
  logic              more;   // a later beat of the held word has bytes

  always_comb begin
    more = 1'b0;
    for (int unsigned b = 0; b < RATIO; b++)
      if (b > idx && |k[b*KO +: KO]) more = 1'b1;
  end

  assign m_tdata  = d[idx*OUT_W +: OUT_W];
  assign m_tkeep  = k[idx*KO +: KO];
  assign m_tlast  = l && !more;
  assign s_tready = !m_tvalid || (m_tready && !more);

  always_ff @(posedge clk) begin
    if (rst) begin
      m_tvalid <= 1'b0;
      idx      <= '0;
      d        <= '0;
      k        <= '0;
      l        <= 1'b0;
    end else if (s_tvalid && s_tready) begin
      m_tvalid <= 1'b1;
      d        <= s_tdata;
      k        <= s_tkeep;
      l        <= s_tlast;
      idx      <= '0;
    end else if (m_tvalid && m_tready) begin
      if (more) idx <= idx + 1'b1;
      else      m_tvalid <= 1'b0;
    end
  end
endmodule

// hdr_demux: returns each processed header to the deparser of the channel it
// came from.
//
// The source channel field of the header selects one of N one-entry output
// registers; the header is accepted when that register is free or being
// emptied, so a stalled deparser only blocks headers of its own channel once
// they reach the head of the pipeline. Latency is one cycle. Headers of any
// other source (for example the slow path) are not expected; they are
// dropped and counted by an assertion.
module hdr_demux
  import matoc_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  hdr_t         s_data,
  input  logic         s_valid,
  output logic         s_ready,
  output hdr_t         m_data  [N],
  output logic [N-1:0] m_valid,
  input  logic [N-1:0] m_ready
);
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1;
  logic          in_range;
  logic [SW-1:0] sel;
  assign in_range = (int'(s_data.src_ch) < N);
  assign sel      = SW'(s_data.src_ch);
  assign s_ready  = !in_range || !m_valid[sel] || m_ready[sel];

  always_ff @(posedge clk) begin
    if (rst) begin
      m_valid <= '0;
      for (int i = 0; i < N; i++) m_data[i] <= '0;
    end else begin
      m_valid <= m_valid & ~m_ready;
      if (s_valid && s_ready && in_range) begin
        m_valid[sel] <= 1'b1;
        m_data[sel]  <= s_data;
      end
    end
  end

  a_src_in_range: assert property (@(posedge clk) disable iff (rst) s_valid |-> in_range);
endmodule

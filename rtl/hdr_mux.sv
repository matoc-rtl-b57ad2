// hdr_mux: round-robin multiplexer of the per-channel header streams into the
// single match-action pipeline.
//
// Each cycle the arbiter grants the first requesting input after the one it
// granted last, and the granted header is copied into the output register
// (latency 1). Headers are single frames, so a grant lasts one cycle and the
// arbiter decides again in the next one. The last winner is not excluded: if
// it alone keeps requesting it is granted back to back, so a single busy
// channel gets no bubble between packets, the improvement the document makes
// to the stock multiplexer. The source channel already travels in the header.
// The waiting time under contention is at most N-1 cycles.
module hdr_mux
  import matoc_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic           clk,
  input  logic           rst,
  input  hdr_t           s_data  [N],
  input  logic [N-1:0]   s_valid,
  output logic [N-1:0]   s_ready,
  output hdr_t           m_data,
  output logic           m_valid,
  input  logic           m_ready
);
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1;

  logic [SW-1:0] last_g, g;
  logic          any, take;

  always_comb begin
    logic [SW-1:0] c;
    any = 1'b0;
    g   = last_g;
    c   = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      c = SW'((int'(last_g) + k) % N);
      if (!any && s_valid[c]) begin
        any = 1'b1;
        g   = c;
      end
    end
  end

  assign take = any && (!m_valid || m_ready);

  always_comb begin
    s_ready = '0;
    if (take) s_ready[g] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      last_g  <= SW'(N-1);
      m_valid <= 1'b0;
      m_data  <= '0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (take) begin
        m_valid <= 1'b1;
        m_data  <= s_data[g];
        last_g  <= g;
      end
    end
  end
endmodule

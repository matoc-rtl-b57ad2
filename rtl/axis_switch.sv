// axis_switch: packet switch in front of the Ethernet ports and the slow path.
//
// N_IN AXI4-Stream inputs, each carrying a channel ID in tdest, are switched
// to N_OUT outputs (channels 0..7 are the Ethernet ports, channel 8 the
// processing-system PKTIN port). Every output has its own round-robin
// arbiter over the inputs whose current packet is addressed to it; a grant
// lasts until the granted packet's tlast beat has passed, and the next
// arbitration happens in that same cycle, so back-to-back packets, also from
// the same input, flow without a bubble. Each output is registered (latency
// one cycle). Host transmit traffic enters with its own channel ID and so
// crosses the switch unchanged, only competing for bandwidth. m_tid tells,
// beside each output beat, which input the packet came from (the slow path
// uses it to learn the ingress port). Forwarding by
// channel ID follows the document; the arbitration scheme and the port
// numbering are this design's choice.
module axis_switch #(
  parameter int unsigned N_IN   = 17,
  parameter int unsigned N_OUT  = 9,
  parameter int unsigned DATA_W = 128,
  parameter int unsigned DEST_W = 4
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic [N_IN-1:0][DATA_W-1:0]        s_tdata,
  input  logic [N_IN-1:0][DATA_W/8-1:0]      s_tkeep,
  input  logic [N_IN-1:0]                    s_tlast,
  input  logic [N_IN-1:0][DEST_W-1:0]        s_tdest,
  input  logic [N_IN-1:0]                    s_tvalid,
  output logic [N_IN-1:0]                    s_tready,
  output logic [N_OUT-1:0][DATA_W-1:0]       m_tdata,
  output logic [N_OUT-1:0][DATA_W/8-1:0]     m_tkeep,
  output logic [N_OUT-1:0]                   m_tlast,
  output logic [N_OUT-1:0][DEST_W-1:0]       m_tdest,
  output logic [N_OUT-1:0][((N_IN > 1) ? $clog2(N_IN) : 1)-1:0] m_tid,
  output logic [N_OUT-1:0]                   m_tvalid,
  input  logic [N_OUT-1:0]                   m_tready
);
  localparam int unsigned IW = (N_IN > 1) ? $clog2(N_IN) : 1;

  logic [N_OUT-1:0]         locked, act, fire;
  logic [N_OUT-1:0][IW-1:0] cur, last_g, sel;

  always_comb begin
    int c;
    c        = 0;
    s_tready = '0;
    fire     = '0;
    act      = '0;
    sel      = cur;
    for (int o = 0; o < N_OUT; o++) begin
      act[o] = 1'b0;
      sel[o] = cur[o];
      if (locked[o]) begin
        act[o] = s_tvalid[cur[o]];
      end else begin
        for (int k = 1; k <= N_IN; k++) begin
          c = (int'(last_g[o]) + k) % N_IN;
          if (!act[o] && s_tvalid[c] && (int'(s_tdest[c]) == o)) begin
            act[o] = 1'b1;
            sel[o] = IW'(c);
          end
        end
      end
      fire[o] = act[o] && (!m_tvalid[o] || m_tready[o]);
      if (fire[o]) s_tready[sel[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      locked   <= '0;
      cur      <= '0;
      last_g   <= '0;
      m_tvalid <= '0;
      m_tdata  <= '0;
      m_tkeep  <= '0;
      m_tlast  <= '0;
      m_tdest  <= '0;
      m_tid    <= '0;
    end else begin
      for (int o = 0; o < N_OUT; o++) begin
        if (m_tvalid[o] && m_tready[o]) m_tvalid[o] <= 1'b0;
        if (fire[o]) begin
          m_tvalid[o] <= 1'b1;
          m_tdata[o]  <= s_tdata[sel[o]];
          m_tkeep[o]  <= s_tkeep[sel[o]];
          m_tlast[o]  <= s_tlast[sel[o]];
          m_tdest[o]  <= s_tdest[sel[o]];
          m_tid[o]    <= sel[o];
          cur[o]      <= sel[o];
          last_g[o]   <= sel[o];
          locked[o]   <= !s_tlast[sel[o]];
        end
      end
    end
  end

  for (genvar i = 0; i < N_IN; i++) begin : g_chk
    a_dest_valid: assert property (@(posedge clk) disable iff (rst)
                                   s_tvalid[i] |-> (int'(s_tdest[i]) < N_OUT));
  end
endmodule

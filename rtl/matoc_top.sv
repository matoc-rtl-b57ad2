// matoc_top: match-action packet processing for eight 25G Ethernet channels.
//
// Receive path, per channel: adapter_in widens the 128-bit stream to 512
// bits, the parser splits off the first frame as the header and sends every
// frame to the channel's packet_buffer. hdr_mux merges the eight header
// streams into the single match-action table (mat); hdr_demux hands each
// processed header back to its channel's deparser, which merges it with the
// buffered frames; adapter_out narrows the result to 128 bits and the
// axis_switch forwards it, by the channel ID the actions chose, to one of the
// eight Ethernet transmit ports or to the slow-path PKTIN port. Host transmit
// streams (tx_*) and the slow path's PKTOUT stream enter the switch directly;
// a host stream keeps its own channel number. pktin_tdest names the channel
// a slow-path packet came in on (the switch's input number), so the switch's
// own tdest outputs, which only repeat the output number, are left open.
// The MAT tables are programmed
// over AXI4-Lite.
// Timing: with no contention a packet's first 128-bit beat leaves the switch
// 19 cycles after its first beat entered (4 adapter + 1 parser + 1 mux + 4
// match + 5 action + 1 demux + 1 deparser + 1 adapter + 1 switch). One
// header per cycle can be processed, i.e. 250 Mpackets/s at 250 MHz.
// The structure, widths and latencies follow the document; the Corundum
// NIC around it (MACs, PCIe DMA) and the processing-system software are
// outside this module and appear as its stream ports.
module matoc_top
  import matoc_pkg::*;
#(
  parameter int unsigned ADDR_W = 12,
  parameter int unsigned BUF_DEPTH = 512
) (
  input  logic                             clk,
  input  logic                             rst,
  // Ethernet receive streams
  input  logic [N_CH-1:0][EXT_W-1:0]       rx_tdata,
  input  logic [N_CH-1:0][EXT_W/8-1:0]     rx_tkeep,
  input  logic [N_CH-1:0]                  rx_tlast,
  input  logic [N_CH-1:0]                  rx_tvalid,
  output logic [N_CH-1:0]                  rx_tready,
  // host transmit streams
  input  logic [N_CH-1:0][EXT_W-1:0]       tx_tdata,
  input  logic [N_CH-1:0][EXT_W/8-1:0]     tx_tkeep,
  input  logic [N_CH-1:0]                  tx_tlast,
  input  logic [N_CH-1:0]                  tx_tvalid,
  output logic [N_CH-1:0]                  tx_tready,
  // Ethernet transmit streams
  output logic [N_CH-1:0][EXT_W-1:0]       eth_tdata,
  output logic [N_CH-1:0][EXT_W/8-1:0]     eth_tkeep,
  output logic [N_CH-1:0]                  eth_tlast,
  output logic [N_CH-1:0]                  eth_tvalid,
  input  logic [N_CH-1:0]                  eth_tready,
  // slow path: PKTIN to the processing system, PKTOUT from it
  output logic [EXT_W-1:0]                 pktin_tdata,
  output logic [EXT_W/8-1:0]               pktin_tkeep,
  output logic                             pktin_tlast,
  output logic [CH_W-1:0]                  pktin_tdest,
  output logic                             pktin_tvalid,
  input  logic                             pktin_tready,
  input  logic [EXT_W-1:0]                 pktout_tdata,
  input  logic [EXT_W/8-1:0]               pktout_tkeep,
  input  logic                             pktout_tlast,
  input  logic [CH_W-1:0]                  pktout_tdest,
  input  logic                             pktout_tvalid,
  output logic                             pktout_tready,
  // MMIO (AXI4-Lite) to the MAT control registers
  input  logic [ADDR_W-1:0]                s_axil_awaddr,
  input  logic                             s_axil_awvalid,
  output logic                             s_axil_awready,
  input  logic [31:0]                      s_axil_wdata,
  input  logic [3:0]                       s_axil_wstrb,
  input  logic                             s_axil_wvalid,
  output logic                             s_axil_wready,
  output logic [1:0]                       s_axil_bresp,
  output logic                             s_axil_bvalid,
  input  logic                             s_axil_bready,
  input  logic [ADDR_W-1:0]                s_axil_araddr,
  input  logic                             s_axil_arvalid,
  output logic                             s_axil_arready,
  output logic [31:0]                      s_axil_rdata,
  output logic [1:0]                       s_axil_rresp,
  output logic                             s_axil_rvalid,
  input  logic                             s_axil_rready
);
  localparam int unsigned N_IN  = 2*N_CH + 1;
  localparam int unsigned N_OUT = N_CH + 1;

  // per-channel wide streams
  logic [N_CH-1:0][INT_W-1:0]   a_tdata, b_tdata, q_tdata, d_tdata;
  logic [N_CH-1:0][INT_W/8-1:0] a_tkeep, b_tkeep, q_tkeep, d_tkeep;
  logic [N_CH-1:0]              a_tlast, b_tlast, q_tlast, d_tlast;
  logic [N_CH-1:0]              a_tvalid, b_tvalid, q_tvalid, d_tvalid;
  logic [N_CH-1:0]              a_tready, b_tready, q_tready, d_tready;
  logic [N_CH-1:0][CH_W-1:0]    d_tdest;
  // narrow processed streams
  logic [N_CH-1:0][EXT_W-1:0]   o_tdata;
  logic [N_CH-1:0][EXT_W/8-1:0] o_tkeep;
  logic [N_CH-1:0]              o_tlast, o_tvalid, o_tready;
  logic [N_CH-1:0][CH_W-1:0]    o_tdest;
  // headers
  hdr_t                         ph_data [N_CH];
  logic [N_CH-1:0]              ph_valid, ph_ready;
  hdr_t                         mx_data, mt_data;
  logic                         mx_valid, mx_ready, mt_valid, mt_ready;
  hdr_t                         dh_data [N_CH];
  logic [N_CH-1:0]              dh_valid, dh_ready;
  // switch
  logic [N_IN-1:0][EXT_W-1:0]   sw_tdata;
  logic [N_IN-1:0][EXT_W/8-1:0] sw_tkeep;
  logic [N_IN-1:0]              sw_tlast, sw_tvalid, sw_tready;
  logic [N_IN-1:0][CH_W-1:0]    sw_tdest;
  logic [N_OUT-1:0][EXT_W-1:0]  so_tdata;
  logic [N_OUT-1:0][EXT_W/8-1:0] so_tkeep;
  logic [N_OUT-1:0]             so_tlast, so_tvalid, so_tready;
  logic [N_OUT-1:0][$clog2(N_IN)-1:0] so_tid;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    adapter_in #(.IN_W(EXT_W), .OUT_W(INT_W)) u_ain (
      .clk, .rst,
      .s_tdata(rx_tdata[c]), .s_tkeep(rx_tkeep[c]), .s_tlast(rx_tlast[c]),
      .s_tvalid(rx_tvalid[c]), .s_tready(rx_tready[c]),
      .m_tdata(a_tdata[c]), .m_tkeep(a_tkeep[c]), .m_tlast(a_tlast[c]),
      .m_tvalid(a_tvalid[c]), .m_tready(a_tready[c])
    );

    parser #(.CH_ID(CH_W'(c))) u_parser (
      .clk, .rst,
      .s_tdata(a_tdata[c]), .s_tkeep(a_tkeep[c]), .s_tlast(a_tlast[c]),
      .s_tvalid(a_tvalid[c]), .s_tready(a_tready[c]),
      .h_data(ph_data[c]), .h_valid(ph_valid[c]), .h_ready(ph_ready[c]),
      .b_tdata(b_tdata[c]), .b_tkeep(b_tkeep[c]), .b_tlast(b_tlast[c]),
      .b_tvalid(b_tvalid[c]), .b_tready(b_tready[c])
    );

    packet_buffer #(.DATA_W(INT_W), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst,
      .s_tdata(b_tdata[c]), .s_tkeep(b_tkeep[c]), .s_tlast(b_tlast[c]),
      .s_tvalid(b_tvalid[c]), .s_tready(b_tready[c]),
      .m_tdata(q_tdata[c]), .m_tkeep(q_tkeep[c]), .m_tlast(q_tlast[c]),
      .m_tvalid(q_tvalid[c]), .m_tready(q_tready[c])
    );

    deparser #(.FRAME_BYTES(FRAME_BYTES), .VAR_BYTES(VAR_BYTES),
               .DEST_W(CH_W), .LEN_W(LEN_W)) u_deparser (
      .clk, .rst,
      .h_data(dh_data[c].data), .h_len(dh_data[c].len), .h_last(dh_data[c].last),
      .h_dest(dh_data[c].dst_ch), .h_valid(dh_valid[c]), .h_ready(dh_ready[c]),
      .s_tdata(q_tdata[c]), .s_tkeep(q_tkeep[c]), .s_tlast(q_tlast[c]),
      .s_tvalid(q_tvalid[c]), .s_tready(q_tready[c]),
      .m_tdata(d_tdata[c]), .m_tkeep(d_tkeep[c]), .m_tlast(d_tlast[c]),
      .m_tdest(d_tdest[c]), .m_tvalid(d_tvalid[c]), .m_tready(d_tready[c])
    );

    // the destination is constant within a packet: carried beside the adapter
    logic [CH_W-1:0] dest_q;
    always_ff @(posedge clk) begin
      if (rst) dest_q <= '0;
      else if (d_tvalid[c] && d_tready[c]) dest_q <= d_tdest[c];
    end
    assign o_tdest[c] = dest_q;

    adapter_out #(.IN_W(INT_W), .OUT_W(EXT_W)) u_aout (
      .clk, .rst,
      .s_tdata(d_tdata[c]), .s_tkeep(d_tkeep[c]), .s_tlast(d_tlast[c]),
      .s_tvalid(d_tvalid[c]), .s_tready(d_tready[c]),
      .m_tdata(o_tdata[c]), .m_tkeep(o_tkeep[c]), .m_tlast(o_tlast[c]),
      .m_tvalid(o_tvalid[c]), .m_tready(o_tready[c])
    );

    // switch inputs: 0..7 processed receive traffic, 8..15 host transmit
    assign sw_tdata[c]  = o_tdata[c];
    assign sw_tkeep[c]  = o_tkeep[c];
    assign sw_tlast[c]  = o_tlast[c];
    assign sw_tdest[c]  = o_tdest[c];
    assign sw_tvalid[c] = o_tvalid[c];
    assign o_tready[c]  = sw_tready[c];

    assign sw_tdata[N_CH+c]  = tx_tdata[c];
    assign sw_tkeep[N_CH+c]  = tx_tkeep[c];
    assign sw_tlast[N_CH+c]  = tx_tlast[c];
    assign sw_tdest[N_CH+c]  = CH_W'(c);
    assign sw_tvalid[N_CH+c] = tx_tvalid[c];
    assign tx_tready[c]      = sw_tready[N_CH+c];

    assign eth_tdata[c]  = so_tdata[c];
    assign eth_tkeep[c]  = so_tkeep[c];
    assign eth_tlast[c]  = so_tlast[c];
    assign eth_tvalid[c] = so_tvalid[c];
    assign so_tready[c]  = eth_tready[c];
  end

  assign sw_tdata[2*N_CH]  = pktout_tdata;
  assign sw_tkeep[2*N_CH]  = pktout_tkeep;
  assign sw_tlast[2*N_CH]  = pktout_tlast;
  assign sw_tdest[2*N_CH]  = pktout_tdest;
  assign sw_tvalid[2*N_CH] = pktout_tvalid;
  assign pktout_tready     = sw_tready[2*N_CH];

  assign pktin_tdata   = so_tdata[N_CH];
  assign pktin_tkeep   = so_tkeep[N_CH];
  assign pktin_tlast   = so_tlast[N_CH];
  assign pktin_tdest   = CH_W'(so_tid[N_CH]);   // ingress channel (inputs 0..7)
  assign pktin_tvalid  = so_tvalid[N_CH];
  assign so_tready[N_CH] = pktin_tready;

  hdr_mux #(.N(N_CH)) u_mux (
    .clk, .rst,
    .s_data(ph_data), .s_valid(ph_valid), .s_ready(ph_ready),
    .m_data(mx_data), .m_valid(mx_valid), .m_ready(mx_ready)
  );

  mat #(.ADDR_W(ADDR_W)) u_mat (
    .clk, .rst,
    .awaddr(s_axil_awaddr), .awvalid(s_axil_awvalid), .awready(s_axil_awready),
    .wdata(s_axil_wdata), .wstrb(s_axil_wstrb), .wvalid(s_axil_wvalid),
    .wready(s_axil_wready), .bresp(s_axil_bresp), .bvalid(s_axil_bvalid),
    .bready(s_axil_bready), .araddr(s_axil_araddr), .arvalid(s_axil_arvalid),
    .arready(s_axil_arready), .rdata(s_axil_rdata), .rresp(s_axil_rresp),
    .rvalid(s_axil_rvalid), .rready(s_axil_rready),
    .s_data(mx_data), .s_valid(mx_valid), .s_ready(mx_ready),
    .m_data(mt_data), .m_valid(mt_valid), .m_ready(mt_ready)
  );

  hdr_demux #(.N(N_CH)) u_demux (
    .clk, .rst,
    .s_data(mt_data), .s_valid(mt_valid), .s_ready(mt_ready),
    .m_data(dh_data), .m_valid(dh_valid), .m_ready(dh_ready)
  );

  axis_switch #(.N_IN(N_IN), .N_OUT(N_OUT), .DATA_W(EXT_W), .DEST_W(CH_W)) u_switch (
    .clk, .rst,
    .s_tdata(sw_tdata), .s_tkeep(sw_tkeep), .s_tlast(sw_tlast), .s_tdest(sw_tdest),
    .s_tvalid(sw_tvalid), .s_tready(sw_tready),
    .m_tdata(so_tdata), .m_tkeep(so_tkeep), .m_tlast(so_tlast), .m_tdest(), .m_tid(so_tid),
    .m_tvalid(so_tvalid), .m_tready(so_tready)
  );
endmodule

// parser: separates each packet into a header frame and buffered frames.
//
// The first 512-bit frame of every packet is the header. It is copied into a
// one-entry output register as an hdr_t (zero-extended to the 632-bit header
// bus) together with pkt_type[3:0], the byte length taken from tkeep, the
// source channel CH_ID and the slow-path channel as default destination.
// pkt_type tells whether the packet carries a VLAN tag and whether it is
// IPv4 or IPv6 (EtherType at byte 12, or at byte 16 behind a 0x8100 tag);
// PT_SHORT flags a frame too short to hold the whole IP header. Every frame,
// the first included, is passed on unchanged to the packet buffer.
// A first frame is accepted only when the buffer is ready and the header
// register is free or being emptied; later frames need only the buffer. The
// header appears one cycle after its frame (parser latency 1). Splitting off
// the first frame and the pkt_type content follow the document; the bit
// order of pkt_type and the short-frame flag are this design's choice.
module parser
  import matoc_pkg::*;
#(
  parameter logic [CH_W-1:0] CH_ID = '0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [INT_W-1:0]     s_tdata,
  input  logic [INT_W/8-1:0]   s_tkeep,
  input  logic                 s_tlast,
  input  logic                 s_tvalid,
  output logic                 s_tready,
  // header to the MAT multiplexer
  output hdr_t                 h_data,
  output logic                 h_valid,
  input  logic                 h_ready,
  // all frames to the packet buffer
  output logic [INT_W-1:0]     b_tdata,
  output logic [INT_W/8-1:0]   b_tkeep,
  output logic                 b_tlast,
  output logic                 b_tvalid,
  input  logic                 b_tready
);
  localparam int unsigned HW = HDR_BYTES * 8;
  logic sof;        // next frame is the first of a packet
  logic hdr_free;
  hdr_t hdr_n;

  assign hdr_free = !h_valid || h_ready;
  assign s_tready = b_tready && (!sof || hdr_free);
  assign b_tvalid = s_tvalid && (!sof || hdr_free);
  assign b_tdata  = s_tdata;
  assign b_tkeep  = s_tkeep;
  assign b_tlast  = s_tlast;

  always_comb begin
    logic [15:0] et;
    logic        vlan;
    int unsigned l3;
    logic [LEN_W-1:0] len;
    len = '0;
    for (int unsigned i = 0; i < INT_W/8; i++) len += LEN_W'(s_tkeep[i]);
    vlan = ({s_tdata[12*8 +: 8], s_tdata[13*8 +: 8]} == ETH_VLAN);
    et   = vlan ? {s_tdata[16*8 +: 8], s_tdata[17*8 +: 8]}
                : {s_tdata[12*8 +: 8], s_tdata[13*8 +: 8]};
    l3   = vlan ? 18 : 14;
    hdr_n          = '0;
    hdr_n.data     = HW'(s_tdata);
    hdr_n.len      = len;
    hdr_n.last     = s_tlast;
    hdr_n.src_ch   = CH_ID;
    hdr_n.dst_ch   = CH_W'(PS_CH);
    hdr_n.pkt_type[PT_VLAN] = vlan;
    hdr_n.pkt_type[PT_IPV4] = (et == ETH_IPV4);
    hdr_n.pkt_type[PT_IPV6] = (et == ETH_IPV6);
    hdr_n.pkt_type[PT_SHORT] = ((et == ETH_IPV4) && (int'(len) < int'(l3) + 20)) ||
                               ((et == ETH_IPV6) && (int'(len) < int'(l3) + 40));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sof     <= 1'b1;
      h_valid <= 1'b0;
      h_data  <= '0;
    end else begin
      if (h_valid && h_ready) h_valid <= 1'b0;
      if (s_tvalid && s_tready) begin
        sof <= s_tlast;
        if (sof) begin
          h_valid <= 1'b1;
          h_data  <= hdr_n;
        end
      end
    end
  end
endmodule

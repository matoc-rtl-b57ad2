// mat: the match-action table offload of the IP-forwarding example.
//
// Joins the control registers (mat_csr), the match stage (key preparation,
// TCAM, instruction table) and the action stage (TTL, MAC, VLAN, channel).
// Headers enter from the multiplexer, leave towards the demultiplexer
// 4 + 5 = 9 cycles later, one header per cycle at full rate; both stages
// stall together under back-pressure. Table updates arrive over AXI4-Lite
// and only use TCAM cycles in which no search takes place, so they never
// slow the packet stream. The composition follows the document's block
// diagram; this design builds a single offload (the document's forwarding
// example) rather than a chain of several. The match stage's tcam_done pulse
// is left open: software learns the end of an update from STATUS.busy.
module mat
  import matoc_pkg::*;
#(
  parameter int unsigned ADDR_W = 12
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [ADDR_W-1:0] awaddr,
  input  logic              awvalid,
  output logic              awready,
  input  logic [31:0]       wdata,
  input  logic [3:0]        wstrb,
  input  logic              wvalid,
  output logic              wready,
  output logic [1:0]        bresp,
  output logic              bvalid,
  input  logic              bready,
  input  logic [ADDR_W-1:0] araddr,
  input  logic              arvalid,
  output logic              arready,
  output logic [31:0]       rdata,
  output logic [1:0]        rresp,
  output logic              rvalid,
  input  logic              rready,
  input  hdr_t              s_data,
  input  logic              s_valid,
  output logic              s_ready,
  output hdr_t              m_data,
  output logic              m_valid,
  input  logic              m_ready
);
  logic                  wr_req, rd_req, rd_vld, busy;
  logic [IDX_W-4:0]      wr_row;
  logic [7:0][KEY_W-1:0] wr_data, wr_care;
  logic [7:0]            wr_vld;
  logic [IDX_W-1:0]      rd_index, it_addr;
  logic [KEY_W-1:0]      rd_data, rd_care;
  logic                  it_we;
  instr_t                it_wdata, it_q;
  logic [CH_W-1:0]       miss_ch;
  meta_t                 mm_data;
  logic                  mm_valid, mm_ready;

  mat_csr #(.ADDR_W(ADDR_W)) u_csr (
    .clk, .rst,
    .awaddr, .awvalid, .awready, .wdata, .wstrb, .wvalid, .wready,
    .bresp, .bvalid, .bready, .araddr, .arvalid, .arready,
    .rdata, .rresp, .rvalid, .rready,
    .wr_req, .wr_row, .wr_data, .wr_care, .wr_vld, .rd_req, .rd_index,
    .rd_data, .rd_care, .rd_vld, .tcam_busy(busy),
    .it_we, .it_addr, .it_wdata, .it_q, .miss_ch
  );

  match_stage u_match (
    .clk, .rst,
    .s_data, .s_valid, .s_ready,
    .m_data(mm_data), .m_valid(mm_valid), .m_ready(mm_ready),
    .wr_req, .wr_row, .wr_data, .wr_care, .wr_vld, .rd_req, .rd_index,
    .rd_data, .rd_care, .rd_vld, .tcam_busy(busy), .tcam_done(),
    .it_we, .it_addr, .it_wdata, .it_q
  );

  action_stage u_action (
    .clk, .rst,
    .s_data(mm_data), .s_valid(mm_valid), .s_ready(mm_ready),
    .miss_ch, .m_data, .m_valid, .m_ready
  );
endmodule

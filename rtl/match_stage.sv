// match_stage: search-key preparation, TCAM lookup and instruction fetch.
//
// Four registered steps, one cycle each, so a header leaves four cycles
// after it enters and a new header can enter every cycle:
//   1. key preparation: the 35-bit key is {pkt_type[2:0], destination
//      address}, the IPv4 destination address (bytes 30..33, or 34..37 behind
//      a VLAN tag) or the first 32 bits of the IPv6 destination address;
//   2. TCAM search (tcam, registered match index);
//   3. instruction fetch from the block-RAM instruction table;
//   4. output register: header, instruction (all zero on a miss) and hit.
// All steps advance together when the output register is free or being
// read (adv); otherwise the whole stage holds. The TCAM and instruction
// table update ports are brought out for the control registers; updates
// pause only in cycles with a search. The four steps follow the document;
// the key composition is this design's choice.
module match_stage
  import matoc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  hdr_t                  s_data,
  input  logic                  s_valid,
  output logic                  s_ready,
  output meta_t                 m_data,
  output logic                  m_valid,
  input  logic                  m_ready,
  // TCAM update
  input  logic                  wr_req,
  input  logic [IDX_W-4:0]      wr_row,
  input  logic [7:0][KEY_W-1:0] wr_data,
  input  logic [7:0][KEY_W-1:0] wr_care,
  input  logic [7:0]            wr_vld,
  input  logic                  rd_req,
  input  logic [IDX_W-1:0]      rd_index,
  output logic [KEY_W-1:0]      rd_data,
  output logic [KEY_W-1:0]      rd_care,
  output logic                  rd_vld,
  output logic                  tcam_busy,
  output logic                  tcam_done,
  // instruction table port
  input  logic                  it_we,
  input  logic [IDX_W-1:0]      it_addr,
  input  instr_t                it_wdata,
  output instr_t                it_q
);
  logic adv, t_init;
  logic v1, v3;
  hdr_t h1, h2, h3;
  logic [KEY_W-1:0] key1;
  logic t_valid, t_hit, t_sready;
  logic [IDX_W-1:0] t_index;
  logic hit3;
  instr_t i3;

  // the stage holds while the TCAM clears itself after reset
  assign adv     = (!m_valid || m_ready) && t_init;
  assign s_ready = adv;

  function automatic logic [KEY_W-1:0] make_key(input logic [HDR_BYTES*8-1:0] d,
                                                 input logic [2:0] pt);
    logic [31:0] ip;
    int unsigned off;
    off = pt[PT_VLAN] ? 4 : 0;
    ip  = '0;
    if (pt[PT_IPV4])      ip = get_be32(d, 30 + off);
    else if (pt[PT_IPV6]) ip = get_be32(d, 38 + off);
    return KEY_W'({pt, ip});
  endfunction

  tcam #(.KEY_W(KEY_W), .DEPTH(TCAM_DEPTH)) u_tcam (
    .clk(clk), .rst(rst),
    .s_key(key1), .s_valid(v1 && adv), .s_ready(t_sready),
    .m_valid(t_valid), .m_hit(t_hit), .m_index(t_index), .m_ready(adv),
    .wr_req(wr_req), .wr_row(wr_row), .wr_data(wr_data), .wr_care(wr_care),
    .wr_vld(wr_vld), .rd_req(rd_req), .rd_index(rd_index),
    .rd_data(rd_data), .rd_care(rd_care), .rd_vld(rd_vld),
    .busy(tcam_busy), .init_done(t_init), .done(tcam_done)
  );

  instr_table #(.DEPTH(TCAM_DEPTH)) u_itab (
    .clk(clk), .a_en(adv), .a_addr(t_index), .a_q(i3),
    .b_we(it_we), .b_addr(it_addr), .b_wdata(it_wdata), .b_q(it_q)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0; v3 <= 1'b0; m_valid <= 1'b0;
      h1 <= '0; h2 <= '0; h3 <= '0; key1 <= '0; hit3 <= 1'b0;
      m_data <= '0;
    end else if (adv) begin
      // 1: key preparation
      v1   <= s_valid;
      h1   <= s_data;
      key1 <= make_key(s_data.data, s_data.pkt_type[2:0]);
      // 2: TCAM (valid/hit/index registered inside the TCAM)
      h2   <= h1;
      // 3: instruction fetch
      v3   <= t_valid;
      h3   <= h2;
      hit3 <= t_hit;
      // 4: output
      m_valid      <= v3;
      m_data.hdr   <= h3;
      m_data.hit   <= hit3;
      m_data.instr <= hit3 ? i3 : '0;
    end
  end

  a_no_lost_search: assert property (@(posedge clk) disable iff (rst)
                                     (v1 && adv) |-> t_sready);
endmodule

// action_stage: the action half of the IP-forwarding match-action table.
//
// Five registered steps, one cycle each, all advancing together when the
// output register is free or being read (adv):
//   1. TTL decrement. IPv4: TTL at byte 22 (26 behind a VLAN tag), header
//      checksum at 24/28 updated incrementally, HC' = ~(~HC + ~m + m') in
//      ones' complement (RFC 1624), m being the TTL/protocol word. IPv6: hop
//      limit at byte 21/25. A packet whose TTL is already 0 or 1 is marked
//      for the slow path and the later steps leave it unchanged, so the host
//      sees the packet as it arrived.
//   2. MAC rewrite: destination (bytes 0..5) and/or source (6..11) address.
//   3. VLAN tag: insert (4 bytes 0x8100+TCI at byte 12, header grows by 4;
//      an existing tag gets the new TCI instead), modify (TCI of an existing
//      tag) or remove (header shrinks by 4). pkt_type and len follow.
//   4. Set channel: the expired-TTL mark sends the packet to the slow path,
//      a miss to miss_ch, a hit with set_ch to the instruction's out_ch;
//      otherwise the parser's default (slow path) stays.
//   5. Output register.
// Every action is enabled by its own opcode bit of the fetched instruction,
// so a packet that matched nothing passes through untouched. The four
// actions, their order and the 5-cycle latency follow the document; the
// expired-TTL rule, the miss channel and the field encodings are this
// design's choices.
module action_stage
  import matoc_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  meta_t           s_data,
  input  logic            s_valid,
  output logic            s_ready,
  input  logic [CH_W-1:0] miss_ch,
  output hdr_t            m_data,
  output logic            m_valid,
  input  logic            m_ready
);
  typedef struct packed {
    meta_t m;
    logic  expired;
  } act_t;

  logic adv;
  logic [3:0] v;
  act_t a1, a2, a3;
  hdr_t h4;

  assign adv     = !m_valid || m_ready;
  assign s_ready = adv;

  function automatic logic [15:0] ones_add(input logic [15:0] x, input logic [15:0] y);
    logic [16:0] s;
    s = {1'b0, x} + {1'b0, y};
    return s[15:0] + {15'd0, s[16]};
  endfunction

  function automatic logic [HDR_BYTES*8-1:0] put_byte(input logic [HDR_BYTES*8-1:0] d,
                                                      input int unsigned i, input logic [7:0] b);
    logic [HDR_BYTES*8-1:0] r;
    r = d;
    r[i*8 +: 8] = b;
    return r;
  endfunction

  // 1: TTL decrement with checksum update
  function automatic act_t do_ttl(input meta_t m);
    act_t r;
    int unsigned off;
    logic [7:0] ttl;
    logic [15:0] hc, mo, mn, hn;
    r.m       = m;
    r.expired = 1'b0;
    off = m.hdr.pkt_type[PT_VLAN] ? 4 : 0;
    if (m.hit && m.instr.dec_ttl && !m.hdr.pkt_type[PT_SHORT]) begin
      if (m.hdr.pkt_type[PT_IPV4]) begin
        ttl = get_byte(m.hdr.data, 22 + off);
        if (ttl <= 8'd1) r.expired = 1'b1;
        else begin
          mo = get_be16(m.hdr.data, 22 + off);
          mn = {ttl - 8'd1, mo[7:0]};
          hc = get_be16(m.hdr.data, 24 + off);
          hn = ~ones_add(ones_add(~hc, ~mo), mn);
          r.m.hdr.data = put_byte(r.m.hdr.data, 22 + off, ttl - 8'd1);
          r.m.hdr.data = put_byte(r.m.hdr.data, 24 + off, hn[15:8]);
          r.m.hdr.data = put_byte(r.m.hdr.data, 25 + off, hn[7:0]);
        end
      end else if (m.hdr.pkt_type[PT_IPV6]) begin
        ttl = get_byte(m.hdr.data, 21 + off);
        if (ttl <= 8'd1) r.expired = 1'b1;
        else r.m.hdr.data = put_byte(r.m.hdr.data, 21 + off, ttl - 8'd1);
      end
    end
    return r;
  endfunction

  // 2: MAC address rewrite
  function automatic act_t do_mac(input act_t a);
    act_t r;
    r = a;
    for (int unsigned i = 0; i < 6; i++) begin
      if (a.expired) continue;
      if (a.m.instr.set_dmac) r.m.hdr.data[i*8 +: 8]     = a.m.instr.dmac[(5-i)*8 +: 8];
      if (a.m.instr.set_smac) r.m.hdr.data[(6+i)*8 +: 8] = a.m.instr.smac[(5-i)*8 +: 8];
    end
    return r;
  endfunction

  // 3: VLAN tag insert / modify / remove
  function automatic act_t do_vlan(input act_t a);
    act_t r;
    logic has_tag;
    logic [15:0] tci;
    r      = a;
    has_tag = a.m.hdr.pkt_type[PT_VLAN];
    tci    = a.m.instr.vlan_tci;
    unique case (a.expired ? VLAN_NONE : a.m.instr.vlan_op)
      VLAN_INSERT: begin
        if (has_tag) begin
          r.m.hdr.data[14*8 +: 8] = tci[15:8];
          r.m.hdr.data[15*8 +: 8] = tci[7:0];
        end else begin
          for (int unsigned i = 16; i < HDR_BYTES; i++)
            r.m.hdr.data[i*8 +: 8] = a.m.hdr.data[(i-4)*8 +: 8];
          r.m.hdr.data[12*8 +: 8] = ETH_VLAN[15:8];
          r.m.hdr.data[13*8 +: 8] = ETH_VLAN[7:0];
          r.m.hdr.data[14*8 +: 8] = tci[15:8];
          r.m.hdr.data[15*8 +: 8] = tci[7:0];
          r.m.hdr.len = a.m.hdr.len + LEN_W'(4);
          r.m.hdr.pkt_type[PT_VLAN] = 1'b1;
        end
      end
      VLAN_MODIFY: begin
        if (has_tag) begin
          r.m.hdr.data[14*8 +: 8] = tci[15:8];
          r.m.hdr.data[15*8 +: 8] = tci[7:0];
        end
      end
      VLAN_REMOVE: begin
        if (has_tag) begin
          for (int unsigned i = 12; i < HDR_BYTES; i++)
            r.m.hdr.data[i*8 +: 8] = (i + 4 < HDR_BYTES) ? a.m.hdr.data[(i+4)*8 +: 8] : 8'h00;
          r.m.hdr.len = a.m.hdr.len - LEN_W'(4);
          r.m.hdr.pkt_type[PT_VLAN] = 1'b0;
        end
      end
      default: ;
    endcase
    return r;
  endfunction

  // 4: output channel
  function automatic hdr_t do_chan(input act_t a, input logic [CH_W-1:0] mch);
    hdr_t h;
    h = a.m.hdr;
    if (a.expired)                      h.dst_ch = CH_W'(PS_CH);
    else if (!a.m.hit)                  h.dst_ch = mch;
    else if (a.m.instr.set_ch)          h.dst_ch = a.m.instr.out_ch;
    return h;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      v <= '0; m_valid <= 1'b0;
      a1 <= '0; a2 <= '0; a3 <= '0; h4 <= '0; m_data <= '0;
    end else if (adv) begin
      v[0]    <= s_valid;
      a1      <= do_ttl(s_data);
      v[1]    <= v[0];
      a2      <= do_mac(a1);
      v[2]    <= v[1];
      a3      <= do_vlan(a2);
      v[3]    <= v[2];
      h4      <= do_chan(a3, miss_ch);
      m_valid <= v[3];
      m_data  <= h4;
    end
  end
endmodule

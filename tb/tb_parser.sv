// tb_parser: self-checking test of the header-splitting parser.
// Random packets of random type (IPv4, IPv6, other EtherType, each with or
// without a VLAN tag, and short IP frames) are sent as 512-bit frames. The
// header output must carry the first frame, its length, the single-frame
// flag, the expected pkt_type (worked out here from the generated type, not
// from the bytes), the channel and the default slow-path destination. The
// buffer output must carry every frame unchanged. Random back-pressure on
// both outputs; the header latency of one cycle is checked once.
module tb_parser;
  import matoc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [511:0] s_tdata, b_tdata; logic [63:0] s_tkeep, b_tkeep;
  logic s_tlast, s_tvalid, s_tready, b_tlast, b_tvalid, b_tready;
  hdr_t h_data; logic h_valid, h_ready;
  parser #(.CH_ID(4'd5)) dut (.*);

  int checks = 0, failures = 0;
  typedef struct { logic [511:0] d; logic [63:0] k; logic l; } fr_t;
  fr_t frames [$];
  fr_t bexp [$];
  hdr_t hexp [$];
  int type_cnt [4];
  bit rnd = 0;
  int cyc = 0, t_in = -1, t_out = -1;

  task automatic gen(input int kind, input bit vlan, input int len);
    byte b [];
    int off;
    hdr_t h;
    b = new[len];
    foreach (b[i]) b[i] = byte'($urandom);
    off = 12;
    if (vlan) begin b[12] = 8'h81; b[13] = 8'h00; off = 16; end
    else if (b[12] == 8'h81) b[12] = 8'h11;
    case (kind)
      0: begin b[off] = 8'h08; b[off+1] = 8'h00; end
      1: begin b[off] = 8'h86; b[off+1] = 8'hDD; end
      default: begin b[off] = 8'h12; b[off+1] = 8'h34; end
    endcase
    h = '0;
    h.len = 7'((len > 64) ? 64 : len);
    h.last = (len <= 64);
    h.src_ch = 4'd5;
    h.dst_ch = 4'(PS_CH);
    h.pkt_type[PT_IPV4] = (kind == 0);
    h.pkt_type[PT_IPV6] = (kind == 1);
    h.pkt_type[PT_VLAN] = vlan;
    h.pkt_type[PT_SHORT] = (kind == 0 && len < off + 22) || (kind == 1 && len < off + 42);
    for (int i = 0; i < len && i < 64; i++) h.data[i*8 +: 8] = b[i];
    hexp.push_back(h);
    for (int f = 0; f < len; f += 64) begin
      fr_t fr;
      fr.d = '0; fr.k = '0;
      for (int i = 0; i < 64; i++) if (f + i < len) begin fr.d[i*8 +: 8] = b[f+i]; fr.k[i] = 1; end
      fr.l = (f + 64 >= len);
      frames.push_back(fr);
      bexp.push_back(fr);
    end
    if (h.pkt_type[PT_SHORT]) type_cnt[3]++;
    else type_cnt[kind]++;
  endtask

  always @(posedge clk) begin
    if (!rst) cyc <= cyc + 1;
    if (!rst && s_tvalid && s_tready) begin
      void'(frames.pop_front());
      if (t_in < 0) t_in <= cyc;
    end
    if (!rst && h_valid && t_out < 0) t_out <= cyc;
    if (!rst && h_valid && h_ready) begin
      checks++;
      if (hexp.size() == 0 || h_data != hexp[0]) begin
        failures++; $display("FAIL header type %b exp %b len %0d/%0d last %b/%b ch %0d/%0d data %0d", h_data.pkt_type, hexp[0].pkt_type, h_data.len, hexp[0].len, h_data.last, hexp[0].last, h_data.dst_ch, hexp[0].dst_ch, h_data.data == hexp[0].data);
      end
      if (hexp.size()) void'(hexp.pop_front());
    end
    if (!rst && b_tvalid && b_tready) begin
      checks++;
      if (bexp.size() == 0 || b_tdata != bexp[0].d || b_tkeep != bexp[0].k || b_tlast != bexp[0].l)
        failures++;
      if (bexp.size()) void'(bexp.pop_front());
    end
    h_ready <= !rnd || ($urandom % 3 != 0);
    b_tready <= !rnd || ($urandom % 4 != 0);
  end

  // frame driver: a frame stays on the bus until it is taken
  bit acc = 0;
  always @(posedge clk) acc <= !rst && s_tvalid && s_tready;
  always @(negedge clk) begin
    if (!s_tvalid || acc) begin
      if (frames.size() > 0 && (!rnd || $urandom % 4 != 0)) begin
        s_tvalid = 1; s_tdata = frames[0].d; s_tkeep = frames[0].k; s_tlast = frames[0].l;
      end else s_tvalid = 0;
    end
  end

  initial begin
    s_tvalid = 0; s_tdata = '0; s_tkeep = '0; s_tlast = 0; h_ready = 1; b_tready = 1;
    repeat (3) @(posedge clk);
    gen(0, 0, 100);
    rst = 0;
    wait (hexp.size() == 0);
    checks++;
    if (t_out - t_in != 1) begin failures++; $display("FAIL latency %0d", t_out - t_in); end
    rnd = 1;
    for (int p = 0; p < 400; p++) begin
      int len;
      len = ($urandom % 5 == 0) ? 20 + $urandom % 44 : 60 + $urandom % 200;
      gen($urandom % 3, 1'($urandom), len);
    end
    wait (hexp.size() == 0 && bexp.size() == 0);
    for (int t = 0; t < 4; t++) begin
      checks++;
      if (type_cnt[t] == 0) begin failures++; $display("FAIL type %0d never generated", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

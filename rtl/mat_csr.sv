// mat_csr: control and status registers of the match-action table.
//
// An AXI4-Lite slave (32-bit data) through which host software inserts,
// removes and queries table entries. Software first fills staging registers
// (TCAM data/care/valid of the 8 entries of one TCAM row, or one
// instruction word), sets INDEX, and then writes the command (opcode)
// register; that write starts the TCAM write or read logic or the
// instruction-table access. STATUS shows whether the TCAM is still busy.
// Register map (byte offsets):
//   0x000 CMD      W  bit0 TCAM write of row INDEX[9:3], bit1 TCAM read of
//                     entry INDEX, bit2 instruction write, bit3 instruction read
//   0x004 INDEX    RW table entry index
//   0x008 STATUS   R  bit0 TCAM busy, bit1 valid bit of the last TCAM read
//   0x00C MISS_CH  RW channel for packets that match nothing (reset: 8)
//   0x010-0x01C    RW instruction staging word 0..3 (instr_t, word 0 = LSBs)
//   0x020-0x02C    R  instruction read-back word 0..3
//   0x030/0x034    R  TCAM read data, low/high word
//   0x038/0x03C    R  TCAM read care, low/high word
//   0x100+16*e     RW entry e (0..7) staging: +0 data low, +4 data high,
//                     +8 care low, +C care high with the valid bit in bit 31
// Write address and data are taken together; one response per access, reads
// answered one cycle after the address. A TCAM command written while the
// TCAM is busy is ignored. The MMIO path, the staging/opcode trigger scheme
// follow the document; the register map is this design's.
module mat_csr
  import matoc_pkg::*;
#(
  parameter int unsigned ADDR_W = 12
) (
  input  logic                  clk,
  input  logic                  rst,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0]     awaddr,
  input  logic                  awvalid,
  output logic                  awready,
  input  logic [31:0]           wdata,
  input  logic [3:0]            wstrb,
  input  logic                  wvalid,
  output logic                  wready,
  output logic [1:0]            bresp,
  output logic                  bvalid,
  input  logic                  bready,
  input  logic [ADDR_W-1:0]     araddr,
  input  logic                  arvalid,
  output logic                  arready,
  output logic [31:0]           rdata,
  output logic [1:0]            rresp,
  output logic                  rvalid,
  input  logic                  rready,
  // TCAM update port
  output logic                  wr_req,
  output logic [IDX_W-4:0]      wr_row,
  output logic [7:0][KEY_W-1:0] wr_data,
  output logic [7:0][KEY_W-1:0] wr_care,
  output logic [7:0]            wr_vld,
  output logic                  rd_req,
  output logic [IDX_W-1:0]      rd_index,
  input  logic [KEY_W-1:0]      rd_data,
  input  logic [KEY_W-1:0]      rd_care,
  input  logic                  rd_vld,
  input  logic                  tcam_busy,
  // instruction table port
  output logic                  it_we,
  output logic [IDX_W-1:0]      it_addr,
  output instr_t                it_wdata,
  input  instr_t                it_q,
  // configuration
  output logic [CH_W-1:0]       miss_ch
);
  logic [IDX_W-1:0]  index;
  logic [127:0]      it_stage, it_rb;
  logic              it_rd_pend;
  logic [63:0]       rd_d64, rd_c64;
  logic [7:0][63:0]  st_data, st_care;
  logic              wr_fire;

  assign awready  = awvalid && wvalid && !bvalid;
  assign wready   = awready;
  assign wr_fire  = awready;
  assign arready  = !rvalid;
  assign bresp    = 2'b00;
  assign rresp    = 2'b00;
  assign wr_row   = index[IDX_W-1:3];
  assign rd_index = index;
  assign it_addr  = index;
  assign it_wdata = instr_t'(it_stage[INSTR_W-1:0]);
  assign rd_d64   = 64'(rd_data);
  assign rd_c64   = 64'(rd_care);

  always_comb begin
    for (int e = 0; e < 8; e++) begin
      wr_data[e] = KEY_W'(st_data[e]);
      wr_care[e] = KEY_W'(st_care[e]);
    end
  end

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] strb);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[b*8 +: 8] = strb[b] ? nw[b*8 +: 8] : old[b*8 +: 8];
    return r;
  endfunction

  // ---------------- writes ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      bvalid     <= 1'b0;
      index      <= '0;
      miss_ch    <= CH_W'(PS_CH);
      it_stage   <= '0;
      st_data    <= '0;
      st_care    <= '0;
      wr_vld     <= '0;
      wr_req     <= 1'b0;
      rd_req     <= 1'b0;
      it_we      <= 1'b0;
      it_rd_pend <= 1'b0;
      it_rb      <= '0;
    end else begin
      wr_req     <= 1'b0;
      rd_req     <= 1'b0;
      it_we      <= 1'b0;
      it_rd_pend <= 1'b0;
      if (it_rd_pend) it_rb <= 128'(it_q);
      if (bvalid && bready) bvalid <= 1'b0;
      if (wr_fire) begin
        bvalid <= 1'b1;
        if (awaddr < ADDR_W'('h100)) begin
          unique case (awaddr[7:2])
            6'h00: begin
              if (wdata[0] && !tcam_busy)              wr_req <= 1'b1;
              else if (wdata[1] && !tcam_busy)         rd_req <= 1'b1;
              if (wdata[2])                            it_we  <= 1'b1;
              if (wdata[3])                            it_rd_pend <= 1'b1;
            end
            6'h01: index   <= IDX_W'(merge(32'(index), wdata, wstrb));
            6'h03: miss_ch <= CH_W'(merge(32'(miss_ch), wdata, wstrb));
            6'h04, 6'h05, 6'h06, 6'h07:
              it_stage[awaddr[3:2]*32 +: 32] <= merge(it_stage[awaddr[3:2]*32 +: 32], wdata, wstrb);
            default: ;
          endcase
        end else if (awaddr < ADDR_W'('h180)) begin
          unique case (awaddr[3:2])
            2'd0: st_data[awaddr[6:4]][31:0]  <= merge(st_data[awaddr[6:4]][31:0], wdata, wstrb);
            2'd1: st_data[awaddr[6:4]][63:32] <= merge(st_data[awaddr[6:4]][63:32], wdata, wstrb);
            2'd2: st_care[awaddr[6:4]][31:0]  <= merge(st_care[awaddr[6:4]][31:0], wdata, wstrb);
            2'd3: begin
              st_care[awaddr[6:4]][63:32] <= merge(st_care[awaddr[6:4]][63:32], {1'b0, wdata[30:0]}, wstrb);
              if (wstrb[3]) wr_vld[awaddr[6:4]] <= wdata[31];
            end
            default: ;
          endcase
        end
      end
    end
  end

  // ---------------- reads ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      rvalid <= 1'b0;
      rdata  <= '0;
    end else begin
      if (rvalid && rready) rvalid <= 1'b0;
      if (arvalid && arready) begin
        rvalid <= 1'b1;
        rdata  <= '0;
        if (araddr < ADDR_W'('h100)) begin
          unique case (araddr[7:2])
            6'h01: rdata <= 32'(index);
            6'h02: rdata <= {30'd0, rd_vld, tcam_busy};
            6'h03: rdata <= 32'(miss_ch);
            6'h04, 6'h05, 6'h06, 6'h07: rdata <= it_stage[araddr[3:2]*32 +: 32];
            6'h08, 6'h09, 6'h0A, 6'h0B: rdata <= it_rb[araddr[3:2]*32 +: 32];
            6'h0C: rdata <= rd_d64[31:0];
            6'h0D: rdata <= rd_d64[63:32];
            6'h0E: rdata <= rd_c64[31:0];
            6'h0F: rdata <= rd_c64[63:32];
            default: ;
          endcase
        end else if (araddr < ADDR_W'('h180)) begin
          unique case (araddr[3:2])
            2'd0: rdata <= st_data[araddr[6:4]][31:0];
            2'd1: rdata <= st_data[araddr[6:4]][63:32];
            2'd2: rdata <= st_care[araddr[6:4]][31:0];
            2'd3: rdata <= {wr_vld[araddr[6:4]], st_care[araddr[6:4]][62:32]};
            default: ;
          endcase
        end
      end
    end
  end

  a_b_hold: assert property (@(posedge clk) disable iff (rst) bvalid && !bready |=> bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (rst) rvalid && !rready |=> rvalid);
endmodule

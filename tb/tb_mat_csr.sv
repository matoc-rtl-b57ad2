// tb_mat_csr: self-checking test of the AXI4-Lite control registers.
// A small TCAM stand-in (busy for 65 cycles after a command, fixed read
// result) sits on the update port. Checked: reset values, read-back of
// INDEX, MISS_CH and staging registers, byte strobes; a CMD write produces
// exactly one write (or read) request carrying the staged row, data, care
// and valid bits, and an instruction write/read moves the staged word;
// a command while the TCAM is busy is ignored; STATUS and the read-result
// registers reflect the TCAM.
module tb_mat_csr;
  import matoc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [11:0] awaddr, araddr; logic awvalid, awready, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rvalid, rready; logic [31:0] wdata, rdata; logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  logic wr_req, rd_req, rd_vld, tcam_busy, it_we;
  logic [IDX_W-4:0] wr_row; logic [7:0][KEY_W-1:0] wr_data, wr_care; logic [7:0] wr_vld;
  logic [IDX_W-1:0] rd_index, it_addr; logic [KEY_W-1:0] rd_data, rd_care;
  instr_t it_wdata, it_q; logic [CH_W-1:0] miss_ch;
  mat_csr dut (.*);

  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_itw = 0, busy_cnt = 0;
  logic [IDX_W-4:0] got_row; logic [7:0][KEY_W-1:0] got_d, got_c; logic [7:0] got_v;
  instr_t got_it;

  // TCAM / instruction table stand-in
  always @(posedge clk) begin
    if (rst) begin busy_cnt <= 0; end
    else begin
      if (wr_req) begin n_wr++; busy_cnt <= 65; got_row = wr_row; got_d = wr_data; got_c = wr_care; got_v = wr_vld; end
      else if (rd_req) begin n_rd++; busy_cnt <= 33; end
      else if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
      if (it_we) begin n_itw++; got_it = it_wdata; end
    end
  end
  assign tcam_busy = (busy_cnt > 0);
  assign rd_data = 35'h4_1234_5678;
  assign rd_care = 35'h7_FFFF_FF00;
  assign rd_vld  = 1'b1;
  assign it_q    = instr_t'({122{1'b1}} ^ 122'(it_addr));

  task automatic axw(input logic [11:0] a, input logic [31:0] d, input logic [3:0] s = 4'hF);
    @(negedge clk); awaddr = a; wdata = d; wstrb = s; awvalid = 1; wvalid = 1;
    do @(posedge clk); while (!awready);
    @(negedge clk); awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic axr(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk); arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(negedge clk);
  endtask

  task automatic expect_eq(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d;
    logic [7:0][KEY_W-1:0] sd, sc; logic [7:0] sv; instr_t si;
    awaddr = 0; araddr = 0; awvalid = 0; wvalid = 0; arvalid = 0; wdata = 0; wstrb = 0;
    bready = 1; rready = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    axr(12'h00C, d); expect_eq("miss_ch reset", d, 8);
    axw(12'h00C, 32'd3); axr(12'h00C, d); expect_eq("miss_ch", d, 3);
    expect_eq("miss_ch port", miss_ch, 3);
    axw(12'h004, 32'h0000_0235); axr(12'h004, d); expect_eq("index", d, 32'h235);
    axw(12'h004, 32'hFFFF_FF1A, 4'b0001); axr(12'h004, d); expect_eq("index strobe", d, 32'h21A);
    // stage 8 TCAM entries
    for (int e = 0; e < 8; e++) begin
      sd[e] = {$urandom, $urandom}; sc[e] = {$urandom, $urandom}; sv[e] = $urandom;
      axw(12'h100 + 12'(e*16) + 0, sd[e][31:0]);
      axw(12'h100 + 12'(e*16) + 4, 32'(sd[e][KEY_W-1:32]));
      axw(12'h100 + 12'(e*16) + 8, sc[e][31:0]);
      axw(12'h100 + 12'(e*16) + 12, {sv[e], 28'd0, sc[e][KEY_W-1:32]});
    end
    axr(12'h100 + 12'(3*16) + 12, d); expect_eq("stage rb", d, {sv[3], 28'd0, sc[3][KEY_W-1:32]});
    axw(12'h000, 32'h1);
    expect_eq("wr count", n_wr, 1);
    expect_eq("wr row", got_row, 10'h21A >> 3);
    for (int e = 0; e < 8; e++) begin
      expect_eq("wr data", got_d[e], sd[e]); expect_eq("wr care", got_c[e], sc[e]);
      expect_eq("wr vld", got_v[e], sv[e]);
    end
    axr(12'h008, d); expect_eq("busy", d[0], 1);
    axw(12'h000, 32'h2);                       // ignored: busy
    expect_eq("ignored while busy", n_rd, 0);
    while (tcam_busy) @(negedge clk);
    axr(12'h008, d); expect_eq("idle", d[0], 0);
    axw(12'h000, 32'h2);
    expect_eq("rd count", n_rd, 1);
    axr(12'h030, d); expect_eq("rd data lo", d, 32'h1234_5678);
    axr(12'h034, d); expect_eq("rd data hi", d, 4);
    axr(12'h038, d); expect_eq("rd care lo", d, 32'hFFFF_FF00);
    axr(12'h03C, d); expect_eq("rd care hi", d, 7);
    axr(12'h008, d); expect_eq("rd vld", d[1], 1);
    // instruction staging, write, read-back
    si = instr_t'({$urandom, $urandom, $urandom, $urandom});
    for (int w = 0; w < 4; w++) axw(12'h010 + 12'(w*4), 32'(128'(si) >> (32*w)));
    axw(12'h000, 32'h4);
    expect_eq("it write", n_itw, 1);
    checks++; if (got_it != si) begin failures++; $display("FAIL it data"); end
    axw(12'h000, 32'h8);
    for (int w = 0; w < 4; w++) begin
      axr(12'h020 + 12'(w*4), d);
      expect_eq("it readback", d, 32'(128'(instr_t'({122{1'b1}} ^ 122'(10'h21A))) >> (32*w)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

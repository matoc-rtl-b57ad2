// instr_table: instruction table of the match stage, one instr_t per TCAM
// entry.
//
// A simple dual-port block RAM. Port A is the lookup port of the pipeline:
// when a_en is high the entry at a_addr appears on a_q at the next clock
// edge (one cycle, the block RAM's output register). Port B belongs to the
// control registers: a write stores b_wdata at b_addr, a read returns the
// entry on b_q one cycle later. Contents start at zero, i.e. "no action".
// The block-RAM mapping and depth follow the document; the word layout is
// the instr_t of this design.
module instr_table
  import matoc_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     a_en,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  output instr_t                   a_q,
  input  logic                     b_we,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  instr_t                   b_wdata,
  output instr_t                   b_q
);
  instr_t mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (a_en) a_q <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    if (b_we) mem[b_addr] <= b_wdata;
    b_q <= mem[b_addr];
  end
endmodule

// tcam_unit: one 8x5 TCAM unit, a 32-deep by 8-bit LUT RAM.
//
// Bit e of word a is 1 when stored rule e (of the unit's eight) accepts the
// 5-bit key piece a, so reading the word addressed by a key piece yields the
// unit's 8-bit slice of the match matrix in the same cycle (asynchronous
// read, as a distributed RAM32M gives). The single address is multiplexed:
// the key piece during a search, the update counter otherwise (cnt_sel).
// Writes happen on the clock edge at the counter address. The RAM32M mapping
// and the address multiplexer follow the document's unit figure; the
// separate select input is this design's choice.
module tcam_unit (
  input  logic       clk,
  input  logic [4:0] key,      // search key piece
  input  logic [4:0] cnt,      // update counter
  input  logic       cnt_sel,  // 1: address from the counter
  input  logic       we,
  input  logic [7:0] di,       // match-rule bits for address cnt
  output logic [7:0] dout
);
  logic [7:0] ram [32];
  logic [4:0] addr;

  assign addr = cnt_sel ? cnt : key;
  assign dout = ram[addr];

  always_ff @(posedge clk) begin
    if (we) ram[cnt] <= di;
  end
endmodule

// packet_buffer: per-channel FIFO that holds packet frames while the header
// goes through the match-action pipeline.
//
// A synchronous first-word-fall-through FIFO of DEPTH words, each one 512-bit
// frame with its 64 byte enables and tlast. Storage is a plain array written
// and read on clock edges, so it maps onto block RAM; a registered output
// stage is refilled from the array whenever it is empty or being read, giving
// a latency of one cycle from write to m_tvalid. s_tready drops when the
// array is full. A depth of 512 words of 577 bits is the 8.5 block RAMs per
// channel the document reports (64x512 per BRAM); the structure is this
// design's choice.
module packet_buffer #(
  parameter int unsigned DATA_W = 512,
  parameter int unsigned DEPTH  = 512
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [DATA_W-1:0]   s_tdata,
  input  logic [DATA_W/8-1:0] s_tkeep,
  input  logic                s_tlast,
  input  logic                s_tvalid,
  output logic                s_tready,
  output logic [DATA_W-1:0]   m_tdata,
  output logic [DATA_W/8-1:0] m_tkeep,
  output logic                m_tlast,
  output logic                m_tvalid,
  input  logic                m_tready
);
  localparam int unsigned W  = DATA_W + DATA_W/8 + 1;
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   count;          // words in the array (not in the output reg)
  logic          wr, rd;
  logic [W-1:0]  q;

  assign s_tready = (count != (AW+1)'(DEPTH));
  assign wr       = s_tvalid && s_tready;
  assign rd       = (count != 0) && (!m_tvalid || m_tready);
  assign {m_tdata, m_tkeep, m_tlast} = q;

  always_ff @(posedge clk) begin
    if (wr) mem[wptr] <= {s_tdata, s_tkeep, s_tlast};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      m_tvalid <= 1'b0;
      q        <= '0;
    end else begin
      if (wr) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (rd) begin
        rptr     <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
        q        <= mem[rptr];
        m_tvalid <= 1'b1;
      end else if (m_tready) begin
        m_tvalid <= 1'b0;
      end
      count <= count + (AW+1)'(wr) - (AW+1)'(rd);
    end
  end
endmodule

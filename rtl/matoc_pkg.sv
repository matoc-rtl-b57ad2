// matoc_pkg: types and constants shared by the match-action packet pipeline.
//
// The pipeline works on 512-bit frames at 250 MHz. A packet's first frame is
// its "header" and travels through the match-action table (MAT) as one
// hdr_t; the VLAN action may lengthen or shorten it, so the header bus is
// FRAME_BYTES + VAR_BYTES = 79 bytes (632 bits) wide. Byte 0 of a packet sits
// in bits [7:0], multi-byte protocol fields are in network (big-endian) order.
// Channels 0..7 are the Ethernet ports, channel 8 is the processing-system
// (slow path) port. The 512-bit width, 8 channels, the 15-byte variation range
// and the 35x1024 TCAM follow the document; the field layout of the
// instruction word and the pkt_type bit assignment are this design's choice.
package matoc_pkg;

  localparam int unsigned N_CH        = 8;    // Ethernet channels (8x25G)
  localparam int unsigned PS_CH       = 8;    // channel ID of the slow path
  localparam int unsigned CH_W        = 4;
  localparam int unsigned FRAME_BYTES = 64;   // 512-bit internal frame
  localparam int unsigned VAR_BYTES   = 15;   // header length variation range
  localparam int unsigned HDR_BYTES   = FRAME_BYTES + VAR_BYTES; // 632 bits
  localparam int unsigned LEN_W       = 7;    // 0..127 bytes
  localparam int unsigned KEY_W       = 35;   // TCAM width
  localparam int unsigned TCAM_DEPTH  = 1024; // TCAM / instruction table depth
  localparam int unsigned IDX_W       = $clog2(TCAM_DEPTH);
  localparam int unsigned EXT_W       = 128;  // external stream width (25G)
  localparam int unsigned INT_W       = 512;  // internal stream width

  // pkt_type[3:0] produced by the parser
  localparam int unsigned PT_IPV4 = 0;
  localparam int unsigned PT_IPV6 = 1;
  localparam int unsigned PT_VLAN = 2;
  localparam int unsigned PT_SHORT = 3;       // packet shorter than the IP header

  localparam logic [15:0] ETH_IPV4 = 16'h0800;
  localparam logic [15:0] ETH_IPV6 = 16'h86DD;
  localparam logic [15:0] ETH_VLAN = 16'h8100;

  typedef struct packed {
    logic [HDR_BYTES*8-1:0] data;     // header bytes, byte 0 at [7:0]
    logic [LEN_W-1:0]       len;      // number of valid bytes in data
    logic                   last;     // the header frame is the whole packet
    logic [3:0]             pkt_type; // see PT_*
    logic [CH_W-1:0]        src_ch;   // channel the packet came in on
    logic [CH_W-1:0]        dst_ch;   // channel the switch sends it to
  } hdr_t;

  typedef enum logic [1:0] {
    VLAN_NONE   = 2'd0,
    VLAN_INSERT = 2'd1,   // insert a tag (or overwrite the TCI if one exists)
    VLAN_MODIFY = 2'd2,   // overwrite the TCI of an existing tag
    VLAN_REMOVE = 2'd3    // strip an existing tag
  } vlan_op_e;

  // One instruction-table entry: opcode bits and their operands.
  typedef struct packed {
    logic [CH_W-1:0] out_ch;
    logic [15:0]     vlan_tci;
    logic [47:0]     smac;
    logic [47:0]     dmac;
    vlan_op_e        vlan_op;
    logic            set_ch;
    logic            set_smac;
    logic            set_dmac;
    logic            dec_ttl;
  } instr_t;

  localparam int unsigned INSTR_W = $bits(instr_t);  // 122

  // Header plus the result of the match stage.
  typedef struct packed {
    hdr_t   hdr;
    instr_t instr;
    logic   hit;
  } meta_t;

  // Byte access helpers on a header bus (network byte order for 16 bits).
  function automatic logic [7:0] get_byte(input logic [HDR_BYTES*8-1:0] d, input int unsigned i);
    return d[i*8 +: 8];
  endfunction

  function automatic logic [15:0] get_be16(input logic [HDR_BYTES*8-1:0] d, input int unsigned i);
    return {d[i*8 +: 8], d[(i+1)*8 +: 8]};
  endfunction

  function automatic logic [31:0] get_be32(input logic [HDR_BYTES*8-1:0] d, input int unsigned i);
    return {d[i*8 +: 8], d[(i+1)*8 +: 8], d[(i+2)*8 +: 8], d[(i+3)*8 +: 8]};
  endfunction

endpackage

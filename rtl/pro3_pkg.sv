// pro3_pkg: types, constants and helper functions shared by the PRO3 blocks.
//
// Sizes that come from the architecture: the internal bus is 64 bits wide, the
// data memory manager cuts packets into 64-byte segments, the classifier
// search key is 144 bits and the flow ID returned by the CAM is 19 bits
// (512K flows), the scheduler has 32 queues and the field-engine microcode
// store holds 2K instructions. Everything else here (the microcode encoding,
// the number of field registers, the flow-state width) is this design's own
// choice.
//
// Field-engine microcode (shared by the field extractor and field modifier),
// one 32-bit word per instruction:
//   [31:28] opcode     (fe_op_e)
//   [27:24] field      field register index (0..15)
//   [23:17] offset     byte offset from the current base pointer
//   [16:12] shift      bit position of the field's LSB inside the 32-bit
//                      big-endian window that starts at base+offset
//   [11:6]  width      field width in bits, 1..32
//   [5:0]   imm        SETB: new base pointer in 4-byte units
package pro3_pkg;

  localparam int unsigned BUS_W     = 64;          // internal bus width (bits)
  localparam int unsigned BUS_BYTES = BUS_W / 8;
  localparam int unsigned SEG_BYTES = 64;          // DMM segment size
  localparam int unsigned SEG_WORDS = SEG_BYTES / BUS_BYTES;
  localparam int unsigned HDR_WORDS = 2 * SEG_WORDS; // at most two segments go to an engine
  localparam int unsigned HDR_BYTES = HDR_WORDS * BUS_BYTES;
  localparam int unsigned KEY_W     = 144;         // CAM search key
  localparam int unsigned FLOW_W    = 19;          // CAM result: flow ID
  localparam int unsigned NUM_SQ    = 32;          // scheduling queues
  localparam int unsigned UCODE_DEPTH = 2048;      // microcode store
  localparam int unsigned NFIELDS   = 16;          // field registers per packet
  localparam int unsigned STATE_W   = 64;          // per-flow state word
  localparam int unsigned LEN_W     = 16;          // packet length in bytes

  typedef logic [BUS_W-1:0]  word_t;
  typedef logic [FLOW_W-1:0] flow_t;
  typedef logic [31:0]       field_t;
  typedef logic [7:0]        hdr_bytes_t [HDR_BYTES];

  // One beat of a packet stream. nbytes is the number of valid bytes in the
  // beat (1..8), meaningful on the last beat; the bytes are big-endian, byte 0
  // of the beat in data[63:56].
  typedef struct packed {
    word_t      data;
    logic       sop;
    logic       eop;
    logic [3:0] nbytes;
  } beat_t;

  // Tag that travels with a header through an RPM and back to the DMM.
  typedef struct packed {
    logic [12:0]      rsv;
    logic [LEN_W-1:0] len;     // packet length in bytes
    logic [15:0]      seg;     // DMM handle: first segment of the packet
    flow_t            flow;    // flow ID from the classifier
  } rpm_tag_t;

  localparam int unsigned RPM_TAG_W = $bits(rpm_tag_t);

  // RISC register map of one register-file half in the RPM glue logic.
  localparam int unsigned REG_FIELD0  = 0;   // 0..15: extracted / new fields
  localparam int unsigned REG_STATE_L = 16;  // flow state, bits 31:0
  localparam int unsigned REG_STATE_H = 17;  // flow state, bits 63:32
  localparam int unsigned REG_VERDICT = 18;  // bit 0: 1 = accept, 0 = reject
  localparam int unsigned REG_FLOW    = 19;  // flow ID (read only)
  localparam int unsigned REG_LEN     = 20;  // packet length (read only)

  typedef enum logic [3:0] {
    OP_END  = 4'd0,   // stop, hand the result on
    OP_EXTR = 4'd1,   // field[f] = window(base+off) >> shift, width bits
    OP_ADDB = 4'd2,   // base += 4 * field[f]   (e.g. skip the IP header)
    OP_SETB = 4'd3,   // base = 4 * imm
    OP_REPL = 4'd4,   // window(base+off)[shift +: width] = field[f]
    OP_CSUM = 4'd5    // recompute the IPv4 header checksum of the header at base+off
  } fe_op_e;

  typedef struct packed {
    fe_op_e     op;
    logic [3:0] fld;
    logic [6:0] off;
    logic [4:0] shift;
    logic [5:0] width;
    logic [5:0] imm;
  } fe_instr_t;

  function automatic logic [31:0] width_mask(input logic [5:0] width);
    logic [32:0] m;
    m = (33'd1 << width) - 33'd1;
    return m[31:0];
  endfunction

  // 32-bit big-endian window starting at byte position pos; bytes past the
  // end of the buffer read as zero.
  function automatic logic [31:0] get_window(input hdr_bytes_t b, input int unsigned pos);
    logic [31:0] w;
    w = '0;
    for (int i = 0; i < 4; i++)
      if (pos + i < HDR_BYTES) w[31-8*i -: 8] = b[pos+i];
    return w;
  endfunction

  // One's-complement sum over the IPv4 header that starts at byte pos. The
  // header length is the IHL nibble of the first byte (in 32-bit words).
  // Returns the folded 16-bit sum; a header is correct when it is 16'hFFFF.
  function automatic logic [15:0] ip_hdr_sum(input hdr_bytes_t b, input int unsigned pos,
                                             input logic skip_cksum);
    logic [19:0] acc;
    int unsigned nhw;
    acc = '0;
    nhw = 2 * int'(b[pos][3:0]);
    for (int i = 0; i < 30; i++) begin
      if (i < nhw && !(skip_cksum && i == 5) && pos + 2*i + 1 < HDR_BYTES)
        acc = acc + {4'd0, b[pos+2*i], b[pos+2*i+1]};
    end
    acc = {4'd0, acc[15:0]} + {16'd0, acc[19:16]};
    acc = {4'd0, acc[15:0]} + {16'd0, acc[19:16]};
    return acc[15:0];
  endfunction

endpackage

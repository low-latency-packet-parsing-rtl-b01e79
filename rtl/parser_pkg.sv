// parser_pkg: types and constants shared by the programmable packet parser.
//
// The parser runs one instruction per header segment. An instruction says how
// many bytes of the incoming 64-bit window it consumes (16, 32 or 64 bits, as
// the architecture allows), how those bytes fill the Packet Header Vector
// (PHV), which fields the extraction engines pull out to load the header-size
// and packet-size counters, whether the Next Header Resolve Unit starts a
// lookup, and which branch type the Advanced Program Control (APC) applies.
// The segment width of 64 bits, the 8 packet counters, the 8 next-header
// comparators, the 8 catalyst values, the 3-bit condition code and the branch
// types follow the architecture; the instruction layout, the memory depths
// and all other widths are this implementation's choices.
package parser_pkg;

  localparam int SEG_W       = 64;  // header segment width
  localparam int SEG_BYTES   = SEG_W / 8;
  localparam int PC_W        = 8;   // instruction address width
  localparam int FIELD_W     = 16;  // extraction engine result width
  localparam int CNT_W       = 16;  // boundary counter width (bytes)
  localparam int NH_AW       = 4;   // next-header store address width
  localparam int NH_IT_W     = 3;   // next-header iteration count width
  localparam int PHV_IDX_W   = 4;   // PHV container index width
  localparam int PKT_SEL_W   = 3;   // selects one of the packet counters
  localparam int BC_SET_W    = 2;   // branch catalyst table set index

  // Amount of the window consumed by one instruction.
  typedef enum logic [1:0] {
    SEG_NONE = 2'd0,
    SEG_16   = 2'd1,
    SEG_32   = 2'd2,
    SEG_64   = 2'd3
  } seg_sz_e;

  // Container size the PHV filler uses for the consumed segment.
  typedef enum logic [1:0] {
    PHV_NONE = 2'd0,
    PHV_C8   = 2'd1,
    PHV_C16  = 2'd2,
    PHV_C32  = 2'd3
  } phv_mode_e;

  // Branch types of the APC.
  typedef enum logic [2:0] {
    BR_SEQ      = 3'd0,  // fall through to the next instruction
    BR_CATALYST = 3'd1,  // address from the Branch Catalyst
    BR_NEXT_HDR = 3'd2,  // first instruction of the next header's subroutine
    BR_NH_CALL  = 3'd3,  // as BR_NEXT_HDR, pushing PC+1 (trailer code)
    BR_PAYLOAD  = 3'd4,  // forward the payload
    BR_EOT      = 3'd5,  // end of trailer: return to a pending trailer or restart
    BR_COND     = 3'd6   // conditional branch on the Branch Condition Evaluator
  } br_type_e;

  // Condition codes of the Branch Condition Evaluator.
  typedef enum logic [2:0] {
    CC_EQ   = 3'd0,
    CC_NE   = 3'd1,
    CC_LT   = 3'd2,
    CC_GT   = 3'd3,
    CC_LE   = 3'd4,
    CC_GE   = 3'd5,
    CC_ANY  = 3'd6,  // (field & ref) != 0
    CC_NONE = 3'd7   // (field & ref) == 0
  } cond_e;

  // Extraction engine control: a field of 'len' bits starting 'off' bits below
  // the window's most significant bit, shifted left by 'shl' after extraction.
  typedef struct packed {
    logic [5:0] off;
    logic [4:0] len;   // 0..16; 0 extracts nothing (result 0)
    logic [2:0] shl;
  } ext_spec_t;

  typedef struct packed {
    seg_sz_e                  seg;
    phv_mode_e                phv_mode;
    logic [PHV_IDX_W-1:0]     phv_idx;
    // header-size counter load
    logic                     hdr_ld;
    ext_spec_t                hdr_ext;
    logic [CNT_W-1:0]         hdr_imm;   // two's complement addend
    // payload / packet-size counter load
    logic                     pkt_ld;
    logic [PKT_SEL_W-1:0]     pkt_sel;
    ext_spec_t                pkt_ext;
    logic [CNT_W-1:0]         pkt_imm;
    // next-header lookup
    logic                     nh_en;
    ext_spec_t                nh_ext;
    logic [NH_AW-1:0]         nh_start;
    logic [NH_IT_W-1:0]       nh_iters;  // number of store words to search (0 acts as 1)
    logic [PC_W-1:0]          nh_default;
    // branch
    br_type_e                 br;
    ext_spec_t                br_ext;    // field for the catalyst or the condition
    logic [BC_SET_W-1:0]      bc_set;
    cond_e                    cond;
    logic [FIELD_W-1:0]       cond_ref;
    logic [PC_W-1:0]          br_addr;
  } instr_t;

  localparam int INSTR_W = $bits(instr_t);

  // Configuration write targets.
  typedef enum logic [2:0] {
    CFG_IMEM    = 3'd0,  // data[INSTR_W-1:0]
    CFG_NH_CMP  = 3'd1,  // addr = {word, lane}; data = {valid, comparand[15:0]}
    CFG_NH_ADDR = 3'd2,  // addr = {word, lane}; data = address
    CFG_BC      = 3'd3   // addr = {set, entry}; data = {valid, value[15:0], address}
  } cfg_tgt_e;

  typedef struct packed {
    logic               we;
    cfg_tgt_e           tgt;
    logic [11:0]        addr;
    logic [INSTR_W-1:0] data;
  } cfg_wr_t;

  function automatic logic [3:0] seg_bytes(seg_sz_e s);
    case (s)
      SEG_16:  return 4'd2;
      SEG_32:  return 4'd4;
      SEG_64:  return 4'd8;
      default: return 4'd0;
    endcase
  endfunction

endpackage

// extraction_engine: pulls one programmer-specified field out of a header
// segment.
//
// The architecture gives every functional unit its own extraction engine that
// can be told, per instruction, which part of the arriving segment to extract
// (header size, payload size, next-header ID, flag bits, a condition field).
// This one works on the full 64-bit window: the field starts 'off' bits below
// the most significant bit (bit 63 is the first bit of the first byte), is
// 'len' bits long (0..16) and is returned right-aligned in OUT_W bits, then
// shifted left by 'shl' (for example IHL << 2 turns 32-bit words into bytes).
// A length of 0 yields 0, which lets a counter be loaded from the immediate
// alone. The 16-bit result width follows the engine outputs of the original
// architecture; the shift and the offset/length encoding are this design's
// choice. Purely combinational; the consumer registers the result.
module extraction_engine
  import parser_pkg::*;
#(
  parameter int OUT_W = FIELD_W
) (
  input  logic [SEG_W-1:0] seg,
  input  ext_spec_t        spec,
  output logic [OUT_W-1:0] field
);
  logic [SEG_W-1:0] aligned;
  logic [OUT_W-1:0] mask;
  logic [6:0]       lsb_pos;

  always_comb begin
    // position of the field's least significant bit, counted from bit 0
    lsb_pos = 7'(SEG_W) - 7'(spec.off) - 7'(spec.len);
    if (spec.len == 5'd0 || 7'(spec.off) + 7'(spec.len) > 7'(SEG_W)) begin
      aligned = '0;
    end else begin
      aligned = seg >> lsb_pos;
    end
    mask = (spec.len >= 5'(OUT_W)) ? '1 : OUT_W'((32'd1 << spec.len) - 32'd1);
    field = OUT_W'((aligned[OUT_W-1:0] & mask) << spec.shl);
  end
endmodule

// phv_filler: PHV Filler and Packet Header Vector.
//
// The Packet Header Vector holds the parsed header fields of one packet in
// containers of 8, 16 and 32 bits. Each instruction says how its consumed
// segment fills them: as 8-bit, 16-bit or 32-bit containers, starting at a
// container index. A 16-bit segment can thus fill two 8-bit containers or one
// 16-bit container, a 64-bit segment eight 8-bit, four 16-bit or two 32-bit
// containers. Only one container size is used per segment. The first byte of
// the segment goes to the lowest index; indices beyond the vector are dropped.
// Every written container is flagged valid.
//
// When the packet ends ('done'), the vector including the same cycle's write
// is copied to the outputs, 'phv_valid' pulses one cycle later with it, and
// the working vector is cleared for the next packet.
// The container idea and the per-segment fill choice follow the architecture;
// container counts, ordering and the output snapshot are this design's choices.
module phv_filler
  import parser_pkg::*;
#(
  parameter int N_C8  = 16,
  parameter int N_C16 = 16,
  parameter int N_C32 = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic [SEG_W-1:0]     seg,
  input  logic [3:0]           nbytes,
  input  phv_mode_e            mode,
  input  logic [PHV_IDX_W-1:0] idx,
  input  logic                 done,
  output logic                 phv_valid,
  output logic [7:0]           c8_out  [N_C8],
  output logic [15:0]          c16_out [N_C16],
  output logic [31:0]          c32_out [N_C32],
  output logic [N_C8-1:0]      v8_out,
  output logic [N_C16-1:0]     v16_out,
  output logic [N_C32-1:0]     v32_out
);
  logic [7:0]  c8  [N_C8],  c8_n  [N_C8];
  logic [15:0] c16 [N_C16], c16_n [N_C16];
  logic [31:0] c32 [N_C32], c32_n [N_C32];
  logic [N_C8-1:0]  v8,  v8_n;
  logic [N_C16-1:0] v16, v16_n;
  logic [N_C32-1:0] v32, v32_n;

  always_comb begin
    c8_n  = c8;  v8_n  = v8;
    c16_n = c16; v16_n = v16;
    c32_n = c32; v32_n = v32;
    if (wr_en) begin
      unique case (mode)
        PHV_C8:
          for (int k = 0; k < SEG_W / 8; k++)
            if (k < int'(nbytes) && int'(idx) + k < N_C8) begin
              c8_n[int'(idx) + k] = seg[SEG_W-1-8*k -: 8];
              v8_n[int'(idx) + k] = 1'b1;
            end
        PHV_C16:
          for (int k = 0; k < SEG_W / 16; k++)
            if (2 * k + 1 < int'(nbytes) && int'(idx) + k < N_C16) begin
              c16_n[int'(idx) + k] = seg[SEG_W-1-16*k -: 16];
              v16_n[int'(idx) + k] = 1'b1;
            end
        PHV_C32:
          for (int k = 0; k < SEG_W / 32; k++)
            if (4 * k + 3 < int'(nbytes) && int'(idx) + k < N_C32) begin
              c32_n[int'(idx) + k] = seg[SEG_W-1-32*k -: 32];
              v32_n[int'(idx) + k] = 1'b1;
            end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v8 <= '0; v16 <= '0; v32 <= '0;
      v8_out <= '0; v16_out <= '0; v32_out <= '0;
      phv_valid <= 1'b0;
      for (int i = 0; i < N_C8;  i++) begin c8[i]  <= '0; c8_out[i]  <= '0; end
      for (int i = 0; i < N_C16; i++) begin c16[i] <= '0; c16_out[i] <= '0; end
      for (int i = 0; i < N_C32; i++) begin c32[i] <= '0; c32_out[i] <= '0; end
    end else begin
      phv_valid <= done;
      if (done) begin
        c8_out <= c8_n; c16_out <= c16_n; c32_out <= c32_n;
        v8_out <= v8_n; v16_out <= v16_n; v32_out <= v32_n;
        v8 <= '0; v16 <= '0; v32 <= '0;
        for (int i = 0; i < N_C8;  i++) c8[i]  <= '0;
        for (int i = 0; i < N_C16; i++) c16[i] <= '0;
        for (int i = 0; i < N_C32; i++) c32[i] <= '0;
      end else begin
        c8 <= c8_n; c16 <= c16_n; c32 <= c32_n;
        v8 <= v8_n; v16 <= v16_n; v32 <= v32_n;
      end
    end
  end
endmodule

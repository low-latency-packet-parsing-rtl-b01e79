// nh_resolve_unit: Next Header Resolve Unit.
//
// Finds the start address of the subroutine that parses the next header.
// When 'start' is high (an instruction enables the lookup) the built-in
// extraction engine takes the next-header ID (for example the IPv4 Protocol
// field) from the current segment and registers it. A memory interface then
// reads the comparand store and the associated address store one word per
// cycle, from 'start_addr' for 'iters' words; each word holds NH_CMP
// comparands and their subroutine addresses. The registered ID is compared
// with all NH_CMP comparands of a word in parallel, the match vector is
// registered, and the resolve logic returns the address of the lowest
// matching lane. If no word matches, the default address given with 'start'
// is returned.
//
// Timing: start in cycle t; the first word is read in t+1 and compared in
// t+2, and 'ready' with 'resolved_addr' is high from t+4 when the first word
// matches (one more cycle per further word searched). 'in_progress' is high from t+1 until
// 'ready'. 'ready' stays high until the next start. A new start aborts a
// search in progress.
//
// Eight parallel comparators, the two stores, the iteration count, the default
// address and the in-progress/ready status follow the architecture; the store
// depth, the per-comparand valid bit and lowest-lane priority are this
// design's choices.
module nh_resolve_unit
  import parser_pkg::*;
#(
  parameter int NH_CMP   = 8,
  parameter int NH_DEPTH = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // lookup request
  input  logic                        start,
  input  logic [SEG_W-1:0]            seg,
  input  ext_spec_t                   spec,
  input  logic [$clog2(NH_DEPTH)-1:0] start_addr,
  input  logic [NH_IT_W-1:0]          iters,
  input  logic [PC_W-1:0]             default_addr,
  // store writes
  input  logic                        cmp_we,
  input  logic                        adr_we,
  input  logic [$clog2(NH_DEPTH)-1:0] wr_word,
  input  logic [$clog2(NH_CMP)-1:0]   wr_lane,
  input  logic                        wr_cmp_valid,
  input  logic [FIELD_W-1:0]          wr_cmp,
  input  logic [PC_W-1:0]             wr_adr,
  // status and result
  output logic                        in_progress,
  output logic                        ready,
  output logic                        matched,
  output logic [PC_W-1:0]             resolved_addr
);
  localparam int AW = $clog2(NH_DEPTH);

  // comparand store (valid + value) and associated address store
  logic [NH_CMP-1:0]  cmp_vld [NH_DEPTH];
  logic [FIELD_W-1:0] cmp_mem [NH_DEPTH][NH_CMP];
  logic [PC_W-1:0]    adr_mem [NH_DEPTH][NH_CMP];

  logic [FIELD_W-1:0] field_d, field_q;
  logic [PC_W-1:0]    dflt_q;
  logic [AW-1:0]      rd_ptr;
  logic [NH_IT_W:0]   left;
  // stage 1: word read from the stores
  logic               s1_v, s1_last;
  logic [NH_CMP-1:0]  s1_vld;
  logic [FIELD_W-1:0] s1_cmp [NH_CMP];
  logic [PC_W-1:0]    s1_adr [NH_CMP];
  // stage 2: registered match vector
  logic               s2_v, s2_last;
  logic [NH_CMP-1:0]  s2_match;
  logic [PC_W-1:0]    s2_adr [NH_CMP];
  // resolve logic
  logic               hit;
  logic [PC_W-1:0]    hit_adr;

  extraction_engine u_ee (.seg(seg), .spec(spec), .field(field_d));

  always_ff @(posedge clk) begin
    if (cmp_we) begin
      cmp_mem[wr_word][wr_lane] <= wr_cmp;
      cmp_vld[wr_word][wr_lane] <= wr_cmp_valid;
    end
    if (adr_we) adr_mem[wr_word][wr_lane] <= wr_adr;
  end

  always_comb begin
    hit     = 1'b0;
    hit_adr = '0;
    for (int i = NH_CMP - 1; i >= 0; i--) begin
      if (s2_match[i]) begin
        hit     = 1'b1;
        hit_adr = s2_adr[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_progress   <= 1'b0;
      ready         <= 1'b0;
      matched       <= 1'b0;
      resolved_addr <= '0;
      field_q       <= '0;
      dflt_q        <= '0;
      rd_ptr        <= '0;
      left          <= '0;
      s1_v          <= 1'b0;
      s1_last       <= 1'b0;
      s2_v          <= 1'b0;
      s2_last       <= 1'b0;
      s1_vld        <= '0;
      s2_match      <= '0;
      for (int i = 0; i < NH_CMP; i++) begin
        s1_cmp[i] <= '0;
        s1_adr[i] <= '0;
        s2_adr[i] <= '0;
      end
    end else if (start) begin
      in_progress <= 1'b1;
      ready       <= 1'b0;
      matched     <= 1'b0;
      field_q     <= field_d;
      dflt_q      <= default_addr;
      rd_ptr      <= start_addr;
      left        <= (iters == '0) ? (NH_IT_W+1)'(1) : {1'b0, iters};
      s1_v        <= 1'b0;
      s2_v        <= 1'b0;
    end else if (in_progress) begin
      // memory interface: one word per cycle
      s1_v <= (left != '0);
      if (left != '0) begin
        s1_vld  <= cmp_vld[rd_ptr];
        s1_cmp  <= cmp_mem[rd_ptr];
        s1_adr  <= adr_mem[rd_ptr];
        s1_last <= (left == (NH_IT_W+1)'(1));
        rd_ptr  <= rd_ptr + 1'b1;
        left    <= left - 1'b1;
      end
      // parallel comparators
      s2_v    <= s1_v;
      s2_last <= s1_last;
      for (int i = 0; i < NH_CMP; i++) begin
        s2_match[i] <= s1_v && s1_vld[i] && (s1_cmp[i] == field_q);
        s2_adr[i]   <= s1_adr[i];
      end
      // resolve logic
      if (s2_v && (hit || s2_last)) begin
        in_progress   <= 1'b0;
        ready         <= 1'b1;
        matched       <= hit;
        resolved_addr <= hit ? hit_adr : dflt_q;
        s1_v          <= 1'b0;
        s2_v          <= 1'b0;
        left          <= '0;
      end
    end
  end
endmodule

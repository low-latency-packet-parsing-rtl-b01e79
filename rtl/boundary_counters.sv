// boundary_counters: the down-counters that keep the boundaries between
// headers and between packets.
//
// One header-size counter and N_PKT_CNT payload/packet-size counters, all in
// bytes. An instruction may load the header counter and one packet counter
// with (extracted field + signed immediate); every counter that holds a value
// ("armed") then counts down by the number of bytes consumed from the stream
// in each cycle, including the cycle of the load. A counter that reaches zero
// raises its expiry in that same cycle (combinationally, from its next value)
// and disarms, so the APC can act on the boundary without a checking
// instruction. A result below zero saturates at zero. 'clear' disarms all
// counters at the end of a packet.
//
// 'pkt_min' is the smallest value among the armed packet counters; the APC
// uses it to stop payload forwarding exactly at the packet boundary.
// Eight packet counters follow the architecture; counting in bytes, the
// immediate and saturation are this design's choices.
module boundary_counters
  import parser_pkg::*;
#(
  parameter int N_PKT_CNT = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic [3:0]                   consume,
  input  logic                         hdr_ld,
  input  logic [FIELD_W-1:0]           hdr_field,
  input  logic [CNT_W-1:0]             hdr_imm,
  input  logic                         pkt_ld,
  input  logic [$clog2(N_PKT_CNT)-1:0] pkt_sel,
  input  logic [FIELD_W-1:0]           pkt_field,
  input  logic [CNT_W-1:0]             pkt_imm,
  output logic                         hdr_exp,    // header counter reaches zero this cycle
  output logic                         hdr_armed,  // header counter holds a value
  output logic                         pkt_exp,    // some packet counter reaches zero this cycle
  output logic                         pkt_armed,  // some packet counter holds a value
  output logic [CNT_W-1:0]             pkt_min,    // smallest armed packet counter
  output logic [CNT_W-1:0]             hdr_cnt
);
  logic [CNT_W-1:0] pcnt   [N_PKT_CNT];
  logic [N_PKT_CNT-1:0] parm;
  logic [CNT_W-1:0] pnext  [N_PKT_CNT];
  logic [N_PKT_CNT-1:0] pexp;
  logic [CNT_W-1:0] hnext;

  // load value minus this cycle's consumption, saturated at zero
  function automatic logic [CNT_W-1:0] load_val(logic [FIELD_W-1:0] f,
                                                logic [CNT_W-1:0] imm,
                                                logic [3:0] c);
    logic signed [CNT_W+1:0] v;
    v = $signed({2'b00, CNT_W'(f)}) + $signed({{2{imm[CNT_W-1]}}, imm})
        - $signed({{(CNT_W-2){1'b0}}, c});
    return (v <= 0) ? '0 : v[CNT_W-1:0];
  endfunction

  function automatic logic [CNT_W-1:0] dec(logic [CNT_W-1:0] v, logic [3:0] c);
    return (v <= CNT_W'(c)) ? '0 : v - CNT_W'(c);
  endfunction

  always_comb begin
    hnext   = hdr_ld ? load_val(hdr_field, hdr_imm, consume)
                     : (hdr_armed ? dec(hdr_cnt, consume) : hdr_cnt);
    hdr_exp = (hdr_ld || hdr_armed) && hnext == '0;
    pkt_min = '1;
    for (int i = 0; i < N_PKT_CNT; i++) begin
      if (pkt_ld && int'(pkt_sel) == i)
        pnext[i] = load_val(pkt_field, pkt_imm, consume);
      else
        pnext[i] = parm[i] ? dec(pcnt[i], consume) : pcnt[i];
      pexp[i] = ((pkt_ld && int'(pkt_sel) == i) || parm[i]) && pnext[i] == '0;
      if (parm[i] && pcnt[i] < pkt_min) pkt_min = pcnt[i];
    end
    pkt_exp   = |pexp;
    pkt_armed = |parm;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hdr_cnt   <= '0;
      hdr_armed <= 1'b0;
      parm      <= '0;
      for (int i = 0; i < N_PKT_CNT; i++) pcnt[i] <= '0;
    end else if (clear) begin
      hdr_cnt   <= '0;
      hdr_armed <= 1'b0;
      parm      <= '0;
      for (int i = 0; i < N_PKT_CNT; i++) pcnt[i] <= '0;
    end else begin
      hdr_cnt   <= hnext;
      hdr_armed <= (hdr_ld || hdr_armed) && !hdr_exp;
      for (int i = 0; i < N_PKT_CNT; i++) begin
        pcnt[i] <= pnext[i];
        parm[i] <= ((pkt_ld && int'(pkt_sel) == i) || parm[i]) && !pexp[i];
      end
    end
  end
endmodule

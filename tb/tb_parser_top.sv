// tb_parser_top: end-to-end test of the parser at its default parameters.
//
// Loads a parse program for Ethernet (with a 4-byte FCS trailer), 802.1Q
// VLAN, MPLS, IPv4 with options, IPv6 with extension headers, GRE with
// optional fields and TCP with options, then streams packets of these kinds
// back to back:
//   W1 Ethernet-IPv4-TCP
//   W2 Ethernet-IPv4(two option words)-TCP
//   W3 Ethernet-MPLS-IPv6(two extension headers)-TCP
//   W4 Ethernet-2xVLAN-2xMPLS-IPv6(two extension headers)-TCP
//   IPv4 with 20..36-byte headers, GRE tunnels with random flags, IPv4 and
//   GRE inside IPv6 (found in the second word of a two-word next-header
//   search), packets without payload and random IPv4/TCP header sizes.
// For every packet it checks: one PHV per packet, in order; selected PHV
// containers (MAC, IP addresses, ports, FCS, ...) against values the packet
// builder recorded; that the parser consumed exactly the packet's bytes; and
// the number of payload bytes forwarded and that they leave at 8 bytes per
// cycle. Header parse time of W1..W4 and of the IPv4 header sizes is measured
// in cycles and checked against upper bounds (21, 22, 35, 40 cycles; 6, 6, 6,
// 7, 8 cycles). From the tenth packet on, the source pauses at random. Each
// mechanism (next-header stall, input stall, header-counter expiry, payload
// forwarding, packet counter expiry, catalyst branch, conditional branch taken
// and not taken, next-header call and trailer return, end of trailer) is
// counted and must occur at least once.
module tb_parser_top;
  import parser_pkg::*;

  localparam int N_C = 16;
  // program addresses
  localparam int E0 = 0, DROP = 4, V0 = 8, M0 = 10, M1 = 11, M2 = 12;
  localparam int I0 = 16, S0 = 32, X0 = 40, T0 = 56, G0 = 72;

  logic clk = 0, rst_n = 0, restart = 1;
  cfg_wr_t cfg;
  logic in_valid;
  logic [63:0] in_data;
  logic [3:0] in_consume;
  logic pl_valid;
  logic [3:0] pl_bytes;
  logic [63:0] pl_data;
  logic pkt_done, phv_valid, stalled_nh;
  logic [7:0]  c8_out  [N_C];
  logic [15:0] c16_out [N_C];
  logic [31:0] c32_out [N_C];
  logic [N_C-1:0] v8_out, v16_out, v32_out;
  logic [7:0] pc;

  parser_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  // ---------------------------------------------------------------- packets
  class Pkt;
    int  wl;          // workload number (1..4), 0 otherwise
    int  ipv4_bytes;  // IPv4 header size for the timing table, 0 otherwise
    int  len;
    int  payload;
    int  kind[$];     // 8, 16, 32
    int  idx[$];
    longint val[$];
    // a later header written to the same container replaces the earlier one
    function void expect_c(int k, int i, longint v);
      foreach (kind[n]) if (kind[n] == k && idx[n] == i) begin val[n] = v; return; end
      kind.push_back(k); idx.push_back(i); val.push_back(v);
    endfunction
  endclass

  byte unsigned stream[$];
  byte unsigned pkt[$];
  Pkt exp_q[$];

  function automatic void put8(int v);  pkt.push_back(8'(v)); endfunction
  function automatic void put16(int v); put8(v >> 8); put8(v); endfunction
  function automatic void put32(int v); put16(v >> 16); put16(v); endfunction

  function automatic int rnd32(); return int'($urandom); endfunction

  function automatic void b_eth(Pkt p, int etype);
    int d0 = $urandom_range(0, 65535), d1 = $urandom_range(0, 65535), d2 = $urandom_range(0, 65535);
    put16(d0); put16(d1); put16(d2);
    put16($urandom_range(0, 65535)); put32(rnd32());
    put16(etype);
    p.expect_c(16, 0, d0); p.expect_c(16, 1, d1); p.expect_c(16, 2, d2);
    p.expect_c(16, 6, etype);
  endfunction

  function automatic void b_vlan(Pkt p, int etype);
    int tci = $urandom_range(0, 65535);
    put16(tci); put16(etype);
    p.expect_c(16, 7, tci); p.expect_c(16, 8, etype);
  endfunction

  function automatic void b_mpls(Pkt p, bit s);
    int w = ($urandom_range(0, 1048575) << 12) | ($urandom_range(0, 7) << 9) | (int'(s) << 8) | 64;
    put32(w);
    p.expect_c(16, 13, w >>> 16 & 16'hFFFF); p.expect_c(16, 14, w & 16'hFFFF);
  endfunction

  // IPv4 header with 'ihl' words; l4_len bytes follow it inside the packet
  function automatic void b_ipv4(Pkt p, int ihl, int proto, int l4_len);
    int src = rnd32(), dst = rnd32(), tl = ihl * 4 + l4_len, id = rnd32();
    put8(8'h40 | ihl); put8(0); put16(tl);
    put32(id);
    put8(64); put8(proto); put16(0);
    put32(src); put32(dst);
    for (int i = 5; i < ihl; i++) put32(rnd32());
    p.expect_c(32, 0, (longint'(8'h40 | ihl) << 24) | tl);
    p.expect_c(32, 1, longint'(unsigned'(id)));
    p.expect_c(32, 2, (longint'(64) << 24) | (proto << 16));
    p.expect_c(32, 3, longint'(unsigned'(src))); p.expect_c(32, 4, longint'(unsigned'(dst)));
  endfunction

  function automatic void b_ipv6(Pkt p, int nh, int plen);
    int w[8];
    put32(32'h6000_0000 | $urandom_range(0, 1048575)); put16(plen); put8(nh); put8(64);
    foreach (w[i]) begin w[i] = rnd32(); put32(w[i]); end
    p.expect_c(32, 1, (longint'(plen) << 16) | (nh << 8) | 64);
    p.expect_c(32, 2, longint'(unsigned'(w[0]))); p.expect_c(32, 9, longint'(unsigned'(w[7])));
  endfunction

  // IPv6 extension header of (hel+1)*8 bytes
  function automatic void b_ext6(Pkt p, int nh, int hel);
    put8(nh); put8(hel);
    for (int i = 2; i < (hel + 1) * 8; i++) put8($urandom_range(0, 255));
    p.expect_c(8, 0, nh);
  endfunction

  function automatic void b_tcp(Pkt p, int doff);
    int sp = $urandom_range(0, 65535), dp = $urandom_range(0, 65535);
    put16(sp); put16(dp); put32(rnd32()); put32(rnd32());
    put8(doff << 4); put8(8'h18); put16(1024);
    put32(rnd32());
    for (int i = 5; i < doff; i++) put32(rnd32());
    p.expect_c(32, 10, (longint'(sp) << 16) | dp);
  endfunction

  // GRE with flags C (checksum), K (key), S (sequence) and protocol type
  function automatic int b_gre(Pkt p, bit c, bit k, bit s, int proto);
    int n = int'(c) + int'(k) + int'(s);
    put8((int'(c) << 7) | (int'(k) << 5) | (int'(s) << 4)); put8(0); put16(proto);
    repeat (n) put32(rnd32());
    p.expect_c(16, 10, proto);
    return 4 + 4 * n;
  endfunction

  function automatic void finish_pkt(Pkt p, int payload);
    int fcs = rnd32();
    repeat (payload) put8($urandom_range(0, 255));
    put32(fcs);
    p.expect_c(32, 15, longint'(unsigned'(fcs)));
    p.payload = payload;
    p.len = pkt.size();
    foreach (pkt[i]) stream.push_back(pkt[i]);
    pkt.delete();
    exp_q.push_back(p);
  endfunction

  // packet builders for the workloads; 'pl' is the TCP payload length
  function automatic void mk_ipv4_tcp(int wl, int ihl, int doff, int pl, int ipv4_bytes = 0);
    Pkt p = new();
    p.wl = wl; p.ipv4_bytes = ipv4_bytes;
    b_eth(p, 16'h0800);
    b_ipv4(p, ihl, 6, doff * 4 + pl);
    b_tcp(p, doff);
    finish_pkt(p, pl);
  endfunction

  function automatic void mk_ipv6(int wl, int n_vlan, int n_mpls, int pl);
    Pkt p = new();
    int hel0 = $urandom_range(0, 2), hel1 = $urandom_range(0, 2);
    p.wl = wl;
    b_eth(p, n_vlan > 0 ? 16'h8100 : 16'h8847);
    for (int i = 0; i < n_vlan; i++) b_vlan(p, i == n_vlan - 1 ? 16'h8847 : 16'h8100);
    for (int i = 0; i < n_mpls; i++) b_mpls(p, i == n_mpls - 1);
    b_ipv6(p, 0, (hel0 + 1) * 8 + (hel1 + 1) * 8 + 20 + pl);
    b_ext6(p, 60, hel0);
    b_ext6(p, 6, hel1);
    b_tcp(p, 5);
    finish_pkt(p, pl);
  endfunction

  function automatic void mk_gre(bit c, bit k, bit s, int pl);
    Pkt p = new();
    int n = int'(c) + int'(k) + int'(s);
    b_eth(p, 16'h0800);
    // outer IPv4 (its containers are overwritten by the inner header)
    begin
      int tl = 20 + 4 + 4 * n + 20 + 20 + pl;
      put8(8'h45); put8(0); put16(tl); put32(rnd32()); put8(64); put8(47); put16(0);
      put32(rnd32()); put32(rnd32());
    end
    void'(b_gre(p, c, k, s, 16'h0800));
    b_ipv4(p, 5, 6, 20 + pl);
    b_tcp(p, 5);
    finish_pkt(p, pl);
  endfunction

  // IPv4 or GRE carried directly in IPv6: found in the second word of the
  // IPv6 next-header table
  function automatic void mk_v6_tunnel(bit gre, int pl);
    Pkt p = new();
    b_eth(p, 16'h86DD);
    if (gre) begin
      b_ipv6(p, 47, 4 + 20 + 20 + pl);
      void'(b_gre(p, 0, 1, 0, 16'h0800));
    end else begin
      b_ipv6(p, 4, 20 + 20 + pl);
    end
    b_ipv4(p, 5, 6, 20 + pl);
    b_tcp(p, 5);
    finish_pkt(p, pl);
  endfunction

  function automatic void mk_no_payload();
    Pkt p = new();
    b_eth(p, 16'h0800);
    b_ipv4(p, $urandom_range(5, 8), 6, 0);
    finish_pkt(p, 0);
  endfunction

  // ---------------------------------------------------------------- program
  function automatic ext_spec_t ex(int off, int len, int shl = 0);
    return '{off: 6'(off), len: 5'(len), shl: 3'(shl)};
  endfunction

  function automatic instr_t ins(seg_sz_e s, phv_mode_e m, int idx, br_type_e b, int addr = 0);
    instr_t i = '0;
    i.seg = s; i.phv_mode = m; i.phv_idx = 4'(idx); i.br = b; i.br_addr = 8'(addr);
    i.nh_default = 8'(DROP);
    i.nh_iters = 3'd1;
    return i;
  endfunction

  task automatic cfg_write(cfg_tgt_e t, int addr, logic [INSTR_W-1:0] data);
    @(negedge clk);
    cfg.we = 1; cfg.tgt = t; cfg.addr = 12'(addr); cfg.data = data;
    @(negedge clk);
    cfg.we = 0;
  endtask

  task automatic wr_i(int a, instr_t i); cfg_write(CFG_IMEM, a, INSTR_W'(i)); endtask

  task automatic wr_nh(int word, int lane, int value, int target);
    cfg_write(CFG_NH_CMP, word * 8 + lane, INSTR_W'({1'b1, 16'(value)}));
    cfg_write(CFG_NH_ADDR, word * 8 + lane, INSTR_W'(target));
  endtask

  task automatic wr_bc(int set, int entry, bit v, int value, int target);
    cfg_write(CFG_BC, set * 8 + entry, INSTR_W'({v, 16'(value), 8'(target)}));
  endtask

  task automatic load_program();
    instr_t i;
    for (int a = 0; a < 256; a++) wr_i(a, ins(SEG_NONE, PHV_NONE, 0, BR_EOT));
    // Ethernet: 14-byte header held by the header counter; EtherType looked
    // up from the second segment; the call keeps address 3 (FCS) for later.
    i = ins(SEG_64, PHV_C16, 0, BR_SEQ); i.hdr_ld = 1; i.hdr_imm = 16'd14; wr_i(E0, i);
    i = ins(SEG_32, PHV_C16, 4, BR_SEQ);
    i.nh_en = 1; i.nh_ext = ex(32, 16); i.nh_start = 0; wr_i(E0 + 1, i);
    i = ins(SEG_16, PHV_C16, 6, BR_NH_CALL); wr_i(E0 + 2, i);
    i = ins(SEG_32, PHV_C32, 15, BR_EOT); wr_i(E0 + 3, i);      // FCS trailer
    wr_i(DROP, ins(SEG_NONE, PHV_NONE, 0, BR_EOT));
    // VLAN tag
    i = ins(SEG_32, PHV_C16, 7, BR_NEXT_HDR);
    i.nh_en = 1; i.nh_ext = ex(16, 16); i.nh_start = 0; wr_i(V0, i);
    // MPLS: loop while bottom-of-stack is 0, then pick IPv4/IPv6 by version
    i = ins(SEG_32, PHV_C16, 13, BR_COND, M0);
    i.br_ext = ex(23, 1); i.cond = CC_EQ; i.cond_ref = 0; wr_i(M0, i);
    i = ins(SEG_NONE, PHV_NONE, 0, BR_CATALYST); i.br_ext = ex(0, 4); i.bc_set = 0; wr_i(M1, i);
    wr_i(M2, ins(SEG_NONE, PHV_NONE, 0, BR_EOT));
    // IPv4: header counter = IHL*4, packet counter 0 = total length,
    // protocol looked up from the second segment, up to 10 option words
    i = ins(SEG_64, PHV_C32, 0, BR_SEQ);
    i.hdr_ld = 1; i.hdr_ext = ex(4, 4, 2); i.hdr_imm = 0;
    i.pkt_ld = 1; i.pkt_sel = 0; i.pkt_ext = ex(16, 16); i.pkt_imm = 0; wr_i(I0, i);
    i = ins(SEG_64, PHV_C32, 2, BR_SEQ);
    i.nh_en = 1; i.nh_ext = ex(8, 8); i.nh_start = 1; wr_i(I0 + 1, i);
    wr_i(I0 + 2, ins(SEG_32, PHV_C32, 4, BR_SEQ));
    for (int k = 0; k < 10; k++) wr_i(I0 + 3 + k, ins(SEG_32, PHV_NONE, 0, k == 9 ? BR_NEXT_HDR : BR_SEQ));
    // IPv6: fixed 40-byte header, packet counter = payload length + 40
    i = ins(SEG_64, PHV_C32, 0, BR_SEQ);
    i.hdr_ld = 1; i.hdr_imm = 16'd40;
    i.pkt_ld = 1; i.pkt_sel = 0; i.pkt_ext = ex(32, 16); i.pkt_imm = 16'd40;
    i.nh_en = 1; i.nh_ext = ex(48, 8); i.nh_start = 2; i.nh_iters = 2; wr_i(S0, i);
    for (int k = 1; k <= 4; k++) wr_i(S0 + k, ins(SEG_64, PHV_C32, 2 * k, BR_SEQ));
    // IPv6 extension header: (Hdr Ext Len + 1) * 8 bytes
    i = ins(SEG_64, PHV_C8, 0, BR_SEQ);
    i.hdr_ld = 1; i.hdr_ext = ex(8, 8, 3); i.hdr_imm = 16'd8;
    i.nh_en = 1; i.nh_ext = ex(0, 8); i.nh_start = 2; i.nh_iters = 2; wr_i(X0, i);
    for (int k = 1; k <= 7; k++) wr_i(X0 + k, ins(SEG_64, PHV_NONE, 0, k == 7 ? BR_NEXT_HDR : BR_SEQ));
    // TCP: data offset in the second segment, up to 10 option words
    wr_i(T0, ins(SEG_64, PHV_C32, 10, BR_SEQ));
    i = ins(SEG_64, PHV_C32, 12, BR_SEQ);
    i.hdr_ld = 1; i.hdr_ext = ex(32, 4, 2); i.hdr_imm = 16'hFFF8; wr_i(T0 + 1, i);
    wr_i(T0 + 2, ins(SEG_32, PHV_C32, 14, BR_SEQ));
    for (int k = 0; k < 10; k++) wr_i(T0 + 3 + k, ins(SEG_32, PHV_NONE, 0, k == 9 ? BR_PAYLOAD : BR_SEQ));
    // GRE: catalyst on C,R,K,S picks the code for 0..3 optional words
    i = ins(SEG_32, PHV_C16, 9, BR_CATALYST);
    i.nh_en = 1; i.nh_ext = ex(16, 16); i.nh_start = 0;
    i.br_ext = ex(0, 4); i.bc_set = 1; wr_i(G0, i);
    wr_i(G0 + 1, ins(SEG_NONE, PHV_NONE, 0, BR_EOT));             // unknown flags
    wr_i(G0 + 2, ins(SEG_32, PHV_NONE, 0, BR_SEQ));               // 3 words
    wr_i(G0 + 3, ins(SEG_32, PHV_NONE, 0, BR_SEQ));               // 2 words
    wr_i(G0 + 4, ins(SEG_32, PHV_NONE, 0, BR_NEXT_HDR));          // 1 word
    wr_i(G0 + 5, ins(SEG_NONE, PHV_NONE, 0, BR_NEXT_HDR));        // none
    for (int f = 0; f < 8; f++) begin
      bit c = f[2], k = f[1], s = f[0];
      int n = int'(c) + int'(k) + int'(s);
      wr_bc(1, f, 1, (int'(c) << 3) | (int'(k) << 1) | int'(s), G0 + 5 - n);
    end
    wr_bc(0, 0, 1, 4, I0);
    wr_bc(0, 1, 1, 6, S0);
    // next-header tables: word 0 EtherType, word 1 IPv4 protocol,
    // word 2 IPv6 next header
    wr_nh(0, 0, 16'h0800, I0); wr_nh(0, 1, 16'h86DD, S0);
    wr_nh(0, 2, 16'h8100, V0); wr_nh(0, 3, 16'h8847, M0);
    wr_nh(1, 0, 6, T0);  wr_nh(1, 1, 47, G0); wr_nh(1, 2, 41, S0); wr_nh(1, 3, 4, I0);
    wr_nh(2, 0, 6, T0);  wr_nh(2, 1, 0, X0);  wr_nh(2, 2, 43, X0); wr_nh(2, 3, 60, X0);
    // rarer IPv6 next headers sit in word 3; IPv6 lookups search 2 words
    wr_nh(3, 0, 4, I0);  wr_nh(3, 1, 41, S0); wr_nh(3, 2, 47, G0);
    for (int l = 4; l < 8; l++) cfg_write(CFG_NH_CMP, 2 * 8 + l, '0);
    for (int l = 3; l < 8; l++) cfg_write(CFG_NH_CMP, 3 * 8 + l, '0);
    for (int l = 4; l < 8; l++) begin cfg_write(CFG_NH_CMP, l, '0); cfg_write(CFG_NH_CMP, 8 + l, '0); end
  endtask

  // ---------------------------------------------------------------- stream
  always @(posedge clk) begin
    if (rst_n && !restart)
      for (int k = 0; k < int'(in_consume); k++) void'(stream.pop_front());
  end
  // after the timed packets the source pauses at random (window not valid)
  bit gap = 0, gap_en = 0, had_gap = 0;
  always @(negedge clk) gap <= gap_en && ($urandom_range(0, 5) == 0);
  always_comb begin
    in_valid = stream.size() > 0 && !gap;
    for (int k = 0; k < 8; k++)
      in_data[63 - 8*k -: 8] = (k < stream.size()) ? stream[k] : 8'h00;
  end

  // ---------------------------------------------------------------- monitors
  int cnt_stall = 0, cnt_hdr_exp = 0, cnt_payload = 0, cnt_pkt_exp = 0, cnt_bc = 0;
  int cnt_in_stall = 0;
  int cnt_cond_t = 0, cnt_cond_n = 0, cnt_call = 0, cnt_trailer = 0, cnt_eot = 0, cnt_pl_ent = 0;
  int consumed = 0, pl_count = 0, pl_cycles = 0, n_done = 0;
  longint t_start = -1, t_hdr = -1, t_v4 = -1;
  int wl_cycles [5];
  int v4_cycles [int];
  bit prev_payload = 0;
  Pkt cur;

  always @(posedge clk) if (rst_n && !restart) begin
    if (stalled_nh) cnt_stall++;
    if (gap && stream.size() > 0) begin
      had_gap = 1;
      if (!dut.u_apc.in_payload && !stalled_nh && dut.instr.seg != SEG_NONE) cnt_in_stall++;
    end
    if (n_done >= 9) gap_en = 1;
    if (dut.u_apc.in_payload) cnt_payload++;
    if (dut.u_apc.in_payload && !prev_payload) cnt_pl_ent++;
    prev_payload <= dut.u_apc.in_payload;
    if (dut.exec && dut.hdr_exp) cnt_hdr_exp++;
    if (dut.pkt_exp) cnt_pkt_exp++;
    if (dut.exec && dut.instr.br == BR_CATALYST && dut.bc_hit) cnt_bc++;
    if (dut.exec && dut.instr.br == BR_COND && dut.cond_taken) cnt_cond_t++;
    if (dut.exec && dut.instr.br == BR_COND && !dut.cond_taken) cnt_cond_n++;
    if (dut.exec && dut.instr.br == BR_NH_CALL) cnt_call++;
    if (dut.exec && pc == 8'(E0 + 3)) cnt_trailer++;
    if (dut.exec && dut.instr.br == BR_EOT) cnt_eot++;
    // timing
    if (dut.exec && pc == 8'(E0) && t_start < 0) t_start = cycle;
    if (dut.exec && pc == 8'(I0)) t_v4 = cycle;
    if (exp_q.size() > 0) begin
      if (dut.exec && pc == 8'(T0) && t_v4 >= 0)
        if (exp_q[0].ipv4_bytes > 0) v4_cycles[exp_q[0].ipv4_bytes] = int'(cycle - t_v4);
      if (dut.u_apc.in_payload && !prev_payload && t_start >= 0)
        if (exp_q[0].wl > 0) wl_cycles[exp_q[0].wl] = int'(cycle - t_start);
    end
    consumed += int'(in_consume);
    if (pl_valid) begin pl_count += int'(pl_bytes); pl_cycles++; end
    if (pkt_done) begin
      n_done++;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected packet end"); end
      else begin
        cur = exp_q.pop_front();
        if (consumed != cur.len || pl_count != cur.payload) begin
          failures++;
          $display("packet %0d: consumed %0d of %0d bytes, payload %0d of %0d", n_done,
                   consumed, cur.len, pl_count, cur.payload);
        end
        // payload leaves at the full segment rate: 8 bytes per cycle
        checks++;
        if (!had_gap && pl_cycles != (cur.payload + 7) / 8) begin
          failures++;
          $display("packet %0d: payload took %0d cycles, expected %0d", n_done, pl_cycles,
                   (cur.payload + 7) / 8);
        end
      end
      consumed = 0; pl_count = 0; pl_cycles = 0; had_gap = 0; t_start = -1; t_v4 = -1;
    end
  end

  // PHV check one cycle after the end of the packet
  always @(posedge clk) if (phv_valid && cur != null) begin
    for (int i = 0; i < cur.kind.size(); i++) begin
      longint got;
      bit v;
      case (cur.kind[i])
        8:  begin got = c8_out[cur.idx[i]];  v = v8_out[cur.idx[i]];  end
        16: begin got = c16_out[cur.idx[i]]; v = v16_out[cur.idx[i]]; end
        default: begin got = c32_out[cur.idx[i]]; v = v32_out[cur.idx[i]]; end
      endcase
      checks++;
      if (!v || got != cur.val[i]) begin
        failures++;
        if (failures < 10) $display("packet %0d: c%0d[%0d] = %h, expected %h (valid %b)",
                                    n_done, cur.kind[i], cur.idx[i], got, cur.val[i], v);
      end
    end
  end

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: %0d packets left", exp_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- main
  int n_pkts;
  initial begin
    int paper_wl [5] = '{0, 21, 22, 35, 40};
    int paper_v4 [int];
    paper_v4[20] = 6; paper_v4[24] = 6; paper_v4[28] = 6; paper_v4[32] = 7; paper_v4[36] = 8;
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_program();
    // build the stream
    mk_ipv4_tcp(1, 5, 5, 40);
    mk_ipv4_tcp(2, 7, 5, 33);
    mk_ipv6(3, 0, 1, 17);
    mk_ipv6(4, 2, 2, 64);
    for (int ihl = 5; ihl <= 9; ihl++) mk_ipv4_tcp(0, ihl, 5, 12, ihl * 4);
    for (int f = 0; f < 8; f++) mk_gre(f[2], f[1], f[0], $urandom_range(1, 30));
    mk_no_payload();
    mk_v6_tunnel(0, 10);
    mk_v6_tunnel(1, 20);
    for (int n = 0; n < 60; n++) begin
      case ($urandom_range(0, 5))
        5: mk_v6_tunnel($urandom_range(0, 1), $urandom_range(0, 80));
        0: mk_ipv4_tcp(0, $urandom_range(5, 15), $urandom_range(5, 15), $urandom_range(0, 200));
        1: mk_ipv6(0, $urandom_range(0, 2), $urandom_range(1, 3), $urandom_range(0, 100));
        2: mk_gre($urandom_range(0, 1), $urandom_range(0, 1), $urandom_range(0, 1), $urandom_range(0, 50));
        3: mk_no_payload();
        default: mk_ipv4_tcp(0, 5, 5, $urandom_range(1, 1500));
      endcase
    end
    n_pkts = exp_q.size();
    @(negedge clk);
    restart = 0;
    wait (exp_q.size() == 0);
    repeat (4) @(posedge clk);
    checks++;
    if (stream.size() != 0) begin failures++; $display("%0d bytes left in stream", stream.size()); end
    // header parse time
    for (int w = 1; w <= 4; w++) begin
      checks++;
      $display("workload %0d: %0d cycles (bound %0d)", w, wl_cycles[w], paper_wl[w]);
      if (wl_cycles[w] <= 0 || wl_cycles[w] > paper_wl[w]) failures++;
    end
    foreach (paper_v4[b]) begin
      checks++;
      $display("IPv4 header of %0d bytes: %0d cycles (bound %0d)", b, v4_cycles[b], paper_v4[b]);
      if (!v4_cycles.exists(b) || v4_cycles[b] > paper_v4[b]) failures++;
    end
    // every mechanism must have happened
    $display("packets %0d, stall cycles %0d, header expiries %0d, payload entries %0d, packet expiries %0d",
             n_done, cnt_stall, cnt_hdr_exp, cnt_pl_ent, cnt_pkt_exp);
    $display("input stall cycles %0d", cnt_in_stall);
    checks++; if (cnt_in_stall == 0) failures++;
    $display("catalyst %0d, cond taken %0d / not %0d, calls %0d, trailers %0d, end-of-trailer %0d",
             cnt_bc, cnt_cond_t, cnt_cond_n, cnt_call, cnt_trailer, cnt_eot);
    foreach (wl_cycles[i]) ;
    checks++; if (n_done != n_pkts) failures++;
    checks++; if (cnt_stall == 0) failures++;
    checks++; if (cnt_hdr_exp == 0) failures++;
    checks++; if (cnt_pl_ent == 0 || cnt_payload == 0) failures++;
    checks++; if (cnt_pkt_exp == 0) failures++;
    checks++; if (cnt_bc == 0) failures++;
    checks++; if (cnt_cond_t == 0 || cnt_cond_n == 0) failures++;
    checks++; if (cnt_call == 0 || cnt_trailer == 0 || cnt_eot == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_boundary_counters: random loads and consumption, checked against an
// integer model of one header counter and eight packet counters (expiry,
// armed flags, smallest armed value), plus a directed IPv4-like sequence.
module tb_boundary_counters;
  import parser_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [3:0] consume = 0;
  logic hdr_ld = 0, pkt_ld = 0;
  logic [2:0] pkt_sel = 0;
  logic [15:0] hdr_field = 0, hdr_imm = 0, pkt_field = 0, pkt_imm = 0;
  logic hdr_exp, hdr_armed, pkt_exp, pkt_armed;
  logic [15:0] pkt_min, hdr_cnt;
  int checks = 0, failures = 0;
  // model
  int m_h; bit m_ha; int m_p[N]; bit m_pa[N];

  boundary_counters #(.N_PKT_CNT(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic step_check();
    int hn, pn[N]; bit he, pe; int mn; bit pa;
    // expected combinational results
    if (hdr_ld) hn = int'(hdr_field) + int'($signed(hdr_imm)) - int'(consume);
    else if (m_ha) hn = m_h - int'(consume); else hn = m_h;
    if (hn < 0) hn = 0;
    he = (hdr_ld || m_ha) && hn == 0;
    pe = 0; mn = 65535; pa = 0;
    for (int i = 0; i < N; i++) begin
      if (pkt_ld && int'(pkt_sel) == i) pn[i] = int'(pkt_field) + int'($signed(pkt_imm)) - int'(consume);
      else if (m_pa[i]) pn[i] = m_p[i] - int'(consume); else pn[i] = m_p[i];
      if (pn[i] < 0) pn[i] = 0;
      if (((pkt_ld && int'(pkt_sel) == i) || m_pa[i]) && pn[i] == 0) pe = 1;
      if (m_pa[i]) begin pa = 1; if (m_p[i] < mn) mn = m_p[i]; end
    end
    #1;
    checks++;
    if (hdr_exp !== he || pkt_exp !== pe || pkt_armed !== pa || int'(pkt_min) != mn) begin
      failures++;
      if (failures < 6) $display("t=%0t he %b/%b pe %b/%b pa %b/%b min %0d/%0d", $time,
                                 hdr_exp, he, pkt_exp, pe, pkt_armed, pa, pkt_min, mn);
    end
    @(posedge clk);
    if (clear) begin
      m_ha = 0; m_h = 0; foreach (m_p[i]) begin m_p[i] = 0; m_pa[i] = 0; end
    end else begin
      m_ha = (hdr_ld || m_ha) && !he; m_h = hn;
      for (int i = 0; i < N; i++) begin
        m_pa[i] = ((pkt_ld && int'(pkt_sel) == i) || m_pa[i]) && !(pn[i] == 0); m_p[i] = pn[i];
      end
    end
    #1;
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    m_h = 0; m_ha = 0; foreach (m_p[i]) begin m_p[i] = 0; m_pa[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1; #1;
    // IPv4 header of 24 bytes (IHL=6) read in 8+8+4+4 byte segments;
    // total length 40 loaded into counter 2 in the first segment.
    hdr_ld = 1; hdr_field = 16'd24; hdr_imm = 0; consume = 8;
    pkt_ld = 1; pkt_sel = 2; pkt_field = 16'd40; pkt_imm = 0;
    step_check();
    hdr_ld = 0; pkt_ld = 0;
    consume = 8; #1; checks++; if (hdr_exp) failures++; step_check();
    consume = 4; #1; checks++; if (hdr_exp) failures++; step_check();
    consume = 4; #1; checks++; if (!hdr_exp) begin failures++; $display("no header expiry"); end
    step_check();
    checks++; if (pkt_min != 16) begin failures++; $display("pkt_min %0d", pkt_min); end
    consume = 8; step_check();
    consume = 8; #1; checks++; if (!pkt_exp) begin failures++; $display("no packet expiry"); end
    step_check();
    // random phase
    for (int n = 0; n < 3000; n++) begin
      clear     = ($urandom_range(0, 40) == 0);
      consume   = 4'($urandom_range(0, 8));
      hdr_ld    = ($urandom_range(0, 5) == 0);
      hdr_field = 16'($urandom_range(0, 64));
      hdr_imm   = 16'($signed($urandom_range(0, 16)) - 8);
      pkt_ld    = ($urandom_range(0, 5) == 0);
      pkt_sel   = 3'($urandom);
      pkt_field = 16'($urandom_range(0, 200));
      pkt_imm   = 16'($signed($urandom_range(0, 16)) - 8);
      step_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
